// tb_da_lut: checks the lookup table.
//  1. The default table (the 50/60 Hz notch filter, a0 a1 a2 b1 b2 on address
//     bits 4..0) against the 32 published 11-bit entries of that filter.
//  2. A 4-coefficient table with random coefficients against sums formed here.
module tb_da_lut;
  import bsf_pkg::*;

  int checks = 0, failures = 0;

  // Published table of the notch filter, in units of 2^-7.
  localparam int NOTCH [32] = '{
       0, -122,  237,  115,  128,    6,  365,  243,
    -244, -365,   -7, -128, -116, -237,  121,    0,
     128,    6,  365,  243,  256,  134,  493,  371,
    -116, -237,  121,    0,   12, -109,  249,  128};

  localparam coef_arr_t RC = '{0: 23456, 1: -40000, 2: 77777, 3: -1234, default: 0};

  logic [4:0] a5;
  logic signed [10:0] f5;
  logic [3:0] a4;
  logic signed [9:0] f4;

  da_lut u_notch (.addr(a5), .f(f5));
  da_lut #(.NA(4), .COEF(RC)) u_rand (.addr(a4), .f(f4));

  initial begin
    for (int a = 0; a < 32; a++) begin
      a5 = 5'(a); #1;
      checks++;
      if (int'(f5) != NOTCH[a]) begin
        failures++;
        $display("FAIL notch entry %0d: got %0d expected %0d", a, f5, NOTCH[a]);
      end
    end
    for (int a = 0; a < 16; a++) begin
      longint s;
      a4 = 4'(a); #1;
      s = 0;
      if (a[3]) s += 23456;
      if (a[2]) s += -40000;
      if (a[1]) s += 77777;
      if (a[0]) s += -1234;
      checks++;
      if (longint'(f4) != (s >>> 9)) begin
        failures++;
        $display("FAIL random entry %0d: got %0d expected %0d", a, f4, s >>> 9);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
