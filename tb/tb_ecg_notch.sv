// tb_ecg_notch: the mains-interference workload. A synthetic electrocardiogram
// (a beat of 72 per minute, sampled at 1200 samples/s: narrow R spike, P and T
// waves) is contaminated with 60 Hz interference and filtered by the second-
// order notch y(n) = x(n) - 1.9021 x(n-1) + x(n-2) + 1.8523 y(n-1)
// - 0.94833 y(n-2) built as a bit-serial filter. Checked after the filter has
// settled:
//   - a pure 60 Hz tone is attenuated to under 20 % of its RMS value (the 7-bit
//     table entries move the notch to about 59 Hz, and rounding noise remains);
//   - a 50 Hz tone keeps over 70 %;
//   - a 5 Hz tone keeps over 85 % of its RMS value;
//   - on the contaminated ECG, under 30 % of the 60 Hz amplitude is left, and
//     the output differs from the ECG alone, filtered by the same equation in
//     floating point, by under 35 % of the RMS value of the interference (the
//     rest is rounding noise of the 8-bit arithmetic);
//   - the fourth-order configuration (60 Hz notch then 50 Hz notch) removes both
//     a 50 Hz and a 60 Hz tone (under 20 % and 25 %).
// RMS values are taken with the mean removed (see rms()).
// The same filter at 1000 samples/s notches 50 Hz: the sample values are the
// same, so the 60 Hz/1200 case covers it.
module tb_ecg_notch;
  import bsf_pkg::*;

  localparam int NS = 1800;     // 1.5 s of signal
  localparam int SETTLE = 400;
  localparam real PI = 3.14159265358979;
  localparam real FS = 1200.0;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [7:0] x2, x4;
  logic t2, t4, v2, v4;
  logic signed [7:0] y2, y4;
  int checks = 0, failures = 0;

  iir_filter u_notch (.clk(clk), .rst(rst), .x(x2), .x_take(t2), .y(y2), .y_valid(v2));
  iir_filter #(
    .NSEC(2),
    .A('{0: 65536, 1: -124656, 2: 65536, 3: 65536, 4: -126464, 5: 65536, default: 0}),
    .B('{1: 121392, 2: -62150, 4: 123392, 5: -62150, default: 0})
  ) u_notch2 (.clk(clk), .rst(rst), .x(x4), .x_take(t4), .y(y4), .y_valid(v4));

  always #5 clk = ~clk;

  real sig [NS];
  real ref_out [NS];
  real out2 [NS], out4 [NS];

  // synthetic ECG in units of the 8-bit LSB
  function automatic real ecg(input int n);
    real t, ph;
    t  = real'(n) / FS;
    ph = t * 1.2 - $floor(t * 1.2);            // position inside the beat, 0..1
    return 70.0 * $exp(-((ph - 0.40) * (ph - 0.40)) / (2.0 * 0.010 * 0.010))
         - 12.0 * $exp(-((ph - 0.43) * (ph - 0.43)) / (2.0 * 0.012 * 0.012))
         + 10.0 * $exp(-((ph - 0.25) * (ph - 0.25)) / (2.0 * 0.030 * 0.030))
         + 18.0 * $exp(-((ph - 0.70) * (ph - 0.70)) / (2.0 * 0.050 * 0.050));
  endfunction

  function automatic logic signed [7:0] quant(input real v);
    int i;
    i = $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
    if (i > 127) i = 127;
    if (i < -128) i = -128;
    return 8'(i);
  endfunction

  // Drive sig[] through both filters; collect outputs in arrival order.
  task automatic run();
    int n2, n4, k2, k4;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    n2 = 0; n4 = 0; k2 = 0; k4 = 0;
    x2 = quant(sig[0]);
    x4 = quant(sig[0]);
    while (k4 < NS + 3) begin
      @(posedge clk);
      // outputs: skip the words that precede the first sample's result
      if (v2) begin
        if (k2 >= 2 && k2 - 2 < NS) out2[k2-2] = real'(y2);
        k2++;
      end
      if (v4) begin
        if (k4 >= 3 && k4 - 3 < NS) out4[k4-3] = real'(y4);
        k4++;
      end
      if (t2) n2++;
      if (t4) n4++;
      #1;
      x2 = quant((n2 < NS) ? sig[n2] : 0.0);
      x4 = quant((n4 < NS) ? sig[n4] : 0.0);
    end
  endtask

  // RMS value of the settled part, its mean removed: rounding S/2 down at every
  // bit gives the filter a small constant offset, which is not interference.
  function automatic real rms(input real a [NS]);
    real s, m;
    m = 0.0;
    for (int n = SETTLE; n < NS; n++) m += a[n];
    m = m / real'(NS - SETTLE);
    s = 0.0;
    for (int n = SETTLE; n < NS; n++) s += (a[n] - m) * (a[n] - m);
    return $sqrt(s / real'(NS - SETTLE));
  endfunction

  // Amplitude of the 60 Hz component of the settled part.
  function automatic real amp60(input real a [NS]);
    real c, q, w;
    c = 0.0; q = 0.0;
    w = 2.0 * PI * 60.0 / FS;
    for (int n = SETTLE; n < NS; n++) begin
      c += a[n] * $cos(w * real'(n));
      q += a[n] * $sin(w * real'(n));
    end
    return 2.0 * $sqrt(c * c + q * q) / real'(NS - SETTLE);
  endfunction

  task automatic tone(input real freq, output real in_rms);
    for (int n = 0; n < NS; n++) sig[n] = 48.0 * $sin(2.0 * PI * freq * real'(n) / FS);
    in_rms = 48.0 / $sqrt(2.0);
    run();
  endtask

  task automatic expect_ratio(input real got, input real lim, input bit below,
                              input string what);
    checks++;
    $display("%s: %f", what, got);
    if (below ? (got >= lim) : (got <= lim)) begin
      failures++;
      $display("FAIL %s: ratio %f, limit %f", what, got, lim);
    end
  endtask

  initial begin
    real in_rms, e;
    real ecg_only [NS];
    real diff [NS];
    real intf [NS];
    x2 = '0; x4 = '0;

    tone(60.0, in_rms);
    expect_ratio(rms(out2) / in_rms, 0.20, 1'b1, "60 Hz tone through notch");
    expect_ratio(rms(out4) / in_rms, 0.25, 1'b1, "60 Hz tone through 50+60 Hz notch");
    tone(50.0, in_rms);
    expect_ratio(rms(out4) / in_rms, 0.20, 1'b1, "50 Hz tone through 50+60 Hz notch");
    expect_ratio(rms(out2) / in_rms, 0.70, 1'b0, "50 Hz tone through 60 Hz notch");
    tone(5.0, in_rms);
    expect_ratio(rms(out2) / in_rms, 0.85, 1'b0, "5 Hz tone through notch");

    // contaminated ECG
    for (int n = 0; n < NS; n++) begin
      ecg_only[n] = ecg(n);
      intf[n] = 30.0 * $sin(2.0 * PI * 60.0 * real'(n) / FS + 0.3);
      sig[n] = ecg_only[n] + intf[n] - 20.0;
      ecg_only[n] -= 20.0;
    end
    // floating-point notch on the clean ECG
    for (int n = 0; n < NS; n++) begin
      ref_out[n] = ecg_only[n]
                 - 1.9021 * ((n >= 1) ? ecg_only[n-1] : 0.0)
                 + ((n >= 2) ? ecg_only[n-2] : 0.0)
                 + 1.8523 * ((n >= 1) ? ref_out[n-1] : 0.0)
                 - 0.94833 * ((n >= 2) ? ref_out[n-2] : 0.0);
    end
    run();
    for (int n = 0; n < NS; n++) diff[n] = out2[n] - ref_out[n];
    expect_ratio(amp60(out2) / 30.0, 0.30, 1'b1, "60 Hz left in filtered ECG");
    e = rms(diff) / rms(intf);
    expect_ratio(e, 0.35, 1'b1, "ECG deviation / interference");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5 * (NS + 20) * 8 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
