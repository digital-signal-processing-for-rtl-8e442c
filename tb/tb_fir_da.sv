// tb_fir_da: self-checking test of the distributed-arithmetic FIR.
//
// Drives the filter at its full size (25 taps, 14-bit input) with an impulse,
// a full-scale step, a synthetic negative APFEL-like pulse on a baseline and
// random samples, and compares every output cycle with a direct-form
// multiply-and-add reference computed here from the same coefficients. Also
// checks the 4-cycle latency (out(t) belongs to in(t-4)) and that a new
// result appears every clock.
module tb_fir_da;
  import apfel_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [ADC_W-1:0] in_sample = '0;
  logic signed [Y_W-1:0] out_sample;
  int checks = 0, failures = 0;
  int cycle = 0;

  fir_da dut (.clk, .rst_n, .in_sample, .out_sample);

  always #5 clk = ~clk;

  // history of applied samples, indexed by cycle
  localparam int HMAX = 4096;
  int hist [HMAX];

  function automatic int ref_out(int t);
    longint acc, h;
    int idx;
    acc = 0;
    for (int k = 0; k < N_TAPS; k++) begin
      idx = t - FIR_LAT - k;
      h = longint'($signed(FIR_COEF[k]));
      acc += h * ((idx >= 0) ? longint'(hist[idx]) : 0);
    end
    acc = (acc + (1 <<< (COEF_FRAC-1))) >>> COEF_FRAC;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  function automatic int stimulus(int t);
    if (t < 100) return (t == 10) ? 1000 : 0;               // impulse
    if (t < 200) return (t >= 130) ? 16383 : 0;             // step, full scale
    if (t < 600) begin                                      // pulse on baseline
      int dt;
      dt = t - 300;
      if (dt < 0) return 15300;
      if (dt < 20) return 15300 - dt * 75;
      return 15300 - int'(1500.0 * $exp(-real'(dt - 20) / 40.0));
    end
    return int'($urandom_range(16383));
  endfunction

  int impulse_seen = 0;
  int exp_v;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 1200; t++) begin
      hist[t] = stimulus(t);
      in_sample <= ADC_W'(hist[t]);
      @(posedge clk);
      #1;
      // after this edge the counter reads t+1
      if (t + 1 >= FIR_LAT) begin
        exp_v = ref_out(t + 1);
        checks++;
        if (int'(out_sample) != exp_v) begin
          failures++;
          if (failures < 10) $display("t=%0d out=%0d exp=%0d", t+1, out_sample, exp_v);
        end
      end
      // the impulse at t=10 must show h_0-scaled output exactly at t=10+FIR_LAT
      if (t + 1 == 10 + FIR_LAT) begin
        checks++;
        if (int'(out_sample) != ref_out(t + 1) || ref_out(t+1) == 0) failures++;
        impulse_seen = 1;
      end
    end
    checks++;
    if (impulse_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
