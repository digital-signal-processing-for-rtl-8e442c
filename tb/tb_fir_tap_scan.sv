// tb_fir_tap_scan: the distributed-arithmetic FIR at other tap counts.
//
// Instantiates fir_da with 5, 11 and 25 taps. The 5- and 11-tap
// coefficient sets are triangular windows normalised to unity DC gain in
// Q1.17 (h_k proportional to min(k+1, N-k)); 11 taps do not divide into
// 5-input tables, so the last table is padded with zero weights. The 25-tap
// instance runs with its default coefficients. Each output cycle of each
// instance is compared with a direct-form multiply-and-add of the same
// coefficients over the same random and pulse-shaped input.
module tb_fir_tap_scan;
  localparam int CW = 18;

  typedef logic [4:0][CW-1:0]  c5_t;
  typedef logic [10:0][CW-1:0] c11_t;

  function automatic int tri_coef(int n, int k);
    int w, s;
    s = 0;
    for (int j = 0; j < n; j++) s += (j + 1 < n - j) ? j + 1 : n - j;
    w = (k + 1 < n - k) ? k + 1 : n - k;
    return (w * (1 << 17) + s / 2) / s;
  endfunction

  function automatic c5_t make5();
    c5_t c;
    for (int k = 0; k < 5; k++) c[k] = CW'(tri_coef(5, k));
    return c;
  endfunction

  function automatic c11_t make11();
    c11_t c;
    for (int k = 0; k < 11; k++) c[k] = CW'(tri_coef(11, k));
    return c;
  endfunction

  localparam c5_t  C5  = make5();
  localparam c11_t C11 = make11();

  logic clk = 0, rst_n = 0;
  logic [13:0] in_sample = '0;
  logic signed [15:0] y5, y11, y25;
  int checks = 0, failures = 0;
  int hist [4096];

  fir_da #(.N_TAPS(5),  .COEF(C5))  u5  (.clk, .rst_n, .in_sample, .out_sample(y5));
  fir_da #(.N_TAPS(11), .COEF(C11)) u11 (.clk, .rst_n, .in_sample, .out_sample(y11));
  fir_da                            u25 (.clk, .rst_n, .in_sample, .out_sample(y25));

  always #5 clk = ~clk;

  function automatic int ref_out(int t, int n);
    longint acc, h;
    int idx;
    acc = 0;
    for (int k = 0; k < n; k++) begin
      idx = t - apfel_pkg::FIR_LAT - k;
      if (n == 5)       h = longint'($signed(C5[k]));
      else if (n == 11) h = longint'($signed(C11[k]));
      else              h = longint'($signed(apfel_pkg::FIR_COEF[k]));
      acc += h * ((idx >= 0) ? longint'(hist[idx]) : 0);
    end
    acc = (acc + (longint'(1) <<< 16)) >>> 17;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  task automatic check(int got, int exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 12) $display("FAIL: %s got %0d expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 2000; t++) begin
      if (t < 1000) hist[t] = int'($urandom_range(16383));
      else hist[t] = 15300 - (((t % 200) < 15) ? (t % 200) * 100 : 1500 * 30 / (30 + (t % 200) - 15));
      in_sample <= 14'(hist[t]);
      @(posedge clk);
      #1;
      if (t + 1 >= apfel_pkg::FIR_LAT) begin
        check(int'(y5),  ref_out(t + 1, 5),  $sformatf("5 taps, t=%0d", t + 1));
        check(int'(y11), ref_out(t + 1, 11), $sformatf("11 taps, t=%0d", t + 1));
        check(int'(y25), ref_out(t + 1, 25), $sformatf("25 taps, t=%0d", t + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
