// tb_tmax: self-checking test of the TMAX amplitude and sign-change logic.
//
// Feeds a smoothed-looking trace straight into tmax: negative pulses of
// several heights (some below threshold) on a constant baseline with small
// noise. A model written here from the equations (D[i] = T[i+R] - T[i],
// positive-part running sum, hit at the change from D > 0 to D <= 0 if the
// sum reaches the threshold) gives the expected hits; each must appear with
// the same amplitude, i0, D[i0], D[i1], two cycles after the cycle in which
// the sample that made D[i1] was presented. The TMAX output stream must equal the model's running sum
// and never go negative or overshoot after the leading edge.
module tb_tmax;
  localparam int IN_W = 16, R = 8, AMP_W = 24, TS_W = 32, D_W = IN_W + 2;
  localparam int NS = 3000, THR = 500;

  logic clk = 0, rst_n = 0;
  logic signed [IN_W-1:0] y = '0;
  logic [TS_W-1:0] y_index = '0;
  logic [AMP_W-1:0] tmax_out, hit_amp;
  logic hit_valid;
  logic [TS_W-1:0] hit_i0;
  logic signed [D_W-1:0] hit_d0, hit_d1;

  int checks = 0, failures = 0;
  int yv [NS];
  longint dmod [NS], smod [NS];
  int exp_hit_cycle [NS];   // 1 where a hit must show, by cycle
  int n_exp = 0, n_got = 0, n_sub = 0;

  tmax #(.IN_W(IN_W), .R(R)) dut (
    .clk, .rst_n, .y, .y_index, .threshold(AMP_W'(THR)), .tmax_out,
    .hit_valid, .hit_amp, .hit_i0, .hit_d0, .hit_d1
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int height, start;
    longint s, d;
    // trace: baseline 2000, noise +-2, pulses of growing then random height
    for (int p = 0; p < NS; p++) yv[p] = 2000 + int'($urandom_range(4)) - 2;
    height = 10;
    start = 50;
    while (start < NS - 150) begin
      for (int p = start; p < NS; p++) begin
        int dt;
        dt = p - start;
        if (dt < 12) yv[p] -= (height * dt) / 12;
        else         yv[p] -= int'(real'(height) * $exp(-real'(dt - 12) / 25.0));
      end
      height = (height < 300) ? height * 2 : int'($urandom_range(4000, 30));
      start += int'($urandom_range(160, 100));
    end
    // model: sample p is presented in cycle p, with index p
    s = 0;
    for (int p = 0; p < NS; p++) begin
      exp_hit_cycle[p] = 0;
      dmod[p] = 0;
    end
    for (int p = R; p < NS; p++) begin
      d = longint'(2000 - yv[p]) - longint'(2000 - yv[p-R]);   // polarity turned
      dmod[p] = d;
      if (p > R && dmod[p-1] > 0 && d <= 0) begin
        if (s >= THR) begin
          exp_hit_cycle[p] = 1;
          n_exp++;
        end else n_sub++;
      end
      s = (d > 0) ? s + d : 0;
      smod[p] = s;
    end

    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < NS + 4; c++) begin
      y       <= IN_W'((c < NS) ? yv[c] : 2000);
      y_index <= TS_W'(c);
      @(posedge clk);
      #1;
      // after the edge ending cycle c: d_q holds D of sample c; s_q, hit
      // registers reflect samples up to c-1
      if (c >= R + 1 && c - 1 < NS)
        check(longint'(tmax_out) == smod[c-1], $sformatf("tmax_out at %0d: %0d vs %0d", c, tmax_out, smod[c-1]));
      // a hit for the sign change at sample p (presented in cycle p) is
      // visible in cycle p+2, i.e. after the edge ending cycle p+1
      if (c >= 1 && c - 1 < NS) begin
        if (exp_hit_cycle[c-1] == 1) begin
          int p;
          p = c - 1;
          check(hit_valid, $sformatf("hit expected for sample %0d", p));
          if (hit_valid) begin
            n_got++;
            check(longint'(hit_amp) == smod[p-1], "amplitude");
            check(hit_i0 == TS_W'(p - 1 - R), $sformatf("i0 %0d vs %0d", hit_i0, p - 1 - R));
            check(longint'(hit_d0) == dmod[p-1] && longint'(hit_d1) == dmod[p], "d0/d1");
          end
        end else begin
          check(!hit_valid, $sformatf("spurious hit at cycle %0d", c));
        end
      end
    end
    check(n_exp > 10 && n_got == n_exp, $sformatf("hits %0d of %0d", n_got, n_exp));
    check(n_sub > 0, "sub-threshold runs present");
    $display("hits=%0d sub_threshold=%0d", n_got, n_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
