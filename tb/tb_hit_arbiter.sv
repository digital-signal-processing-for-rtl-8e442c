// tb_hit_arbiter: self-checking test of the round-robin record arbiter.
//
// 32 sources, each a queue of records tagged with its channel and a serial
// number, present their oldest record while they hold any. The sink is ready
// at random. Checks every cycle: out_valid is high exactly when some source
// is valid; the granted channel is the first requesting one after the channel
// served last (cyclically), as a model computes it; the output equals that
// source's oldest record; at most one in_ready is high and only for it; while
// the sink stalls the output holds still. At the end every record must have
// come out once, in order per channel.
module tb_hit_arbiter;
  import apfel_pkg::*;
  localparam int N = 32;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_ready;
  hit_t in_data [N];
  logic out_valid, out_ready = 0;
  hit_t out;

  int checks = 0, failures = 0, served = 0, total = 0, contended = 0;
  hit_t q [N][$];
  int last_model = N - 1;

  hit_arbiter #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                            .out_valid, .out_ready, .out);

  always #5 clk = ~clk;

  // drive every source from its queue (called whenever a queue changes)
  task automatic refresh();
    for (int c = 0; c < N; c++) begin
      in_valid[c] = (q[c].size() != 0);
      in_data[c]  = (q[c].size() != 0) ? q[c][0] : '0;
    end
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    hit_t h, held;
    bit r, was_stalled;
    int exp_ch, nvalid;
    for (int c = 0; c < N; c++)
      for (int k = 0; k < int'($urandom_range(40, 5)); k++) begin
        h.channel = CH_W'(c);
        h.t0 = (TS_W+FRAC_W)'(k);
        h.amplitude = AMP_W'($urandom());
        q[c].push_back(h);
        total++;
      end
    refresh();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    was_stalled = 0;
    for (int n = 0; n < 4000 && served < total; n++) begin
      r = ($urandom_range(3) != 0);
      out_ready <= r;
      #1;
      exp_ch = -1;
      nvalid = 0;
      for (int k = 1; k <= N; k++)
        if (exp_ch < 0 && in_valid[(last_model + k) % N]) exp_ch = (last_model + k) % N;
      for (int c = 0; c < N; c++) nvalid += int'(in_valid[c]);
      if (nvalid > 1) contended++;
      check(out_valid == (exp_ch >= 0), "out_valid");
      if (exp_ch >= 0) begin
        check(int'(out.channel) == exp_ch, $sformatf("grant %0d, expected %0d", out.channel, exp_ch));
        check(out == q[exp_ch][0], "record is the source's oldest");
        check(in_ready == (r ? (N'(1) << exp_ch) : '0), "in_ready one-hot to the granted source");
        if (was_stalled) check(out == held, "output held during stall");
      end
      was_stalled = out_valid && !r;
      held = out;
      @(posedge clk);
      #1;
      if (exp_ch >= 0 && r) begin
        void'(q[exp_ch].pop_front());
        last_model = exp_ch;
        served++;
        refresh();
      end
    end
    check(served == total, $sformatf("served %0d of %0d", served, total));
    check(contended > 0, "contention occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
