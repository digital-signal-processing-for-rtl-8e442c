// tb_apfel_top: end-to-end test of the 32-channel feature-extraction chain,
// at the design's default parameters.
//
// Phase 1 (4000 samples): every channel gets its own trace of APFEL-like
// negative pulses (15 to 1500 counts, random spacing) on a noisy 15300-count
// baseline; the readout sink is ready only half the time. Every record
// leaving the arbiter is matched, per channel and in order, against a
// reference model (direct-form FIR, TMAX equations, real-valued
// interpolation): amplitude exactly, time within 3/64 sample; record counts
// must agree and no channel may overflow.
// Phase 2: after a new reset, channel 3 alone gets a dense pulse train while
// the sink is stalled; its buffer must fill, overflow[3] must rise (no other
// flag), and once the sink opens exactly the first FIFO_DEPTH hits must come
// out, matching the model.
// Mechanisms counted, each must occur: hits, sub-threshold pulses dropped by
// the threshold, several channels contending at the arbiter, sink stalls,
// interpolation fractions away from 0 and 1, a buffer overflow, and the
// start-up hold-off releasing TMAX exactly when the filter has settled.
module tb_apfel_top;
  import apfel_pkg::*;
  import apfel_ref_pkg::*;

  localparam int NS  = 4000;
  localparam int THR = 300;
  localparam int DEPTH = 16;

  logic clk = 0, rst_n = 0;
  logic [ADC_W-1:0] adc_data [N_CH];
  logic [TS_W-1:0]  timestamp;
  logic hit_valid, hit_ready = 0;
  hit_t hit;
  logic [N_CH-1:0] overflow;

  int checks = 0, failures = 0;
  int n_hits = 0, n_sub = 0, n_contend = 0, n_stall = 0, n_frac = 0, n_ovf = 0, n_holdoff = 0;

  int trace [N_CH][$];
  ref_hit_t expq [N_CH][$];
  hit_t got [N_CH][$];

  apfel_top dut (.clk, .rst_n, .adc_data, .threshold(AMP_W'(THR)), .timestamp,
                 .hit_valid, .hit_ready, .hit, .overflow);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", what);
    end
  endtask

  // builds channel c's trace; dense = short spacing, large pulses
  task automatic make_trace(int c, bit quiet, bit dense);
    int next_pulse, height;
    trace[c].delete();
    for (int p = 0; p < NS; p++) trace[c].push_back(15300 + int'($urandom_range(6)) - 3);
    if (quiet) return;
    next_pulse = 60 + int'($urandom_range(80));
    height = 15;
    while (next_pulse < NS - 200) begin
      for (int p = next_pulse; p < NS; p++)
        trace[c][p] += pulse_shape(p - next_pulse, height, 15, 30.0);
      if (dense) height = 1000;
      else height = (height < 200) ? height * 2 : int'($urandom_range(1500, 40));
      next_pulse += dense ? 90 : int'($urandom_range(240, 110));
    end
  endtask

  task automatic model_all();
    ref_hit_t h[$], a[$];
    for (int c = 0; c < N_CH; c++) begin
      run_chain(trace[c], 8, THR, h, a);
      expq[c] = h;
      n_sub += a.size() - h.size();
    end
  endtask

  // runs the traces through the design; `ready_pct` = sink readiness in %
  task automatic run(int ready_pct, int stall_until);
    bit r;
    for (int c = 0; c < N_CH; c++) got[c].delete();
    rst_n <= 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < NS + 600; p++) begin
      int nv;
      for (int c = 0; c < N_CH; c++) adc_data[c] <= ADC_W'((p < NS) ? trace[c][p] : 15300);
      r = (p >= stall_until) && (int'($urandom_range(99)) < ready_pct);
      hit_ready <= r;
      #1;
      check(timestamp == TS_W'(p), "timestamp counts samples from reset");
      // start-up hold-off: TMAX leaves reset when the filter has settled
      if (p == FIR_LAT + N_TAPS - 1) check(!dut.g_ch[0].u_ch.settled, "TMAX held before settling");
      if (p == FIR_LAT + N_TAPS) begin
        check(dut.g_ch[0].u_ch.settled, "TMAX released after settling");
        if (dut.g_ch[0].u_ch.settled) n_holdoff++;
      end
      nv = 0;
      for (int c = 0; c < N_CH; c++) nv += int'(dut.ch_valid[c]);
      if (nv > 1) n_contend++;
      if (hit_valid && !r) n_stall++;
      if (hit_valid && r) got[hit.channel].push_back(hit);
      @(posedge clk);
    end
  endtask

  task automatic compare(int c, int limit);
    int n;
    n = (limit < expq[c].size()) ? limit : expq[c].size();
    check(got[c].size() == n, $sformatf("ch %0d: %0d records, expected %0d", c, got[c].size(), n));
    for (int k = 0; k < got[c].size() && k < n; k++) begin
      real t, f;
      t = real'(got[c][k].t0) / real'(2**FRAC_W);
      f = expq[c][k].t0 - real'(expq[c][k].i0);
      if (f > 0.1 && f < 0.9) n_frac++;
      check(longint'(got[c][k].amplitude) == expq[c][k].amp,
            $sformatf("ch %0d hit %0d amp %0d vs %0d", c, k, got[c][k].amplitude, expq[c][k].amp));
      check((t - expq[c][k].t0) <= 3.0/64 && (expq[c][k].t0 - t) <= 3.0/64,
            $sformatf("ch %0d hit %0d t0 %f vs %f", c, k, t, expq[c][k].t0));
      n_hits++;
    end
  endtask

  initial begin
    for (int c = 0; c < N_CH; c++) adc_data[c] = '0;
    // phase 1
    for (int c = 0; c < N_CH; c++) make_trace(c, 0, 0);
    model_all();
    run(50, 0);
    for (int c = 0; c < N_CH; c++) compare(c, 1 << 30);
    check(overflow == '0, "no overflow in phase 1");
    // phase 2
    for (int c = 0; c < N_CH; c++) make_trace(c, c != 3, 1);
    model_all();
    run(100, NS);
    check(expq[3].size() > DEPTH, "dense train exceeds the buffer");
    check(overflow == N_CH'(1 << 3), $sformatf("overflow flags %h", overflow));
    if (overflow[3]) n_ovf++;
    for (int c = 0; c < N_CH; c++) compare(c, DEPTH);

    $display("hits=%0d sub_threshold=%0d contention_cycles=%0d stall_cycles=%0d interior_fractions=%0d overflows=%0d holdoffs=%0d",
             n_hits, n_sub, n_contend, n_stall, n_frac, n_ovf, n_holdoff);
    check(n_hits > 100, "hits");
    check(n_sub > 0, "threshold suppression");
    check(n_contend > 0, "arbiter contention");
    check(n_stall > 0, "sink stall");
    check(n_frac > 0, "sub-sample interpolation");
    check(n_ovf > 0, "buffer overflow");
    check(n_holdoff > 0, "start-up hold-off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * (NS + 700)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
