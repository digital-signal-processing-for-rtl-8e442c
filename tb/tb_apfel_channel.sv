// tb_apfel_channel: one channel, ADC trace in, hit records out.
//
// Builds a 4000-sample trace of APFEL-like negative pulses (heights 15 to
// 1500 counts) on a 15300-count baseline with +-3 counts of noise, feeds it
// at one sample per clock, reads the records with a randomly stalling sink
// and compares them, in order, with the reference model (direct-form FIR,
// TMAX equations, real-valued interpolation): amplitude and channel exactly,
// time within 3/64 sample. Also checks that pulses below threshold were
// present and produced no record, and that no record was dropped.
module tb_apfel_channel;
  import apfel_pkg::*;
  import apfel_ref_pkg::*;

  localparam int NS  = 4000;
  localparam int THR = 300;
  localparam logic [CH_W-1:0] CH = 6'd5;

  logic clk = 0, rst_n = 0;
  logic [ADC_W-1:0] adc_sample = '0;
  logic [TS_W-1:0]  timestamp = '0;
  logic [AMP_W-1:0] tmax_out;
  logic out_valid, out_ready = 0, overflow;
  hit_t out;

  int checks = 0, failures = 0;
  int adc[$];
  ref_hit_t hits[$], all[$];
  hit_t got[$];

  apfel_channel #(.CHANNEL(CH)) dut (
    .clk, .rst_n, .adc_sample, .timestamp, .threshold(AMP_W'(THR)),
    .tmax_out, .out_valid, .out_ready, .out, .overflow
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
    int next_pulse, height;
    int sub_thr;
    // trace
    next_pulse = 100;
    height = 15;
    for (int p = 0; p < NS; p++) adc.push_back(15300 + int'($urandom_range(6)) - 3);
    while (next_pulse < NS - 200) begin
      for (int p = next_pulse; p < NS; p++)
        adc[p] += pulse_shape(p - next_pulse, height, 15, 30.0);
      height = (height < 200) ? height * 2 : int'($urandom_range(1500, 40));
      next_pulse += int'($urandom_range(220, 120));
    end
    run_chain(adc, 8, THR, hits, all);
    sub_thr = all.size() - hits.size();

    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < NS + 200; p++) begin
      adc_sample <= ADC_W'((p < NS) ? adc[p] : 15300);
      timestamp  <= TS_W'(p);
      out_ready  <= ($urandom_range(3) != 0);
      #1;
      if (out_valid && out_ready) got.push_back(out);
      @(posedge clk);
    end
    out_ready <= 1;
    repeat (40) begin
      #1;
      if (out_valid && out_ready) got.push_back(out);
      @(posedge clk);
    end

    check(hits.size() > 10, "reference found enough hits");
    check(sub_thr > 0, "sub-threshold runs occurred");
    check(got.size() == hits.size(), $sformatf("record count %0d vs %0d", got.size(), hits.size()));
    check(!overflow, "no overflow");
    for (int k = 0; k < got.size() && k < hits.size(); k++) begin
      real t;
      t = real'(got[k].t0) / real'(2**FRAC_W);
      check(got[k].channel == CH, "channel field");
      check(longint'(got[k].amplitude) == hits[k].amp,
            $sformatf("hit %0d amp %0d vs %0d", k, got[k].amplitude, hits[k].amp));
      check((t - hits[k].t0) <= 3.0/64 && (hits[k].t0 - t) <= 3.0/64,
            $sformatf("hit %0d t0 %f vs %f", k, t, hits[k].t0));
    end
    $display("hits=%0d sub_threshold=%0d", hits.size(), sub_thr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
