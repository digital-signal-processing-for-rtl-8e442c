// tb_rate_scan: all 32 channels at pulse rates of 100 kHz and 400 kHz.
//
// At 80 MS/s, 100 kHz is one pulse per 800 samples and 400 kHz one per 200
// samples. Each channel gets pulses at the chosen mean rate (spacing
// uniformly jittered by +-25 %, so neighbouring pulses sometimes overlap at
// 400 kHz) with heights drawn from three levels (500, 1100 and 2100 counts,
// standing in for three beam energies) on a noisy baseline. The readout sink
// is always ready. Checks: every record against the reference chain
// (amplitude exactly, time within 3/64 sample), no channel overflows, and
// at least 90 % of the injected pulses come out as records.
module tb_rate_scan;
  import apfel_pkg::*;
  import apfel_ref_pkg::*;

  localparam int NS  = 8000;
  localparam int THR = 300;

  logic clk = 0, rst_n = 0;
  logic [ADC_W-1:0] adc_data [N_CH];
  logic [TS_W-1:0]  timestamp;
  logic hit_valid, hit_ready = 1;
  hit_t hit;
  logic [N_CH-1:0] overflow;

  int checks = 0, failures = 0;
  int trace [N_CH][$];
  ref_hit_t expq [N_CH][$];
  hit_t got [N_CH][$];
  int n_pulses;

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

  task automatic scan(int spacing);
    ref_hit_t h[$], a[$];
    int n_rec, next_pulse, height;
    n_pulses = 0;
    n_rec = 0;
    for (int c = 0; c < N_CH; c++) begin
      trace[c].delete();
      got[c].delete();
      for (int p = 0; p < NS; p++) trace[c].push_back(15300 + int'($urandom_range(6)) - 3);
      next_pulse = 50 + int'($urandom_range(spacing));
      while (next_pulse < NS - 200) begin
        case ($urandom_range(2))
          0: height = 500;
          1: height = 1100;
          default: height = 2100;
        endcase
        for (int p = next_pulse; p < NS; p++)
          trace[c][p] += pulse_shape(p - next_pulse, height, 15, 30.0);
        n_pulses++;
        next_pulse += spacing * 3 / 4 + int'($urandom_range(spacing / 2));
      end
      run_chain(trace[c], 8, THR, h, a);
      expq[c] = h;
    end
    rst_n <= 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < NS + 300; p++) begin
      for (int c = 0; c < N_CH; c++) adc_data[c] <= ADC_W'((p < NS) ? trace[c][p] : 15300);
      #1;
      if (hit_valid && hit_ready) got[hit.channel].push_back(hit);
      @(posedge clk);
    end
    check(overflow == '0, $sformatf("no overflow at spacing %0d", spacing));
    for (int c = 0; c < N_CH; c++) begin
      check(got[c].size() == expq[c].size(),
            $sformatf("ch %0d: %0d records, expected %0d", c, got[c].size(), expq[c].size()));
      for (int k = 0; k < got[c].size() && k < expq[c].size(); k++) begin
        real t;
        t = real'(got[c][k].t0) / real'(2**FRAC_W);
        check(longint'(got[c][k].amplitude) == expq[c][k].amp, $sformatf("ch %0d hit %0d amplitude", c, k));
        check((t - expq[c][k].t0) <= 3.0/64 && (expq[c][k].t0 - t) <= 3.0/64,
              $sformatf("ch %0d hit %0d time", c, k));
      end
      n_rec += got[c].size();
    end
    $display("spacing %0d samples: %0d pulses, %0d records", spacing, n_pulses, n_rec);
    check(n_rec * 10 >= n_pulses * 9, "at least 90 % of the pulses recorded");
  endtask

  initial begin
    for (int c = 0; c < N_CH; c++) adc_data[c] = '0;
    scan(800);   // 100 kHz per channel
    scan(200);   // 400 kHz per channel
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * (NS + 400)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
