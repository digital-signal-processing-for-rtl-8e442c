// tb_package_builder: self-checking test of the record FIFO of one channel.
//
// Pushes random hits (sometimes several in a row) while the readout side is
// ready at random, and keeps a model queue with the same drop-on-full rule.
// Every record read must equal the model's oldest one, with the channel
// field set; overflow must rise exactly when a hit met a full FIFO, and the
// FIFO must hold DEPTH records before it drops. A long stall in the middle
// forces the full and overflow cases.
module tb_package_builder;
  import apfel_pkg::*;
  localparam int DEPTH = 16;
  localparam logic [CH_W-1:0] CH = 6'd17;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid, out_ready = 0, overflow;
  logic [TS_W+FRAC_W-1:0] in_t0 = '0;
  logic [AMP_W-1:0] in_amp = '0;
  hit_t out;

  int checks = 0, failures = 0, drops = 0, max_fill = 0;
  hit_t model[$];
  bit ovf_model = 0;

  package_builder #(.DEPTH(DEPTH), .CHANNEL(CH)) dut (
    .clk, .rst_n, .in_valid, .in_t0, .in_amp, .out_valid, .out_ready, .out, .overflow
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
    bit v, r, popped;
    hit_t h;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      v = ($urandom_range(2) == 0);
      r = (n >= 600 && n < 700) ? 1'b0 : ($urandom_range(3) != 0);
      h.channel = CH;
      h.t0 = {$urandom(), 6'($urandom())};
      h.amplitude = AMP_W'($urandom());
      in_valid  <= v;
      in_t0     <= h.t0;
      in_amp    <= h.amplitude;
      out_ready <= r;
      #1;
      // output side, before the edge
      check(out_valid == (model.size() != 0), "out_valid matches occupancy");
      popped = 0;
      if (out_valid && r) begin
        check(out == model[0], "record order and contents");
        popped = 1;
      end
      @(posedge clk);
      if (popped) void'(model.pop_front());
      if (v) begin
        if (model.size() < DEPTH) model.push_back(h);
        else begin
          drops++;
          ovf_model = 1;
        end
      end
      if (model.size() > max_fill) max_fill = model.size();
      #1;
      check(overflow == ovf_model, "overflow flag");
    end
    check(drops > 0 && max_fill == DEPTH, $sformatf("full case reached (drops=%0d fill=%0d)", drops, max_fill));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
