// tb_tmax_interp: self-checking test of the lookup-table interpolation.
//
// Drives random (i0, d0 > 0, d1 <= 0, amplitude) one per clock, including
// small denominators (exact range of the table), large ones (truncated
// operands) and the corner d1 = 0 (fraction 1). Checks, one cycle later:
// t0 against round(64 * d0 / (d0 - d1)) exactly where d0 - d1 < 64, and
// within 2/64 of the real quotient elsewhere; i0 and amplitude unchanged;
// out_valid only where in_valid was.
module tb_tmax_interp;
  localparam int D_W = 18, TS_W = 32, AMP_W = 24, FRAC_W = 6;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [TS_W-1:0] in_i0 = '0;
  logic signed [D_W-1:0] in_d0 = '0, in_d1 = '0;
  logic [AMP_W-1:0] in_amp = '0, out_amp;
  logic out_valid;
  logic [TS_W+FRAC_W-1:0] out_t0;

  int checks = 0, failures = 0;

  tmax_interp dut (.clk, .rst_n, .in_valid, .in_i0, .in_d0, .in_d1, .in_amp,
                   .out_valid, .out_t0, .out_amp);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    longint d0, d1, den, i0, amp, got_frac;
    real q;
    bit v;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      v  = ($urandom_range(4) != 0);
      i0 = longint'($urandom());
      amp = longint'($urandom_range(1 << 20));
      case (n % 4)
        0: begin d0 = $urandom_range(30, 1);    d1 = -longint'($urandom_range(30)); end
        1: begin d0 = $urandom_range(60000, 1); d1 = -longint'($urandom_range(60000)); end
        2: begin d0 = $urandom_range(2000, 1);  d1 = 0; end
        default: begin d0 = $urandom_range(130000, 1); d1 = -longint'($urandom_range(130000)); end
      endcase
      in_valid <= v;
      in_i0    <= TS_W'(i0);
      in_d0    <= D_W'(d0);
      in_d1    <= D_W'(d1);
      in_amp   <= AMP_W'(amp);
      @(posedge clk);
      #1;
      check(out_valid == v, "out_valid follows in_valid by one cycle");
      if (v) begin
        den = d0 - d1;
        got_frac = longint'(out_t0) - (i0 <<< FRAC_W);
        q = 64.0 * real'(d0) / real'(den);
        check(longint'(out_amp) == amp, "amplitude passed");
        check(got_frac >= 0 && got_frac <= 64, $sformatf("fraction range %0d", got_frac));
        if (den < 64)
          check(got_frac == (d0 * 64 + den / 2) / den,
                $sformatf("exact d0=%0d d1=%0d got %0d", d0, d1, got_frac));
        else
          check(real'(got_frac) - q <= 2.0 && q - real'(got_frac) <= 2.0,
                $sformatf("approx d0=%0d d1=%0d got %0d want %f", d0, d1, got_frac, q));
      end
    end
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
