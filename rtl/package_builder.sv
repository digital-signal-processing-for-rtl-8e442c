// package_builder: turns the hits of one channel into data records and holds
// them until the readout takes them.
//
// Each hit (interpolated time t0 and TMAX amplitude) is stamped with the
// channel number and written as one apfel_pkg::hit_t record into a FIFO of
// DEPTH entries. The readout side is a valid/ready stream: `out` is the
// oldest record, held stable while `out_valid` is high and `out_ready` low.
// Hits arriving while the FIFO is full are dropped and set the sticky
// `overflow` flag (cleared by reset); the triggerless front end cannot be
// stalled. A hit written in one cycle is visible on `out` in the next.
//
// The source design names this block and a new, triggerless data-package
// concept but gives no record format; the record layout, FIFO depth and the
// drop-on-full policy are this implementation's choices.
module package_builder
  import apfel_pkg::*;
#(
  parameter int                 DEPTH   = 16,
  parameter logic [CH_W-1:0]    CHANNEL = '0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [TS_W+FRAC_W-1:0] in_t0,
  input  logic [AMP_W-1:0]      in_amp,
  output logic                  out_valid,
  input  logic                  out_ready,
  output hit_t                  out,
  output logic                  overflow
);

  localparam int AW = $clog2(DEPTH);

  hit_t            mem [DEPTH];
  logic [AW-1:0]   wr_ptr, rd_ptr;
  logic [AW:0]     count;
  logic            push, pop;

  assign pop  = out_valid && out_ready;
  assign push = in_valid && (count != (AW+1)'(DEPTH) || pop);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (push) begin
        mem[wr_ptr] <= '{channel: CHANNEL, t0: in_t0, amplitude: in_amp};
        wr_ptr      <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      end
      if (pop) rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
      if (in_valid && !push) overflow <= 1'b1;
    end
  end

  assign out_valid = (count != '0);
  assign out       = mem[rd_ptr];

endmodule
