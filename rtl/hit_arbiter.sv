// hit_arbiter: merges the record streams of all channels into one.
//
// Round-robin arbitration over N valid/ready inputs: the search for a
// requesting channel starts one past the channel served last, so every
// channel with data is served within N transfers. The selected record is
// passed combinationally to the output; the arbiter only switches after a
// transfer (out_valid && out_ready), so the output stays stable while the
// sink stalls. One record per clock at full throughput.
//
// The source design names an arbiter between the per-channel package
// builders and the UDP readout; round robin and the handshake are this
// implementation's choices.
module hit_arbiter
  import apfel_pkg::*;
#(
  parameter int N = apfel_pkg::N_CH
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  in_valid,
  output logic [N-1:0]  in_ready,
  input  hit_t          in_data [N],
  output logic          out_valid,
  input  logic          out_ready,
  output hit_t          out
);

  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;     // channel served last
  logic [IW-1:0] sel;

  // requests twice over, so that "one past last, wrapping" is a plain index
  logic [2*N-1:0] req2;
  assign req2 = {in_valid, in_valid};

  always_comb begin
    sel       = last;
    out_valid = 1'b0;
    for (int k = N; k >= 1; k--) begin
      if (req2[int'(last) + k]) begin
        sel       = (int'(last) + k >= N) ? IW'(int'(last) + k - N) : IW'(int'(last) + k);
        out_valid = 1'b1;
      end
    end
    out      = in_data[sel];
    in_ready = '0;
    in_ready[sel] = out_ready && out_valid;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                       last <= IW'(N-1);
    else if (out_valid && out_ready)  last <= sel;
  end

endmodule
