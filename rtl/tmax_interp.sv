// tmax_interp: sub-sample time of a hit by linear interpolation.
//
// The maximum of the pulse lies where the derivative crosses zero, between
// sample i0 (D[i0] = d0 > 0) and sample i1 = i0 + 1 (D[i1] = d1 <= 0):
//   T0 = i0 + d0 / (d0 - d1)
// The quotient lies in (0, 1]. It is read from a lookup table rather than
// computed by a divider: the denominator den = d0 - d1 is shifted so that its
// leading one sits at bit Q-1, the numerator is shifted by the same amount,
// and the table, indexed by the Q-bit numerator and the Q-1 bits of the
// denominator below its leading one, holds round(2^FRAC_W * num / den). The
// table has 2^(2Q-1) entries of FRAC_W+1 bits and is computed at elaboration.
// Truncating both operands to Q bits keeps the error within 2/64 sample
// for Q = 7 (checked over random operands in the testbench).
//
// Interface: `in_valid` with i0, d0, d1 and a pass-through amplitude; one
// cycle later `out_valid` with t0 = i0 * 2^FRAC_W + fraction (a fixed-point
// sample index with FRAC_W fractional bits) and the amplitude. Accepts one
// hit per clock.
//
// From the source design: the interpolation formula and the use of a lookup
// table for it. This implementation's choices: the normalisation scheme,
// Q = 7 (a table of 8192 entries) and FRAC_W = 6 (1/64 sample, about 0.2 ns
// at 80 MS/s).
module tmax_interp #(
  parameter int D_W    = apfel_pkg::Y_W + 2,
  parameter int TS_W   = apfel_pkg::TS_W,
  parameter int AMP_W  = apfel_pkg::AMP_W,
  parameter int FRAC_W = apfel_pkg::FRAC_W,
  parameter int Q      = 7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [TS_W-1:0]          in_i0,
  input  logic signed [D_W-1:0]    in_d0,
  input  logic signed [D_W-1:0]    in_d1,
  input  logic [AMP_W-1:0]         in_amp,
  output logic                     out_valid,
  output logic [TS_W+FRAC_W-1:0]   out_t0,
  output logic [AMP_W-1:0]         out_amp
);

  localparam int DEN_W = D_W + 1;
  localparam int LUT_N = 2**(2*Q-1);

  typedef logic [LUT_N-1:0][FRAC_W:0] lut_t;

  function automatic lut_t build_lut();
    lut_t l;
    for (int idx = 0; idx < LUT_N; idx++) begin
      int num, den;
      num = idx >> (Q-1);
      den = (idx & ((1 << (Q-1)) - 1)) | (1 << (Q-1));
      if (num > den) num = den;          // cannot occur, keeps entries in range
      l[idx] = (FRAC_W+1)'(((num << FRAC_W) + den / 2) / den);
    end
    return l;
  endfunction

  localparam lut_t LUT = build_lut();

  // Normalisation of den = d0 - d1 > 0 and num = d0 (0 < num <= den)
  logic [DEN_W-1:0] den, num;
  logic [Q-1:0]     den_n, num_n;
  int               lead;

  always_comb begin
    den  = DEN_W'($unsigned(DEN_W'(in_d0) - DEN_W'(in_d1)));
    num  = DEN_W'($unsigned(in_d0));
    lead = 0;
    for (int b = 0; b < DEN_W; b++) if (den[b]) lead = b;
    if (lead >= Q-1) begin
      den_n = Q'(den >> (lead - (Q-1)));
      num_n = Q'(num >> (lead - (Q-1)));
    end else begin
      den_n = Q'(den << ((Q-1) - lead));
      num_n = Q'(num << ((Q-1) - lead));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_t0    <= '0;
      out_amp   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_t0  <= {in_i0, {FRAC_W{1'b0}}} + (TS_W+FRAC_W)'(LUT[{num_n, den_n[Q-2:0]}]);
        out_amp <= in_amp;
      end
    end
  end

endmodule
