// tmax: Time Measurement and Amplitude eXtraction on the smoothed trace.
//
// The trace T is first turned so that the leading edge of a pulse rises
// (APFEL pulses fall, so NEG_PULSE = 1 negates the input). Then, per sample:
//   D[i]   = T[i+R] - T[i]                     (lagged derivative)
//   S      = running sum of D over the current run of D > 0; S restarts at 0
//            whenever D <= 0, i.e. each term is D - Theta(-D)*D
// S rises only on the leading edge, ignores the trailing edge and cannot
// overshoot; because it sums differences, the baseline cancels. When D
// changes from positive (sample i0) to zero or negative (sample i1 = i0+1)
// the trace is at its maximum: S is then the pulse amplitude (about R times
// the pulse height once the edge is longer than R), and D[i0], D[i1] locate
// the maximum between i0 and i1 for the interpolator (tmax_interp).
// A hit is reported when S at the sign change is at least `threshold`.
//
// Interface: one smoothed sample `y` per clock with its sample index
// `y_index`. `tmax_out` is S as a stream (the TMAX filter output). On a hit,
// `hit_valid` pulses for one cycle with `hit_amp` = S, `hit_i0` = i0 (index of
// the earlier sample T[i] of D[i0]), `hit_d0` = D[i0] > 0, `hit_d1` = D[i1] <= 0.
// Timing: D is registered at the end of the cycle that presents y; hit_valid
// is high in the second cycle after the one that presented the sample which
// makes D[i1]. A new run can start on the very next sample, so
// there is no dead time beyond the pulse itself.
//
// From the source design: the lagged derivative, the positive-part sum and the
// sign-change criterion. This implementation's choices: the lag R = 8, the
// polarity switch, the threshold test, widths and saturation of S.
module tmax #(
  parameter int IN_W      = apfel_pkg::Y_W,
  parameter int R         = 8,
  parameter int AMP_W     = apfel_pkg::AMP_W,
  parameter int TS_W      = apfel_pkg::TS_W,
  parameter bit NEG_PULSE = 1'b1,
  localparam int D_W      = IN_W + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  y,
  input  logic [TS_W-1:0]         y_index,
  input  logic [AMP_W-1:0]        threshold,
  output logic [AMP_W-1:0]        tmax_out,
  output logic                    hit_valid,
  output logic [AMP_W-1:0]        hit_amp,
  output logic [TS_W-1:0]         hit_i0,
  output logic signed [D_W-1:0]   hit_d0,
  output logic signed [D_W-1:0]   hit_d1
);

  localparam logic [AMP_W-1:0] AMP_MAX = '1;

  // Polarity-corrected trace and its last R values
  logic signed [D_W-1:0] v;
  logic signed [D_W-1:0] hist [R];
  assign v = NEG_PULSE ? -D_W'(y) : D_W'(y);

  // Derivative D[i] = T[i+R] - T[i], with i = index(y) - R
  logic signed [D_W-1:0] d_q, d_prev;
  logic [TS_W-1:0]       i_q, i_prev;
  logic                  primed;     // R samples seen since reset
  logic [$clog2(R+1)-1:0] fill;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < R; k++) hist[k] <= '0;
      fill   <= '0;
      primed <= 1'b0;
      d_q    <= '0;
      i_q    <= '0;
    end else begin
      hist[0] <= v;
      for (int k = 1; k < R; k++) hist[k] <= hist[k-1];
      if (fill != ($clog2(R+1))'(R)) fill <= fill + 1'b1;
      primed <= (fill == ($clog2(R+1))'(R));
      d_q    <= (fill == ($clog2(R+1))'(R)) ? v - hist[R-1] : '0;
      i_q    <= y_index - TS_W'(R);
    end
  end

  // Positive-part running sum and sign-change detection
  logic [AMP_W-1:0] s_q;
  logic [AMP_W:0]   s_next;

  always_comb begin
    s_next = {1'b0, s_q} + (AMP_W+1)'($unsigned(d_q));
    if (s_next[AMP_W]) s_next = {1'b0, AMP_MAX};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_q       <= '0;
      d_prev    <= '0;
      i_prev    <= '0;
      hit_valid <= 1'b0;
      hit_amp   <= '0;
      hit_i0    <= '0;
      hit_d0    <= '0;
      hit_d1    <= '0;
    end else begin
      d_prev    <= d_q;
      i_prev    <= i_q;
      s_q       <= (primed && d_q > 0) ? s_next[AMP_W-1:0] : '0;
      hit_valid <= 1'b0;
      if (primed && d_prev > 0 && d_q <= 0) begin
        hit_valid <= (s_q >= threshold);
        hit_amp   <= s_q;
        hit_i0    <= i_prev;
        hit_d0    <= d_prev;
        hit_d1    <= d_q;
      end
    end
  end

  assign tmax_out = s_q;

endmodule
