// fir_da: FIR smoothing filter built with distributed arithmetic.
//
// Computes out[n] = sum_k h_k * in[n-k] for N_TAPS taps, one result per clock,
// without multipliers. The unsigned ADC sample x_k is split into bit planes,
// x_k = sum_b x_k[b] 2^b, so out = sum_b 2^b * (sum_k h_k x_k[b]). The inner
// sum is read from lookup tables (da_lut): the taps are cut into groups of
// N_LUT, each group has one table addressed by one bit of each of its N_LUT
// samples, and one copy of the table per bit plane makes the filter fully
// parallel. A pre-adder sums the group tables per bit plane; a shift-adder
// then weights the bit planes by 2^b and sums them. The result is rounded
// back by COEF_FRAC bits (coefficients are Q1.17) and saturated to OUT_W.
//
// Pipeline (all registered, no stalls): delay line -> table read -> pre-adder
// -> shift-adder/round. The output in a cycle belongs to the input sample
// presented apfel_pkg::FIR_LAT (= 4) cycles earlier, i.e. out(t) = sum_k h_k in(t-4-k).
// Reset clears the delay line and all pipeline registers, so the output is 0
// until the first sample has passed through.
//
// From the source design: 25 taps, 14-bit ADC samples, 18-bit coefficients,
// 5-input tables, the table / pre-adder / shift-adder structure. This
// implementation's choices: the coefficient values (see apfel_pkg), the
// pipeline cut, output rounding, width and saturation.
module fir_da #(
  parameter int N_TAPS    = apfel_pkg::N_TAPS,
  parameter int N_LUT     = apfel_pkg::N_LUT,
  parameter int IN_W      = apfel_pkg::ADC_W,
  parameter int COEF_W    = apfel_pkg::COEF_W,
  parameter int COEF_FRAC = apfel_pkg::COEF_FRAC,
  parameter int OUT_W     = apfel_pkg::Y_W,
  parameter logic [N_TAPS-1:0][COEF_W-1:0] COEF = apfel_pkg::FIR_COEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [IN_W-1:0]         in_sample,   // unsigned ADC sample
  output logic signed [OUT_W-1:0] out_sample   // smoothed sample
);

  localparam int N_GRP   = (N_TAPS + N_LUT - 1) / N_LUT;
  localparam int LUT_W   = COEF_W + $clog2(N_LUT) + 1;
  localparam int PRE_W   = LUT_W + $clog2(N_GRP) + 1;
  localparam int ACC_W   = PRE_W + IN_W + 1;

  // Delay line: x[k] = in[n-k]
  logic [IN_W-1:0] x [N_TAPS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N_TAPS; k++) x[k] <= '0;
    end else begin
      x[0] <= in_sample;
      for (int k = 1; k < N_TAPS; k++) x[k] <= x[k-1];
    end
  end

  // Table reads: one table per (bit plane, group)
  logic signed [LUT_W-1:0] lut_out [IN_W][N_GRP];
  logic signed [LUT_W-1:0] lut_q   [IN_W][N_GRP];

  for (genvar g = 0; g < N_GRP; g++) begin : g_grp
    // coefficients of this group; taps beyond N_TAPS weigh zero
    localparam logic [N_LUT-1:0][COEF_W-1:0] HG = grp_coef(g);
    for (genvar b = 0; b < IN_W; b++) begin : g_bit
      logic [N_LUT-1:0] addr;
      always_comb begin
        for (int j = 0; j < N_LUT; j++)
          addr[j] = (g*N_LUT + j < N_TAPS) ? x[(g*N_LUT + j) % N_TAPS][b] : 1'b0;
      end
      da_lut #(.N(N_LUT), .COEF_W(COEF_W), .W(LUT_W), .H(HG)) u_lut (
        .addr (addr),
        .data (lut_out[b][g])
      );
    end
  end

  function automatic logic [N_LUT-1:0][COEF_W-1:0] grp_coef(int g);
    logic [N_LUT-1:0][COEF_W-1:0] h;
    for (int j = 0; j < N_LUT; j++)
      h[j] = (g*N_LUT + j < N_TAPS) ? COEF[(g*N_LUT + j) % N_TAPS] : '0;
    return h;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < IN_W; b++)
        for (int g = 0; g < N_GRP; g++) lut_q[b][g] <= '0;
    end else begin
      lut_q <= lut_out;
    end
  end

  // Pre-adder: sum the group tables of each bit plane
  logic signed [PRE_W-1:0] pre_q [IN_W];

  always_ff @(posedge clk) begin
    for (int b = 0; b < IN_W; b++) begin
      logic signed [PRE_W-1:0] s;
      s = '0;
      for (int g = 0; g < N_GRP; g++) s = s + PRE_W'(lut_q[b][g]);
      pre_q[b] <= rst_n ? s : '0;
    end
  end

  // Shift-adder, rounding and saturation
  localparam logic signed [ACC_W-1:0] OUT_MAX = ACC_W'((2**(OUT_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] OUT_MIN = -ACC_W'(2**(OUT_W-1));

  always_ff @(posedge clk) begin
    logic signed [ACC_W-1:0] acc;
    acc = ACC_W'(1) <<< (COEF_FRAC - 1);          // rounding offset
    for (int b = 0; b < IN_W; b++)
      acc = acc + (ACC_W'(pre_q[b]) <<< b);
    acc = acc >>> COEF_FRAC;
    if (!rst_n)             out_sample <= '0;
    else if (acc > OUT_MAX) out_sample <= OUT_MAX[OUT_W-1:0];
    else if (acc < OUT_MIN) out_sample <= OUT_MIN[OUT_W-1:0];
    else                    out_sample <= acc[OUT_W-1:0];
  end

endmodule
