// apfel_channel: the complete processing chain of one ADC channel.
//
//   ADC sample -> fir_da (smoothing) -> tmax (derivative, amplitude, hit)
//              -> tmax_interp (sub-sample time) -> package_builder (record FIFO)
//
// Runs at the ADC sample rate with no stalls: one sample in per clock. The
// shared sample counter `timestamp` (index of the sample now on `adc_sample`)
// is delayed by the FIR latency so that every smoothed value carries the index
// of the ADC sample that entered the filter last; the hit time is therefore in
// ADC sample units, offset by the FIR group delay ((N_TAPS-1)/2 = 12 samples
// for the symmetric default filter) and by the derivative lag convention of
// tmax. The record leaves through a valid/ready stream towards the arbiter.
// `tmax_out` exposes the running TMAX sum for observation.
//
// Start-up: after reset the filter's delay line holds zeros while the ADC sits
// at its baseline, so the filter first sees a large step and rings. TMAX is
// therefore held in reset until SETTLE = FIR_LAT + N_TAPS samples after reset,
// when the filter holds only real samples; TMAX then needs R more samples to
// fill its derivative history. Pulses in the first SETTLE + R samples after
// reset are not detected.
//
// The chain follows the source design's per-channel block diagram; the
// timestamp alignment and the start-up hold-off are this implementation's
// choices.
module apfel_channel
  import apfel_pkg::*;
#(
  parameter logic [CH_W-1:0] CHANNEL    = '0,
  parameter int              R          = 8,
  parameter int              FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADC_W-1:0]  adc_sample,
  input  logic [TS_W-1:0]   timestamp,
  input  logic [AMP_W-1:0]  threshold,
  output logic [AMP_W-1:0]  tmax_out,
  output logic              out_valid,
  input  logic              out_ready,
  output hit_t              out,
  output logic              overflow
);

  localparam int D_W    = Y_W + 2;
  localparam int SETTLE = FIR_LAT + N_TAPS;

  // Start-up hold-off for tmax
  logic [$clog2(SETTLE+1)-1:0] settle_cnt;
  logic                        settled;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      settle_cnt <= '0;
      settled    <= 1'b0;
    end else if (!settled) begin
      settle_cnt <= settle_cnt + 1'b1;
      settled    <= (settle_cnt == ($clog2(SETTLE+1))'(SETTLE - 1));
    end
  end

  logic signed [Y_W-1:0] y;
  logic                  h_valid;
  logic [AMP_W-1:0]      h_amp;
  logic [TS_W-1:0]       h_i0;
  logic signed [D_W-1:0] h_d0, h_d1;
  logic                  t_valid;
  logic [TS_W+FRAC_W-1:0] t_t0;
  logic [AMP_W-1:0]      t_amp;

  fir_da u_fir (
    .clk, .rst_n,
    .in_sample  (adc_sample),
    .out_sample (y)
  );

  tmax #(.IN_W(Y_W), .R(R)) u_tmax (
    .clk,
    .rst_n      (rst_n && settled),
    .y          (y),
    .y_index    (timestamp - TS_W'(FIR_LAT)),
    .threshold  (threshold),
    .tmax_out   (tmax_out),
    .hit_valid  (h_valid),
    .hit_amp    (h_amp),
    .hit_i0     (h_i0),
    .hit_d0     (h_d0),
    .hit_d1     (h_d1)
  );

  tmax_interp #(.D_W(D_W)) u_interp (
    .clk, .rst_n,
    .in_valid   (h_valid),
    .in_i0      (h_i0),
    .in_d0      (h_d0),
    .in_d1      (h_d1),
    .in_amp     (h_amp),
    .out_valid  (t_valid),
    .out_t0     (t_t0),
    .out_amp    (t_amp)
  );

  package_builder #(.DEPTH(FIFO_DEPTH), .CHANNEL(CHANNEL)) u_pkg (
    .clk, .rst_n,
    .in_valid   (t_valid),
    .in_t0      (t_t0),
    .in_amp     (t_amp),
    .out_valid  (out_valid),
    .out_ready  (out_ready),
    .out        (out),
    .overflow   (overflow)
  );

endmodule
