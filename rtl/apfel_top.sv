// apfel_top: triggerless feature-extraction firmware for N_CH APFEL channels.
//
// Every channel digitised by the ADCs (14 bit, 80 MS/s) is smoothed by a
// 25-tap FIR low-pass built with distributed arithmetic, scanned by the TMAX
// algorithm for pulses (amplitude = summed leading-edge derivative, time =
// interpolated maximum) and each hit is packed into a record with its channel
// number. A round-robin arbiter merges the channels' records into a single
// valid/ready stream, which in the full system feeds the UDP packet builder
// and the Gigabit Ethernet link; those, and the ADCs, are outside this RTL,
// so their connections are ports here. No external trigger is used: every
// pulse over `threshold` produces a record.
//
// Interface: `adc_data[c]` is channel c's unsigned sample, one per clock.
// `timestamp` counts samples from reset; hit times are in units of 1/2^FRAC_W
// sample of this counter. `overflow[c]` is a sticky flag for records dropped
// in channel c. Latency from the sample completing a pulse's maximum to its
// record becoming visible: FIR (4) + derivative (1) + sign change (2) +
// interpolation (1) + FIFO (1) cycles.
//
// The chain, the channel count and the filter size follow the source design;
// the record format, buffer depth and arbitration are this implementation's.
module apfel_top #(
  parameter int N_CH       = apfel_pkg::N_CH,
  parameter int R          = 8,
  parameter int FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [apfel_pkg::ADC_W-1:0]  adc_data [N_CH],
  input  logic [apfel_pkg::AMP_W-1:0]  threshold,
  output logic [apfel_pkg::TS_W-1:0]   timestamp,
  output logic              hit_valid,
  input  logic              hit_ready,
  output apfel_pkg::hit_t              hit,
  output logic [N_CH-1:0]   overflow
);

  logic [N_CH-1:0] ch_valid, ch_ready;
  apfel_pkg::hit_t            ch_data [N_CH];

  // Shared sample counter: index of the sample now on adc_data
  always_ff @(posedge clk) begin
    if (!rst_n) timestamp <= '0;
    else        timestamp <= timestamp + 1'b1;
  end

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic [apfel_pkg::AMP_W-1:0] tmax_unused;
    apfel_channel #(.CHANNEL(apfel_pkg::CH_W'(c)), .R(R), .FIFO_DEPTH(FIFO_DEPTH)) u_ch (
      .clk, .rst_n,
      .adc_sample (adc_data[c]),
      .timestamp  (timestamp),
      .threshold  (threshold),
      .tmax_out   (tmax_unused),
      .out_valid  (ch_valid[c]),
      .out_ready  (ch_ready[c]),
      .out        (ch_data[c]),
      .overflow   (overflow[c])
    );
  end

  hit_arbiter #(.N(N_CH)) u_arb (
    .clk, .rst_n,
    .in_valid   (ch_valid),
    .in_ready   (ch_ready),
    .in_data    (ch_data),
    .out_valid  (hit_valid),
    .out_ready  (hit_ready),
    .out        (hit)
  );

endmodule
