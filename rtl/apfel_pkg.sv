// apfel_pkg: sizes, coefficients and record types shared by the APFEL
// feature-extraction chain (FIR smoothing -> TMAX -> package builder -> arbiter).
//
// Numbers that follow the source design: 14-bit ADC at 80 MS/s, 25 FIR taps,
// 18-bit coefficients, 5-input distributed-arithmetic lookup tables, 32 channels.
// Everything else here (output widths, timestamp width, record layout, the
// coefficient values themselves) is this implementation's choice.
//
// FIR_COEF is an equiripple (Parks-McClellan) low-pass with 25 taps for
// fs = 80 MHz, pass band 0-8 MHz, stop band 16-40 MHz, normalised to unity DC
// gain and rounded to Q1.17 (h_k = round(2^17 * h_k_real), sum = 2^17). Its
// stop-band attenuation is about 48 dB.
package apfel_pkg;

  localparam int ADC_W     = 14;  // ADC resolution
  localparam int N_TAPS    = 25;  // FIR taps
  localparam int N_LUT     = 5;   // inputs per distributed-arithmetic table
  localparam int COEF_W    = 18;  // coefficient precision
  localparam int COEF_FRAC = 17;  // fractional bits of the coefficients
  localparam int Y_W       = 16;  // smoothed sample width (signed)
  localparam int AMP_W     = 24;  // TMAX amplitude width
  localparam int TS_W      = 32;  // sample timestamp width
  localparam int FRAC_W    = 6;   // fractional bits of the interpolated time
  localparam int CH_W      = 6;   // channel number field (up to 64 channels)
  localparam int N_CH      = 32;  // channels per FPGA

  // Latency of fir_da in clock cycles: the output in the cycle whose sample
  // counter reads c is the filtered value for the sample presented at c-4.
  localparam int FIR_LAT   = 4;

  // Element k is h_k. The list below starts at the highest index, h24; the
  // filter is symmetric, so it reads the same in both directions.
  typedef logic [N_TAPS-1:0][COEF_W-1:0] coef_array_t;

  localparam coef_array_t FIR_COEF = '{
    18'h3FD6D, 18'h3FD1E, 18'd23,    18'd1579,  18'd2531,
    18'd1107,  18'h3F4EB, 18'h3E6AB, 18'h3EBA8, 18'd3966,
    18'd19115, 18'd33463, 18'd39358, 18'd33463, 18'd19115,
    18'd3966,  18'h3EBA8, 18'h3E6AB, 18'h3F4EB, 18'd1107,
    18'd2531,  18'd1579,  18'd23,    18'h3FD1E, 18'h3FD6D
  };

  // One extracted hit as it leaves a channel: which channel, when (sample
  // index with FRAC_W fractional bits) and how large (TMAX sum).
  typedef struct packed {
    logic [CH_W-1:0]          channel;
    logic [TS_W+FRAC_W-1:0]   t0;
    logic [AMP_W-1:0]         amplitude;
  } hit_t;

endpackage
