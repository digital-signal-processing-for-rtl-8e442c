// apfel_ref_pkg: reference model of one channel for the testbenches.
//
// Written directly from the filter and TMAX equations, independent of the
// RTL structure: a direct-form FIR with the same coefficients (multiply and
// add, no lookup tables), then the lagged derivative, the positive-part sum
// and the sign-change search, and the interpolation T0 = i0 + d0/(d0-d1) in
// real arithmetic. The sample at position p of the ADC trace is the one
// presented p cycles after reset; the chain's smoothed value at position p is
// the filter output for ADC sample p - FIR_LAT (zero before the first one).
// The derivative search starts once the filter has settled after reset: the
// first sample it uses is position FIR_LAT + N_TAPS.
package apfel_ref_pkg;
  import apfel_pkg::*;

  typedef struct {
    longint i0;
    longint d0;
    longint d1;
    longint amp;
    real    t0;     // exact interpolated time in samples
  } ref_hit_t;

  // Direct-form filter output for ADC sample n
  function automatic longint fir_ref(const ref int adc[$], input int n);
    longint acc;
    acc = 0;
    for (int k = 0; k < N_TAPS; k++)
      if (n - k >= 0 && n - k < adc.size())
        acc += longint'($signed(FIR_COEF[k])) * longint'(adc[n-k]);
    acc = (acc + (longint'(1) <<< (COEF_FRAC-1))) >>> COEF_FRAC;
    if (acc > 32767)  acc = 32767;
    if (acc < -32768) acc = -32768;
    return acc;
  endfunction

  // Runs the whole trace; returns every sign change (hits and sub-threshold
  // runs) in `all` and those at or above threshold in `hits`.
  function automatic void run_chain(const ref int adc[$], input int r, input longint thr,
                                    ref ref_hit_t hits[$], ref ref_hit_t all[$]);
    longint v[$];
    longint d_prev, d, s;
    bit     have_prev;
    ref_hit_t h;
    hits.delete();
    all.delete();
    for (int p = 0; p < adc.size(); p++)
      v.push_back((p >= FIR_LAT) ? -fir_ref(adc, p - FIR_LAT) : 0);
    have_prev = 0;
    s = 0;
    d_prev = 0;
    for (int p = FIR_LAT + N_TAPS + r; p < adc.size(); p++) begin
      d = v[p] - v[p-r];
      if (have_prev && d_prev > 0 && d <= 0) begin
        h.i0  = longint'(p - 1 - FIR_LAT - r);
        h.d0  = d_prev;
        h.d1  = d;
        h.amp = s;
        h.t0  = real'(h.i0) + real'(d_prev) / real'(d_prev - d);
        all.push_back(h);
        if (s >= thr) hits.push_back(h);
      end
      s = (d > 0) ? s + d : 0;
      d_prev = d;
      have_prev = 1;
    end
  endfunction

  // An APFEL-like negative pulse on a baseline: linear fall over `rise`
  // samples to -height, exponential recovery with time constant `tau`.
  function automatic int pulse_shape(int dt, int height, int rise, real tau);
    if (dt < 0) return 0;
    if (dt < rise) return -(height * dt) / rise;
    return -int'(real'(height) * $exp(-real'(dt - rise) / tau));
  endfunction

endpackage
