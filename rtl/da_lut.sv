// da_lut: one distributed-arithmetic lookup table.
//
// Holds, for every combination of N address bits, the sum of the coefficients
// whose address bit is set: rom[a] = sum_j a[j] * H[j]. In the FIR each
// address bit is the same bit plane of N consecutive delay-line samples, so
// the table replaces N multiplications by a single read. The contents are
// computed from the coefficient parameter at elaboration; nothing is loaded at
// run time. Purely combinational: addr -> data in the same cycle.
//
// Parameters: N address bits, COEF_W coefficient width, W output width (must
// hold the largest partial sum, COEF_W + clog2(N) + 1 is always enough).
// Tables of this kind, filled with pre-summed coefficients and addressed by
// bit slices, are what the source design describes; the table width is this
// implementation's choice.
module da_lut #(
  parameter int N      = 5,
  parameter int COEF_W = 18,
  parameter int W      = COEF_W + $clog2(N) + 1,
  parameter logic [N-1:0][COEF_W-1:0] H = '0
) (
  input  logic [N-1:0]        addr,
  output logic signed [W-1:0] data
);

  typedef logic [2**N-1:0][W-1:0] rom_t;

  function automatic rom_t build_rom();
    rom_t r;
    for (int a = 0; a < 2**N; a++) begin
      logic signed [W-1:0] s;
      s = '0;
      for (int j = 0; j < N; j++)
        if (((a >> j) & 1) != 0) s = s + W'($signed(H[j]));
      r[a] = s;
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  assign data = $signed(ROM[addr]);

endmodule
