// da_lut: one partial look-up table of the distributed-arithmetic FIR filter.
//
// A DA filter never multiplies. For one bit position of the samples, the
// filter gathers one bit from each tap's sample into an address; the LUT
// returns the sum of the coefficients whose address bit is 1. With eight taps
// the full table would have 256 words, so the table is partitioned: each
// da_lut serves ADDR_W = 4 taps (16 words) and the filter adds the outputs of
// two of them. Partitioning into two 4-input tables follows the source
// design; the contents are computed here at elaboration from the COEFS
// parameter, so any coefficient set can be loaded by parameter override.
//
// Interface: addr bit i selects coefficient COEFS[i]; p is the signed sum,
// LUT_W bits wide. Purely combinational (a ROM), no clock.
module da_lut #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned LUT_W  = COEF_W + $clog2(ADDR_W),
  // Element i is the coefficient for address bit i (listed here from i = 3
  // down to i = 0).
  parameter logic [ADDR_W-1:0][COEF_W-1:0] COEFS = {-8'd2, 8'd40, 8'd46, 8'd15}
) (
  input  logic [ADDR_W-1:0]       addr,
  output logic signed [LUT_W-1:0] p
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  // Partial product for one address: sum of the selected coefficients.
  function automatic logic signed [LUT_W-1:0] entry(int unsigned word);
    logic signed [LUT_W-1:0] sum = '0;
    for (int unsigned i = 0; i < ADDR_W; i++)
      if (word[i]) sum += LUT_W'($signed(COEFS[i]));
    return sum;
  endfunction

  logic signed [LUT_W-1:0] rom [DEPTH];

  for (genvar a = 0; a < DEPTH; a++) begin : g_rom
    assign rom[a] = entry(a);
  end

  assign p = rom[addr];

endmodule
