// Err_Loc: ECC detector of the NAND flash controller.
// After a page read it compares, sector by sector, the 24-bit code read back
// from the flash's spare area (ecc_rd) with the code H_gen computed over the
// data just read (ecc_calc). Their XOR is the syndrome:
//   - all zero: the sector is clean;
//   - exactly one bit of every parity pair set: one data bit is wrong; the
//     odd members of the line pairs give its byte position and those of the
//     column pairs its bit index, reported in loc as {byte[8:0], bit[2:0]};
//   - anything else: the stored code itself was hit, or more than one bit is
//     wrong, which this code cannot correct.
// bad flags every sector whose syndrome is not zero, fixable the
// single-data-bit case, and any_err (the controller's RErr) is the OR of bad.
// Purely combinational. Raising the read error on a mismatch follows the
// controller's read flow; the location decoding follows from the code chosen
// in H_gen and is this design's own, as is leaving the buffer uncorrected.
module Err_Loc #(
  parameter int unsigned SECTORS      = 4,
  parameter int unsigned SECTOR_BYTES = 512,
  localparam int unsigned LW          = $clog2(SECTOR_BYTES),
  localparam int unsigned CW          = 2 * LW + 6
) (
  input  logic [SECTORS*CW-1:0]     ecc_rd,
  input  logic [SECTORS*CW-1:0]     ecc_calc,
  output logic [SECTORS-1:0]        bad,
  output logic [SECTORS-1:0]        fixable,
  output logic [SECTORS*(LW+3)-1:0] loc,
  output logic                      any_err
);

  always_comb begin
    for (int s = 0; s < SECTORS; s++) begin
      logic [CW-1:0] syn;
      logic          pairs_ok;
      syn      = ecc_rd[s*CW +: CW] ^ ecc_calc[s*CW +: CW];
      pairs_ok = 1'b1;
      for (int k = 0; k < CW / 2; k++) pairs_ok &= syn[2*k] ^ syn[2*k+1];
      bad[s]     = (syn != '0);
      fixable[s] = pairs_ok;
      for (int k = 0; k < LW + 3; k++) begin
        // bits 0..2 of loc: bit index, bits 3.. : byte position
        if (k < 3) loc[s*(LW+3) + k] = syn[2*LW + 2*k + 1];
        else       loc[s*(LW+3) + k] = syn[2*(k-3) + 1];
      end
    end
    any_err = |bad;
  end

endmodule
