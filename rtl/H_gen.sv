// H_gen: ECC generator of the NAND flash controller.
// It computes, while a page streams past, one 24-bit Hamming code for each
// SECTOR_BYTES-byte sector of the page; with 2048-byte pages and 512-byte
// sectors that is 4 x 3 = 12 ECC bytes, the amount the controller writes to
// and reads from the spare area.
//
// The code of a sector is made of parity pairs. For each bit k of a byte's
// position inside the sector (9 bits for 512 bytes), bit 2k collects the
// parity of all bytes whose position has bit k = 0 and bit 2k+1 of all bytes
// whose position has bit k = 1 (line parities, bits 0..17). For each bit j
// of the bit index inside a byte (3 bits), bit 18+2j collects the parity of
// all data bits whose index has bit j = 0 and bit 19+2j of those with bit
// j = 1 (column parities, bits 18..23). A single flipped data bit toggles
// exactly one bit of each pair, and the odd members of the pairs then spell
// its position; this is what Err_Loc uses.
//
// Interface: clr (one cycle) zeroes all codes. Each cycle with en high adds
// byte din at page position addr; the codes are updated at the clock edge
// and can be read in any order and at any time (ecc, all sectors, sector s at
// bits [24*s +: 24]; ecc_byte, byte idx = 3*s + b holding bits [8*b +: 8] of
// sector s). SECTOR_BYTES must be 512 so that a code fills exactly three
// bytes. The 12-byte ECC follows the controller; the choice of code and
// its layout are this design's own.
module H_gen #(
  parameter int unsigned SECTORS      = 4,
  parameter int unsigned SECTOR_BYTES = 512,
  localparam int unsigned LW          = $clog2(SECTOR_BYTES),
  localparam int unsigned AW          = $clog2(SECTORS * SECTOR_BYTES),
  localparam int unsigned IW          = $clog2(SECTORS * 3),
  localparam int unsigned CW          = 2 * LW + 6
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    clr,
  input  logic                    en,
  input  logic [AW-1:0]           addr,
  input  logic [7:0]              din,
  input  logic [IW-1:0]           idx,
  output logic [7:0]              ecc_byte,
  output logic [SECTORS*CW-1:0]   ecc
);

  // Contribution of one byte at sector-relative position pos
  function automatic logic [CW-1:0] byte_code(input logic [LW-1:0] pos,
                                              input logic [7:0] d);
    logic [CW-1:0] c;
    logic          p;
    c = '0;
    p = ^d;
    for (int k = 0; k < LW; k++) c[2*k + int'(pos[k])] = p;
    for (int j = 0; j < 3; j++) begin
      for (int b = 0; b < 8; b++) begin
        if (b[j]) c[2*LW + 2*j + 1] ^= d[b];
        else      c[2*LW + 2*j]     ^= d[b];
      end
    end
    return c;
  endfunction

  logic [CW-1:0] code [SECTORS];
  logic [AW-LW-1:0] sec;
  logic [LW-1:0]    pos;

  assign sec = addr[AW-1:LW];
  assign pos = addr[LW-1:0];

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      for (int s = 0; s < SECTORS; s++) code[s] <= '0;
    end else if (en) begin
      code[sec] <= code[sec] ^ byte_code(pos, din);
    end
  end

  always_comb begin
    for (int s = 0; s < SECTORS; s++) ecc[s*CW +: CW] = code[s];
  end

  // Byte idx of the 3*SECTORS-byte ECC field
  logic [SECTORS*CW-1:0] ecc_pad;
  always_comb begin
    ecc_pad  = ecc;
    ecc_byte = '0;
    for (int i = 0; i < SECTORS * 3; i++)
      if (idx == IW'(i)) ecc_byte = ecc_pad[(i/3)*CW + (i%3)*8 +: 8];
  end

endmodule
