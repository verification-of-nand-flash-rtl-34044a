// nfc_host_if: the host side of the NAND flash controller as one bundle, for
// the class-based testbench: the command port, the buffer port, the status
// outputs, and three test-control lines the driver uses to make the flash
// model fail the next erase/program or flip bits of a stored byte.
// Inputs of the controller are driven on the falling clock edge.
interface nfc_host_if (input logic clk);
  logic        BF_sel, BF_we;
  logic [10:0] BF_ad;
  logic [7:0]  BF_din, BF_dou;
  logic [15:0] RWA;
  logic [2:0]  nfc_cmd;
  logic        nfc_strt, nfc_done, PErr, EErr, RErr;
  logic [3:0]  ecc_bad, ecc_fix;
  logic [47:0] ecc_loc;
  // flash-model test controls
  logic        set_fail;
  logic        set_inj;
  logic [15:0] inj_row;
  logic [11:0] inj_col;
  logic [7:0]  inj_mask;
endinterface
