// nfcm_top: NAND flash controller.
// A host hands the controller a command (nfc_cmd with a nfc_strt pulse) and
// a row address (RWA); the controller runs the matching NAND operation (reset,
// read ID, block erase, page program, page read) on an 8-bit NAND flash
// interface and reports nfc_done and the error flags PErr, EErr and RErr.
// Page data passes through a 2048-byte dual-port buffer: the host fills it
// before a program and reads it after a page read or read ID over the BF_*
// port, while the controller moves it to and from the flash.
//
// Blocks: MFSM sequences each operation; TFSM produces the timed pin
// activity for each step; Acounter indexes the bytes; ebr_buffer is the
// page buffer; H_gen computes a 12-byte Hamming ECC over the page as it is
// programmed or read, and Err_Loc compares it with the ECC read back from
// the spare area after a page read, raising RErr and reporting per sector
// whether and where a single bit is wrong (ecc_bad, ecc_fix, ecc_loc).
// The bidirectional DIO bus is brought out as DIO_o, DIO_oe and DIO_i; the
// tristate pad belongs to the chip level. All logic is clocked by CLK and
// reset synchronously by RES (active high).
// The block structure and pin names follow the controller's block diagram;
// the split DIO bus and the ECC location outputs are this design's own.
module nfcm_top #(
  parameter int unsigned PAGE_BYTES   = 2048,
  parameter int unsigned ECC_BYTES    = 12,
  parameter int unsigned SECTOR_BYTES = 512,
  parameter int unsigned ID_BYTES     = 4,
  localparam int unsigned SECTORS     = PAGE_BYTES / SECTOR_BYTES,
  localparam int unsigned BAW         = $clog2(PAGE_BYTES),
  localparam int unsigned LW          = $clog2(SECTOR_BYTES),
  localparam int unsigned CODEW       = 2 * LW + 6
) (
  input  logic                     CLK,
  input  logic                     RES,
  // host buffer port
  input  logic                     BF_sel,
  input  logic [BAW-1:0]           BF_ad,
  input  logic [7:0]               BF_din,
  input  logic                     BF_we,
  output logic [7:0]               BF_dou,
  // host command port
  input  logic [15:0]              RWA,
  input  logic [2:0]               nfc_cmd,
  input  logic                     nfc_strt,
  output logic                     nfc_done,
  output logic                     PErr,
  output logic                     EErr,
  output logic                     RErr,
  output logic [SECTORS-1:0]       ecc_bad,
  output logic [SECTORS-1:0]       ecc_fix,
  output logic [SECTORS*(LW+3)-1:0] ecc_loc,
  // NAND flash interface
  output logic                     CLE,
  output logic                     ALE,
  output logic                     WE_n,
  output logic                     RE_n,
  output logic                     CE_n,
  input  logic                     R_nB,
  output logic [7:0]               DIO_o,
  output logic                     DIO_oe,
  input  logic [7:0]               DIO_i
);
  import nfc_pkg::*;

  localparam int unsigned IW = $clog2(ECC_BYTES);

  // timing FSM request
  logic       tf_start, tf_ce, tf_done, tf_busy;
  tf_op_e     tf_op;
  logic [7:0] tf_din, tf_dout;
  // address counter
  logic        ac_clr, ac_inc, ac_changed;
  logic [11:0] ac_cnt;
  // buffer port B
  logic           bf_en, bf_we;
  logic [BAW-1:0] bf_addr;
  logic [7:0]     bf_din, bf_dout;
  // ECC
  logic                   ecc_clr, ecc_en, ecc_err;
  logic [BAW-1:0]         ecc_addr;
  logic [7:0]             ecc_din, ecc_byte;
  logic [IW-1:0]          ecc_idx;
  logic [ECC_BYTES*8-1:0] ecc_rd;
  logic [SECTORS*CODEW-1:0] ecc_calc;

  MFSM #(
    .PAGE_BYTES (PAGE_BYTES),
    .ECC_BYTES  (ECC_BYTES),
    .ID_BYTES   (ID_BYTES)
  ) u_mfsm (
    .clk        (CLK),
    .rst        (RES),
    .nfc_cmd    (nfc_cmd),
    .nfc_strt   (nfc_strt),
    .RWA        (RWA),
    .nfc_done   (nfc_done),
    .PErr       (PErr),
    .EErr       (EErr),
    .RErr       (RErr),
    .tf_start   (tf_start),
    .tf_op      (tf_op),
    .tf_din     (tf_din),
    .tf_ce      (tf_ce),
    .tf_done    (tf_done),
    .tf_busy    (tf_busy),
    .tf_dout    (tf_dout),
    .ac_clr     (ac_clr),
    .ac_inc     (ac_inc),
    .ac_cnt     (ac_cnt),
    .ac_changed (ac_changed),
    .bf_en      (bf_en),
    .bf_we      (bf_we),
    .bf_addr    (bf_addr),
    .bf_din     (bf_din),
    .bf_dout    (bf_dout),
    .ecc_clr    (ecc_clr),
    .ecc_en     (ecc_en),
    .ecc_addr   (ecc_addr),
    .ecc_din    (ecc_din),
    .ecc_idx    (ecc_idx),
    .ecc_byte   (ecc_byte),
    .ecc_rd     (ecc_rd),
    .ecc_err    (ecc_err)
  );

  TFSM u_tfsm (
    .clk    (CLK),
    .rst    (RES),
    .start  (tf_start),
    .op     (tf_op),
    .din    (tf_din),
    .ce     (tf_ce),
    .done   (tf_done),
    .busy   (tf_busy),
    .dout   (tf_dout),
    .CLE    (CLE),
    .ALE    (ALE),
    .WE_n   (WE_n),
    .RE_n   (RE_n),
    .CE_n   (CE_n),
    .R_nB   (R_nB),
    .dio_o  (DIO_o),
    .dio_oe (DIO_oe),
    .dio_i  (DIO_i)
  );

  Acounter #(.WIDTH(12)) u_acnt (
    .clk     (CLK),
    .rst     (RES),
    .clr     (ac_clr),
    .inc     (ac_inc),
    .cnt     (ac_cnt),
    .changed (ac_changed)
  );

  ebr_buffer #(.DEPTH(PAGE_BYTES), .WIDTH(8)) u_buf (
    .clk    (CLK),
    .a_en   (BF_sel),
    .a_we   (BF_we),
    .a_addr (BF_ad),
    .a_din  (BF_din),
    .a_dout (BF_dou),
    .b_en   (bf_en),
    .b_we   (bf_we),
    .b_addr (bf_addr),
    .b_din  (bf_din),
    .b_dout (bf_dout)
  );

  H_gen #(.SECTORS(SECTORS), .SECTOR_BYTES(SECTOR_BYTES)) u_hgen (
    .clk      (CLK),
    .rst      (RES),
    .clr      (ecc_clr),
    .en       (ecc_en),
    .addr     (ecc_addr),
    .din      (ecc_din),
    .idx      (ecc_idx),
    .ecc_byte (ecc_byte),
    .ecc      (ecc_calc)
  );

  Err_Loc #(.SECTORS(SECTORS), .SECTOR_BYTES(SECTOR_BYTES)) u_errloc (
    .ecc_rd   (ecc_rd),
    .ecc_calc (ecc_calc),
    .bad      (ecc_bad),
    .fixable  (ecc_fix),
    .loc      (ecc_loc),
    .any_err  (ecc_err)
  );

endmodule
