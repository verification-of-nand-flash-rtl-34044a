// nfc_pkg: types and constants shared by the NAND flash controller blocks.
// It holds the host command codes (nfc_cmd), the NAND opcodes the controller
// issues on DIO, and the step types the main FSM hands to the timing FSM.
// The command codes and opcodes are those of the controller's operation
// flows; the step encoding is this design's own.
package nfc_pkg;

  // Host command codes on nfc_cmd[2:0]
  typedef enum logic [2:0] {
    CMD_PROGRAM = 3'b001,
    CMD_READ    = 3'b010,
    CMD_RESET   = 3'b011,
    CMD_ERASE   = 3'b100,
    CMD_READID  = 3'b101
  } nfc_cmd_e;

  // NAND opcodes written with CLE high
  localparam logic [7:0] OP_READ1    = 8'h00;
  localparam logic [7:0] OP_READ2    = 8'h30;
  localparam logic [7:0] OP_RDCOL1   = 8'h05;
  localparam logic [7:0] OP_RDCOL2   = 8'hE0;
  localparam logic [7:0] OP_PROG1    = 8'h80;
  localparam logic [7:0] OP_PROGCOL  = 8'h85;
  localparam logic [7:0] OP_PROG2    = 8'h10;
  localparam logic [7:0] OP_ERASE1   = 8'h60;
  localparam logic [7:0] OP_ERASE2   = 8'hD0;
  localparam logic [7:0] OP_STATUS   = 8'h70;
  localparam logic [7:0] OP_READID   = 8'h90;
  localparam logic [7:0] OP_RESET    = 8'hFF;

  // One step of the timing FSM
  typedef enum logic [2:0] {
    TF_CMD  = 3'd0,   // command latch cycle (CLE high, WE_n pulse)
    TF_ADR  = 3'd1,   // address latch cycle (ALE high, WE_n pulse)
    TF_DWR  = 3'd2,   // data write cycle (WE_n pulse)
    TF_DRD  = 3'd3,   // data read cycle (RE_n pulse, byte sampled)
    TF_WB   = 3'd4,   // wait tWB
    TF_RB   = 3'd5,   // wait until R_nB is high
    TF_WHR  = 3'd6    // wait tWHR
  } tf_op_e;

endpackage
