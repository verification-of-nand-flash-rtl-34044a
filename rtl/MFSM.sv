// MFSM: main FSM of the NAND flash controller.
// It decodes the host command (nfc_cmd, taken when nfc_strt is high and the
// controller is idle) and runs the matching operation as a chain of steps,
// each one handed to the timing FSM (TFSM) and finished when TFSM reports
// done:
//   reset   011: FFh
//   read ID 101: 90h, address 00h, 4 data reads -> buffer bytes 0..3
//   erase   100: 60h, RA0, RA1, D0h, tWB, wait R_nB, 70h, tWHR, status read
//   program 001: 80h, CA0, CA1, RA0, RA1, PAGE_BYTES data bytes from the
//                buffer, 85h, ECC column (2 bytes), ECC_BYTES ECC bytes,
//                10h, tWB, wait R_nB, 70h, tWHR, status read
//   read    010: 00h, CA0, CA1, RA0, RA1, 30h, tWB, wait R_nB, PAGE_BYTES
//                data reads into the buffer, 05h, ECC column, E0h,
//                ECC_BYTES ECC reads, ECC compare
// RA0/RA1 are RWA[7:0]/RWA[15:8]; the data column is 0 and the ECC column
// is PAGE_BYTES, i.e. the ECC sits at the start of the spare area.
// The address counter (Acounter) indexes the bytes of each run: it addresses
// buffer port B and the ECC generator, and the step for a buffer byte is
// issued only once the buffer's registered output shows the new address
// (ac_changed low). The ECC generator sees every data byte sent or received.
// Buffer port B is kept enabled, and the buffer address, ECC byte position
// and ECC byte index are the counter value itself, so those outputs are plain
// wires from ac_cnt; they are ports to keep the block boundaries of the
// controller's block diagram.
//
// Host status: nfc_done drops when an operation starts and rises when it
// ends, and stays high until the next start. A status byte with bit 0 set
// ends an erase with EErr and a program with PErr; a page whose ECC does not
// match ends a read with RErr. The error flags also hold until the next
// start. Unknown command codes end at once with nfc_done.
// The command codes, opcodes and step order follow the controller's
// operation flows; the column of the ECC, where the ID bytes go, the
// done/error signalling and the handling of unknown codes are this design's
// own choices.
module MFSM
  import nfc_pkg::*;
#(
  parameter int unsigned PAGE_BYTES = 2048,
  parameter int unsigned ECC_BYTES  = 12,
  parameter int unsigned ID_BYTES   = 4,
  localparam int unsigned CW        = 12,
  localparam int unsigned BAW       = $clog2(PAGE_BYTES),
  localparam int unsigned IW        = $clog2(ECC_BYTES)
) (
  input  logic                   clk,
  input  logic                   rst,
  // host
  input  logic [2:0]             nfc_cmd,
  input  logic                   nfc_strt,
  input  logic [15:0]            RWA,
  output logic                   nfc_done,
  output logic                   PErr,
  output logic                   EErr,
  output logic                   RErr,
  // timing FSM
  output logic                   tf_start,
  output tf_op_e                 tf_op,
  output logic [7:0]             tf_din,
  output logic                   tf_ce,
  input  logic                   tf_done,
  input  logic                   tf_busy,
  input  logic [7:0]             tf_dout,
  // address counter
  output logic                   ac_clr,
  output logic                   ac_inc,
  input  logic [CW-1:0]          ac_cnt,
  input  logic                   ac_changed,
  // data buffer port B
  output logic                   bf_en,
  output logic                   bf_we,
  output logic [BAW-1:0]         bf_addr,
  output logic [7:0]             bf_din,
  input  logic [7:0]             bf_dout,
  // ECC generator and detector
  output logic                   ecc_clr,
  output logic                   ecc_en,
  output logic [BAW-1:0]         ecc_addr,
  output logic [7:0]             ecc_din,
  output logic [IW-1:0]          ecc_idx,
  input  logic [7:0]             ecc_byte,
  output logic [ECC_BYTES*8-1:0] ecc_rd,
  input  logic                   ecc_err
);

  typedef enum logic [4:0] {
    S_IDLE, S_CMD1, S_ADDR, S_IDRD, S_DWR, S_CCHG, S_ECOL, S_EWR, S_CMDE0,
    S_ERD, S_CMD2, S_WB, S_RB, S_STAT, S_WHR, S_STRD, S_DRD, S_CHECK, S_FIN
  } state_e;

  localparam logic [15:0] ECC_COL = 16'(PAGE_BYTES);

  state_e     state, nxt;
  nfc_cmd_e   op;
  logic [15:0] rwa_q;
  logic       pend;
  logic       issue, last;
  int unsigned run_len;

  // ---- step content of each state --------------------------------------
  always_comb begin
    issue   = 1'b1;
    tf_op   = TF_CMD;
    tf_din  = 8'h00;
    run_len = 1;
    unique case (state)
      S_CMD1: begin
        unique case (op)
          CMD_RESET:   tf_din = OP_RESET;
          CMD_READID:  tf_din = OP_READID;
          CMD_ERASE:   tf_din = OP_ERASE1;
          CMD_PROGRAM: tf_din = OP_PROG1;
          default:     tf_din = OP_READ1;
        endcase
      end
      S_ADDR: begin
        tf_op = TF_ADR;
        unique case (op)
          CMD_READID: begin
            run_len = 1;
            tf_din  = 8'h00;
          end
          CMD_ERASE: begin
            run_len = 2;
            tf_din  = ac_cnt[0] ? rwa_q[15:8] : rwa_q[7:0];
          end
          default: begin
            run_len = 4;
            unique case (ac_cnt[1:0])
              2'd0, 2'd1: tf_din = 8'h00;
              2'd2:       tf_din = rwa_q[7:0];
              default:    tf_din = rwa_q[15:8];
            endcase
          end
        endcase
      end
      S_IDRD: begin
        tf_op   = TF_DRD;
        run_len = ID_BYTES;
      end
      S_DWR: begin
        tf_op   = TF_DWR;
        tf_din  = bf_dout;
        run_len = PAGE_BYTES;
      end
      S_CCHG:  tf_din = (op == CMD_PROGRAM) ? OP_PROGCOL : OP_RDCOL1;
      S_ECOL: begin
        tf_op   = TF_ADR;
        run_len = 2;
        tf_din  = ac_cnt[0] ? ECC_COL[15:8] : ECC_COL[7:0];
      end
      S_EWR: begin
        tf_op   = TF_DWR;
        tf_din  = ecc_byte;
        run_len = ECC_BYTES;
      end
      S_CMDE0: tf_din = OP_RDCOL2;
      S_ERD: begin
        tf_op   = TF_DRD;
        run_len = ECC_BYTES;
      end
      S_CMD2: begin
        unique case (op)
          CMD_ERASE:   tf_din = OP_ERASE2;
          CMD_PROGRAM: tf_din = OP_PROG2;
          default:     tf_din = OP_READ2;
        endcase
      end
      S_WB:   tf_op = TF_WB;
      S_RB:   tf_op = TF_RB;
      S_STAT: tf_din = OP_STATUS;
      S_WHR:  tf_op = TF_WHR;
      S_STRD: tf_op = TF_DRD;
      S_DRD: begin
        tf_op   = TF_DRD;
        run_len = PAGE_BYTES;
      end
      default: issue = 1'b0;   // S_IDLE, S_CHECK, S_FIN
    endcase
  end

  assign last     = (32'(ac_cnt) >= run_len - 1);
  assign tf_start = issue && !pend && !tf_busy && !ac_changed;
  assign tf_ce    = (state != S_IDLE);

  // ---- next state after the current state's steps ----------------------
  always_comb begin
    nxt = S_FIN;
    unique case (state)
      S_CMD1:  nxt = (op == CMD_RESET) ? S_FIN : S_ADDR;
      S_ADDR:  nxt = (op == CMD_READID)  ? S_IDRD :
                     (op == CMD_PROGRAM) ? S_DWR  : S_CMD2;
      S_IDRD:  nxt = S_FIN;
      S_DWR:   nxt = S_CCHG;
      S_CCHG:  nxt = S_ECOL;
      S_ECOL:  nxt = (op == CMD_PROGRAM) ? S_EWR : S_CMDE0;
      S_EWR:   nxt = S_CMD2;
      S_CMDE0: nxt = S_ERD;
      S_ERD:   nxt = S_CHECK;
      S_CMD2:  nxt = S_WB;
      S_WB:    nxt = S_RB;
      S_RB:    nxt = (op == CMD_READ) ? S_DRD : S_STAT;
      S_STAT:  nxt = S_WHR;
      S_WHR:   nxt = S_STRD;
      S_STRD:  nxt = S_FIN;
      S_DRD:   nxt = S_CCHG;
      default: nxt = S_FIN;
    endcase
  end

  logic step_end;
  assign step_end = tf_done && pend;
  assign ac_inc   = step_end && !last;
  assign ac_clr   = (step_end && last) || (state == S_IDLE && nfc_strt);

  // ---- buffer, ECC generator hookup ------------------------------------
  assign bf_en    = 1'b1;
  assign bf_addr  = ac_cnt[BAW-1:0];
  assign bf_din   = tf_dout;
  assign bf_we    = step_end && (state == S_DRD || state == S_IDRD);
  assign ecc_addr = ac_cnt[BAW-1:0];
  assign ecc_idx  = ac_cnt[IW-1:0];
  assign ecc_clr  = (state == S_IDLE && nfc_strt);
  always_comb begin
    ecc_en  = 1'b0;
    ecc_din = tf_dout;
    if (state == S_DWR) begin
      ecc_en  = tf_start;
      ecc_din = bf_dout;
    end else if (state == S_DRD) begin
      ecc_en  = step_end;
    end
  end

  // ---- state register and host status ----------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      op       <= CMD_RESET;
      rwa_q    <= '0;
      pend     <= 1'b0;
      nfc_done <= 1'b0;
      PErr     <= 1'b0;
      EErr     <= 1'b0;
      RErr     <= 1'b0;
      ecc_rd   <= '0;
    end else begin
      if (tf_start) pend <= 1'b1;
      unique case (state)
        S_IDLE: if (nfc_strt) begin
          op       <= nfc_cmd_e'(nfc_cmd);
          rwa_q    <= RWA;
          nfc_done <= 1'b0;
          PErr     <= 1'b0;
          EErr     <= 1'b0;
          RErr     <= 1'b0;
          unique case (nfc_cmd)
            CMD_RESET, CMD_READID, CMD_ERASE, CMD_PROGRAM, CMD_READ:
                     state <= S_CMD1;
            default: state <= S_FIN;
          endcase
        end
        S_CHECK: begin
          RErr  <= ecc_err;
          state <= S_FIN;
        end
        S_FIN: begin
          nfc_done <= 1'b1;
          state    <= S_IDLE;
        end
        default: if (step_end) begin
          pend <= 1'b0;
          if (state == S_ERD) ecc_rd[8*ac_cnt[IW-1:0] +: 8] <= tf_dout;
          if (state == S_STRD) begin
            if (op == CMD_ERASE) EErr <= tf_dout[0];
            else                 PErr <= tf_dout[0];
          end
          if (last) state <= nxt;
        end
      endcase
    end
  end

  // A step may only end while one was requested.
  a_done_pend: assert property (@(posedge clk) disable iff (rst) tf_done |-> pend);

endmodule
