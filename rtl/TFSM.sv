// TFSM: timing FSM of the NAND flash controller.
// It turns one step requested by the main FSM into correctly timed activity
// on the NAND pins. A step is one bus cycle (command latch, address latch,
// data write, data read) or one wait (tWB, tWHR, or until R_nB is high).
//
// Write cycles (TF_CMD, TF_ADR, TF_DWR): CLE (command) or ALE (address) is
// raised and din is driven on DIO (dio_oe high) together with WE_n low for
// T_WP clocks; WE_n then returns high while CLE/ALE and DIO are held for
// T_WH clocks, so the flash latches the byte on the rising edge of WE_n.
// Read cycle (TF_DRD): RE_n is low for T_RP clocks; DIO is sampled into dout
// in the last of them; RE_n is then high for T_REH clocks.
// Waits: TF_WB and TF_WHR count T_WB and T_WHR clocks; TF_RB waits until the
// synchronised R_nB input is high. R_nB passes through two flip-flops, so
// it must already have been low for two clocks when a TF_RB step starts;
// the tWB wait that precedes every R_nB wait in the controller's flows
// provides that.
//
// Interface: start (one cycle, only while busy is low) with op and din; done
// pulses for one cycle when the step ends, and dout is valid from then on.
// A write cycle takes T_WP+T_WH clocks and a read T_RP+T_REH clocks, plus
// one clock for the step to return to idle. CE_n is the inverse of the ce
// input, which the main FSM holds for a whole operation.
// The pin behaviour (CLE/ALE/WE_n/RE_n/CE_n) follows the controller's pin
// description; the clock counts are this design's own, since the flash
// timings are named there but not given.
module TFSM
  import nfc_pkg::*;
#(
  parameter int unsigned T_WP  = 2,
  parameter int unsigned T_WH  = 2,
  parameter int unsigned T_RP  = 2,
  parameter int unsigned T_REH = 2,
  parameter int unsigned T_WB  = 10,
  parameter int unsigned T_WHR = 6
) (
  input  logic       clk,
  input  logic       rst,
  // step request from the main FSM
  input  logic       start,
  input  tf_op_e     op,
  input  logic [7:0] din,
  input  logic       ce,
  output logic       done,
  output logic       busy,
  output logic [7:0] dout,
  // NAND pins
  output logic       CLE,
  output logic       ALE,
  output logic       WE_n,
  output logic       RE_n,
  output logic       CE_n,
  input  logic       R_nB,
  output logic [7:0] dio_o,
  output logic       dio_oe,
  input  logic [7:0] dio_i
);

  typedef enum logic [2:0] {
    S_IDLE, S_WLOW, S_WHIGH, S_RLOW, S_RHIGH, S_COUNT, S_RB, S_DONE
  } state_e;

  state_e      state;
  logic [7:0]  timer;
  logic [1:0]  rb_sync;

  always_ff @(posedge clk) begin
    if (rst) rb_sync <= 2'b00;
    else     rb_sync <= {rb_sync[0], R_nB};
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);
  assign CE_n = ~ce;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      timer  <= '0;
      CLE    <= 1'b0;
      ALE    <= 1'b0;
      WE_n   <= 1'b1;
      RE_n   <= 1'b1;
      dio_o  <= '0;
      dio_oe <= 1'b0;
      dout   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          unique case (op)
            TF_CMD, TF_ADR, TF_DWR: begin
              CLE    <= (op == TF_CMD);
              ALE    <= (op == TF_ADR);
              WE_n   <= 1'b0;
              dio_o  <= din;
              dio_oe <= 1'b1;
              timer  <= 8'(T_WP - 1);
              state  <= S_WLOW;
            end
            TF_DRD: begin
              RE_n  <= 1'b0;
              timer <= 8'(T_RP - 1);
              state <= S_RLOW;
            end
            TF_WB: begin
              timer <= 8'(T_WB - 1);
              state <= S_COUNT;
            end
            TF_WHR: begin
              timer <= 8'(T_WHR - 1);
              state <= S_COUNT;
            end
            TF_RB:   state <= S_RB;
            default: state <= S_DONE;
          endcase
        end
        S_WLOW: begin
          if (timer == 0) begin
            WE_n  <= 1'b1;
            timer <= 8'(T_WH - 1);
            state <= S_WHIGH;
          end else timer <= timer - 1'b1;
        end
        S_WHIGH: begin
          if (timer == 0) begin
            CLE    <= 1'b0;
            ALE    <= 1'b0;
            dio_oe <= 1'b0;
            state  <= S_DONE;
          end else timer <= timer - 1'b1;
        end
        S_RLOW: begin
          if (timer == 0) begin
            dout  <= dio_i;
            RE_n  <= 1'b1;
            timer <= 8'(T_REH - 1);
            state <= S_RHIGH;
          end else timer <= timer - 1'b1;
        end
        S_RHIGH: begin
          if (timer == 0) state <= S_DONE;
          else            timer <= timer - 1'b1;
        end
        S_COUNT: begin
          if (timer == 0) state <= S_DONE;
          else            timer <= timer - 1'b1;
        end
        S_RB:    if (rb_sync[1]) state <= S_DONE;
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A step may only be requested while the FSM is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> !busy);

endmodule
