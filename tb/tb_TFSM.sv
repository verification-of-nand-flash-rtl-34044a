// tb_TFSM: self-checking, cycle-level test of the timing FSM at its default
// timing (T_WP = T_WH = T_RP = T_REH = 2, T_WB = 10, T_WHR = 6).
// Random steps are issued one after another. For write cycles it checks the
// number of clocks WE_n is low, that CLE/ALE match the step type and stay
// up through the WE_n high time, that DIO carries din with dio_oe high, and
// that done comes T_WP+T_WH clocks after the start. For reads it drives a
// byte only while RE_n is low and checks it is captured, that dio_oe stays
// low and the step takes T_RP+T_REH clocks. Waits must take T_WB or T_WHR
// clocks; an R_nB wait must not end before R_nB rises nor later than the
// two-flop synchroniser allows. CE_n must follow ce.
module tb_TFSM;
  import nfc_pkg::*;
  localparam int T_WP = 2, T_WH = 2, T_RP = 2, T_REH = 2, T_WB = 10, T_WHR = 6;

  logic       clk = 1'b0, rst = 1'b1, start = 1'b0, ce = 1'b0;
  tf_op_e     op = TF_CMD;
  logic [7:0] din = '0, dout, dio_o, dio_i = '0;
  logic       done, busy, CLE, ALE, WE_n, RE_n, CE_n, R_nB = 1'b1, dio_oe;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  TFSM dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(WE_n && RE_n && !CLE && !ALE && !dio_oe && !busy, "idle pins after reset");
    for (int t = 0; t < 3000; t++) begin
      tf_op_e     o;
      logic [7:0] d, rdv;
      int n, we_low, re_low, cle_hi, ale_hi, rb_rise, bad_dio;
      o = tf_op_e'($urandom % 7);
      d = 8'($urandom);
      rdv = 8'($urandom);
      ce = $urandom % 2;
      // a busy flash pulls R_nB low during tWB, before the R_nB wait starts
      if (o == TF_RB) begin
        R_nB = 1'b0;
        repeat (3) @(negedge clk);
      end
      @(negedge clk);
      check(CE_n == !ce, "CE_n follows ce");
      start = 1'b1; op = o; din = d;
      rb_rise = (o == TF_RB) ? 3 + $urandom % 20 : 0;
      @(negedge clk);
      start = 1'b0; op = TF_CMD;
      n = 1; we_low = 0; re_low = 0; cle_hi = 0; ale_hi = 0; bad_dio = 0;
      while (!done && n < 200) begin
        if (!WE_n) we_low++;
        if (CLE) cle_hi++;
        if (ALE) ale_hi++;
        if (!WE_n && (!dio_oe || dio_o != d)) bad_dio++;
        if (!RE_n) begin re_low++; if (dio_oe) bad_dio++; end
        dio_i = !RE_n ? rdv : 8'($urandom);
        if (o == TF_RB && n == rb_rise) R_nB = 1'b1;
        @(negedge clk);
        n++;
      end
      check(done, "step finishes");
      check(bad_dio == 0, $sformatf("op %0d: DIO driven wrongly", o));
      unique case (o)
        TF_CMD, TF_ADR, TF_DWR: begin
          check(n == T_WP + T_WH + 1, $sformatf("write op %0d took %0d", o, n));
          check(we_low == T_WP, $sformatf("WE_n low %0d clocks", we_low));
          check(cle_hi == ((o == TF_CMD) ? T_WP + T_WH : 0), $sformatf("CLE high %0d", cle_hi));
          check(ale_hi == ((o == TF_ADR) ? T_WP + T_WH : 0), $sformatf("ALE high %0d", ale_hi));
        end
        TF_DRD: begin
          check(n == T_RP + T_REH + 1, $sformatf("read took %0d", n));
          check(re_low == T_RP, $sformatf("RE_n low %0d", re_low));
          check(dout == rdv, $sformatf("read %02h want %02h", dout, rdv));
        end
        TF_WB:  check(n == T_WB + 1, $sformatf("tWB took %0d", n));
        TF_WHR: check(n == T_WHR + 1, $sformatf("tWHR took %0d", n));
        TF_RB:  check(n > rb_rise + 1 && n <= rb_rise + 4, $sformatf("R_nB wait ended %0d after rise at %0d", n, rb_rise));
        default: ;
      endcase
      check(we_low == 0 || re_low == 0, "no read and write strobe in one step");
      @(negedge clk);
      check(!busy && !done && WE_n && RE_n && !dio_oe, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
