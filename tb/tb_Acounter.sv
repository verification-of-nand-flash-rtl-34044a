// tb_Acounter: self-checking test of the address counter. Random clear and
// increment requests are applied and the count and 'changed' flag are
// compared each cycle with a reference model kept in the testbench,
// including wrap-around at the top of the 12-bit range.
module tb_Acounter;
  logic        clk = 1'b0, rst = 1'b1, clr = 1'b0, inc = 1'b0;
  logic [11:0] cnt;
  logic        changed;
  int checks = 0, failures = 0;
  logic [11:0] ref_cnt;
  logic        ref_chg;

  always #5 clk = ~clk;

  Acounter dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    ref_cnt = '0;
    ref_chg = 1'b0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      checks++;
      if (cnt !== ref_cnt || changed !== ref_chg) begin
        failures++;
        $display("FAIL cycle %0d: cnt %0d want %0d, changed %b want %b", i, cnt, ref_cnt, changed, ref_chg);
      end
      // mostly increments, so the counter wraps once
      clr = ($urandom % 5000) == 0;
      inc = ($urandom % 8) != 0;
      ref_chg = clr | inc;
      if (clr)      ref_cnt = '0;
      else if (inc) ref_cnt = ref_cnt + 12'd1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
