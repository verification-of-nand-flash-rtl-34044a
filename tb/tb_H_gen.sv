// tb_H_gen: self-checking test of the ECC generator at its default size
// (4 sectors of 512 bytes). Twenty-four pages (random, all-zero with one bit
// set, all FFh) are streamed in, alternately in order and in shuffled order,
// with a clear before each, and the 12 ECC bytes and the full code vector are compared
// with a reference computed bit by bit from the code's definition: every set
// data bit at byte position p and bit b toggles, for each position bit k,
// pair member 2k+p[k], and for each bit-index bit j, member 18+2j+b[j].
module tb_H_gen;
  logic        clk = 1'b0, rst = 1'b1, clr = 1'b0, en = 1'b0;
  logic [10:0] addr = '0;
  logic [7:0]  din = '0, ecc_byte;
  logic [3:0]  idx = '0;
  logic [95:0] ecc;
  logic [7:0]  page [2048];
  int          order [2048];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  H_gen dut (.*);

  function automatic logic [23:0] ref_code(input int s);
    logic [23:0] c = '0;
    for (int p = 0; p < 512; p++)
      for (int b = 0; b < 8; b++)
        if (page[s*512 + p][b]) begin
          for (int k = 0; k < 9; k++) c[2*k + ((p >> k) & 1)] ^= 1'b1;
          for (int j = 0; j < 3; j++) c[18 + 2*j + ((b >> j) & 1)] ^= 1'b1;
        end
    return c;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 24; t++) begin
      for (int i = 0; i < 2048; i++) begin
        page[i]  = (t == 3) ? 8'h00 : (t == 4) ? 8'hFF : 8'($urandom);
        order[i] = i;
      end
      if (t == 3) page[1234] = 8'h10;         // one bit set
      if (t % 2 == 1) order.shuffle();
      @(negedge clk);
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      for (int i = 0; i < 2048; i++) begin
        en = 1'b1; addr = 11'(order[i]); din = page[order[i]];
        @(negedge clk);
      end
      en = 1'b0;
      for (int s = 0; s < 4; s++) begin
        logic [23:0] r;
        r = ref_code(s);
        checks++;
        if (ecc[24*s +: 24] !== r) begin
          failures++;
          $display("FAIL page %0d sector %0d: %h want %h", t, s, ecc[24*s +: 24], r);
        end
        for (int b = 0; b < 3; b++) begin
          idx = 4'(3*s + b);
          #1;
          checks++;
          if (ecc_byte !== r[8*b +: 8]) begin
            failures++;
            $display("FAIL page %0d ecc byte %0d: %h want %h", t, idx, ecc_byte, r[8*b +: 8]);
          end
        end
      end
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
