// tb_ebr_buffer: self-checking test of the 2048-byte dual-port buffer.
// Random reads and writes on both ports, with random port enables, are
// checked against a reference array: read data one cycle after the address,
// read-first on a write, no update while a port is disabled, and port B
// winning a same-address write collision.
module tb_ebr_buffer;
  logic        clk = 1'b0;
  logic        a_en, a_we, b_en, b_we;
  logic [10:0] a_addr, b_addr;
  logic [7:0]  a_din, a_dout, b_din, b_dout;
  logic [7:0]  ref_mem [2048];
  logic [7:0]  exp_a, exp_b;
  logic        chk_a, chk_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ebr_buffer dut (.*);

  initial begin
    a_en = 1'b0; a_we = 1'b0; b_en = 1'b0; b_we = 1'b0;
    a_addr = '0; b_addr = '0; a_din = '0; b_din = '0;
    chk_a = 1'b0; chk_b = 1'b0; exp_a = '0; exp_b = '0;
    // fill through port A
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk);
      a_en = 1'b1; a_we = 1'b1; a_addr = 11'(i); a_din = 8'(i * 7 + 3);
      ref_mem[i] = 8'(i * 7 + 3);
    end
    @(negedge clk);
    a_en = 1'b0; a_we = 1'b0;
    for (int i = 0; i < 30000; i++) begin
      @(negedge clk);
      if (chk_a) begin
        checks++;
        if (a_dout !== exp_a) begin failures++; $display("FAIL A: %02h want %02h", a_dout, exp_a); end
      end
      if (chk_b) begin
        checks++;
        if (b_dout !== exp_b) begin failures++; $display("FAIL B: %02h want %02h", b_dout, exp_b); end
      end
      a_en = $urandom % 4 != 0; a_we = $urandom % 2; a_addr = 11'($urandom % 64); a_din = 8'($urandom);
      b_en = $urandom % 4 != 0; b_we = $urandom % 2; b_addr = 11'($urandom % 64); b_din = 8'($urandom);
      chk_a = a_en; chk_b = b_en;
      exp_a = ref_mem[a_addr];
      exp_b = ref_mem[b_addr];
      if (a_en && a_we && !(b_en && b_we && b_addr == a_addr)) ref_mem[a_addr] = a_din;
      if (b_en && b_we) ref_mem[b_addr] = b_din;
    end
    // final sweep through port B
    @(negedge clk);
    a_en = 1'b0; b_we = 1'b0;
    for (int i = 0; i < 2048; i++) begin
      b_en = 1'b1; b_addr = 11'(i);
      @(negedge clk);
      checks++;
      if (b_dout !== ref_mem[i]) begin failures++; $display("FAIL sweep %0d", i); end
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
