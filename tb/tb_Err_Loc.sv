// tb_Err_Loc: self-checking test of the ECC detector. For random sector
// codes it applies: no error; a single flipped data bit (syndrome built from
// the bit's position: one member of each pair, chosen by the position bits);
// a flipped bit in the stored code; and two flipped data bits in different
// positions. It checks bad, fixable, loc and any_err for each, sector by
// sector.
module tb_Err_Loc;
  logic [95:0] ecc_rd, ecc_calc;
  logic [3:0]  bad, fixable;
  logic [47:0] loc;
  logic        any_err;
  int checks = 0, failures = 0;

  Err_Loc dut (.*);

  function automatic logic [23:0] syn_of(input int p, input int b);
    logic [23:0] c = '0;
    for (int k = 0; k < 9; k++) c[2*k + ((p >> k) & 1)] = 1'b1;
    for (int j = 0; j < 3; j++) c[18 + 2*j + ((b >> j) & 1)] = 1'b1;
    return c;
  endfunction

  task automatic expect_out(input logic [3:0] eb, input logic [3:0] ef, input int s,
                            input logic [11:0] el, input string what);
    checks++;
    if (bad !== eb || fixable !== ef || any_err !== (eb != 0) ||
        (s >= 0 && loc[12*s +: 12] !== el)) begin
      failures++;
      $display("FAIL %s: bad %b fix %b any %b loc %h (want %b %b %h)", what, bad, fixable,
               any_err, (s >= 0) ? loc[12*s +: 12] : 12'h0, eb, ef, el);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int s, p, b, p2, b2, cb;
      ecc_calc = {$urandom, $urandom, $urandom};
      s = $urandom % 4; p = $urandom % 512; b = $urandom % 8;
      // clean
      ecc_rd = ecc_calc;
      #1 expect_out(4'b0000, 4'b0000, -1, '0, "clean");
      // single data bit
      ecc_rd = ecc_calc;
      ecc_rd[24*s +: 24] ^= syn_of(p, b);
      #1 expect_out(4'(1 << s), 4'(1 << s), s, {9'(p), 3'(b)}, "single bit");
      // one bit of the stored code
      ecc_rd = ecc_calc;
      cb = $urandom % 24;
      ecc_rd[24*s + cb] ^= 1'b1;
      #1 expect_out(4'(1 << s), 4'b0000, -1, '0, "code bit");
      // two data bits at different places
      p2 = (p + 1 + $urandom % 511) % 512; b2 = $urandom % 8;
      ecc_rd = ecc_calc;
      ecc_rd[24*s +: 24] ^= syn_of(p, b) ^ syn_of(p2, b2);
      #1 expect_out(4'(1 << s), 4'b0000, -1, '0, "double bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
