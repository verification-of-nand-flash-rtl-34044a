// tb_nfcm_top: end-to-end test of the NAND flash controller at its default
// sizes (2048-byte pages, 12 ECC bytes), against the behavioural flash model.
// The testbench acts as host: it fills and reads the page buffer over the BF
// port and issues commands. It runs reset, read ID, page program, page read
// (clean, one flipped data bit, erased page), program and erase with a
// failing status, erase, and an unused command code. For each operation it
// checks the bytes the flash latched (commands, addresses, data, ECC) in
// order, the data returned to the buffer, nfc_done and the error flags. The
// expected ECC is computed here bit by bit from the code's definition,
// independently of the controller's byte-wise generator. Every mechanism is
// counted, and one that never happened counts as a failure.
module tb_nfcm_top;
  import nfc_pkg::*;

  localparam int unsigned PAGE = 2048;
  localparam int unsigned NECC = 12;

  logic        CLK = 1'b0, RES = 1'b1;
  logic        BF_sel = 1'b0, BF_we = 1'b0;
  logic [10:0] BF_ad = '0;
  logic [7:0]  BF_din = '0, BF_dou;
  logic [15:0] RWA = '0;
  logic [2:0]  nfc_cmd = '0;
  logic        nfc_strt = 1'b0, nfc_done, PErr, EErr, RErr;
  logic [3:0]  ecc_bad, ecc_fix;
  logic [47:0] ecc_loc;
  logic        CLE, ALE, WE_n, RE_n, CE_n, R_nB;
  logic [7:0]  DIO_o, DIO_i;
  logic        DIO_oe;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_reset = 0, n_readid = 0, n_prog_ok = 0, n_prog_fail = 0, n_erase_ok = 0,
      n_erase_fail = 0, n_read_ok = 0, n_read_fix = 0, n_read_bad = 0,
      n_busy_wait = 0, n_unknown = 0, n_contention = 0;

  always #5 CLK = ~CLK;

  nfcm_top dut (.*);

  nand_flash_model u_flash (
    .clk (CLK), .CLE (CLE), .ALE (ALE), .WE_n (WE_n), .RE_n (RE_n), .CE_n (CE_n),
    .R_nB (R_nB), .din (DIO_o), .din_oe (DIO_oe), .dout (DIO_i)
  );

  // the controller must never drive DIO while reading
  always @(posedge CLK) if (!RES && !RE_n && DIO_oe) n_contention++;
  // count cycles the controller spends waiting on a busy flash
  always @(posedge CLK) if (!RES && !R_nB && !CE_n) n_busy_wait++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- reference ECC: bit-level definition of the sector code ------------
  function automatic logic [23:0] ref_code(input logic [7:0] d [PAGE], input int s);
    logic [23:0] c = '0;
    for (int p = 0; p < 512; p++)
      for (int b = 0; b < 8; b++)
        if (d[s*512 + p][b]) begin
          for (int k = 0; k < 9; k++) c[2*k + ((p >> k) & 1)] ^= 1'b1;
          for (int j = 0; j < 3; j++) c[18 + 2*j + ((b >> j) & 1)] ^= 1'b1;
        end
    return c;
  endfunction

  // ---- host port helpers ------------------------------------------------
  task automatic bf_write(input int a, input logic [7:0] d);
    @(negedge CLK);
    BF_sel = 1'b1; BF_we = 1'b1; BF_ad = 11'(a); BF_din = d;
    @(negedge CLK);
    BF_sel = 1'b0; BF_we = 1'b0;
  endtask

  task automatic bf_read(input int a, output logic [7:0] d);
    @(negedge CLK);
    BF_sel = 1'b1; BF_we = 1'b0; BF_ad = 11'(a);
    @(negedge CLK);
    BF_sel = 1'b0;
    d = BF_dou;
  endtask

  task automatic run_op(input logic [2:0] c, input logic [15:0] row, output int cycles);
    @(negedge CLK);
    nfc_cmd = c; RWA = row; nfc_strt = 1'b1;
    @(negedge CLK);
    nfc_strt = 1'b0;
    cycles = 1;
    check(!nfc_done, "nfc_done drops at start");
    while (!nfc_done && cycles < 100000) begin
      @(negedge CLK);
      cycles++;
    end
    check(nfc_done, "operation finishes");
  endtask

  // wait until the flash is ready again (after a reset command)
  task automatic wait_ready();
    repeat (4) @(negedge CLK);
    while (!R_nB) @(negedge CLK);
  endtask

  // ---- bus log helpers ---------------------------------------------------
  task automatic expect_byte(input logic [1:0] kind, input logic [7:0] b, input string what);
    logic [9:0] e;
    if (u_flash.log_q.size() == 0) begin
      check(1'b0, {what, ": bus log empty"});
      return;
    end
    e = u_flash.log_q.pop_front();
    check(e == {kind, b}, $sformatf("%s: got kind %0d byte %02h, want kind %0d byte %02h",
                                    what, e[9:8], e[7:0], kind, b));
  endtask

  task automatic expect_done_log(input string what);
    check(u_flash.log_q.size() == 0, $sformatf("%s: %0d unexpected bus bytes", what, u_flash.log_q.size()));
    u_flash.log_q.delete();
  endtask

  logic [7:0]  page_a [PAGE];
  logic [7:0]  ones   [PAGE];
  logic [23:0] code_a [4];
  logic [7:0]  rd;
  int          cyc;

  initial begin
    for (int i = 0; i < PAGE; i++) begin
      page_a[i] = 8'($urandom);
      ones[i]   = 8'hFF;
    end
    for (int s = 0; s < 4; s++) code_a[s] = ref_code(page_a, s);

    repeat (4) @(negedge CLK);
    RES = 1'b0;
    // pin activity before reset took effect is not part of the test
    u_flash.n_proto_err = 0;
    u_flash.log_q.delete();
    repeat (2) @(negedge CLK);

    // ---- reset ----
    run_op(CMD_RESET, 16'h0000, cyc);
    expect_byte(0, 8'hFF, "reset");
    expect_done_log("reset");
    check(!PErr && !EErr && !RErr, "reset: no error");
    n_reset++;
    wait_ready();

    // ---- read ID ----
    run_op(CMD_READID, 16'h0000, cyc);
    expect_byte(0, 8'h90, "read ID cmd");
    expect_byte(1, 8'h00, "read ID address");
    expect_done_log("read ID");
    for (int i = 0; i < 4; i++) begin
      bf_read(i, rd);
      check(rd == u_flash.ID_CODE[8*(3-i) +: 8], $sformatf("ID byte %0d = %02h", i, rd));
    end
    n_readid++;

    // ---- page program at row 6DDFh ----
    for (int i = 0; i < PAGE; i++) bf_write(i, page_a[i]);
    run_op(CMD_PROGRAM, 16'h6DDF, cyc);
    $display("page program took %0d cycles", cyc);
    // 2071 bytes on the bus at 7 clocks each, plus tWB, busy time and tWHR
    check(cyc >= 7 * 2071 && cyc <= 7 * 2071 + 10 + 40 + 6 + 20,
          $sformatf("page program length %0d clocks", cyc));
    expect_byte(0, 8'h80, "program cmd");
    expect_byte(1, 8'h00, "program CA0");
    expect_byte(1, 8'h00, "program CA1");
    expect_byte(1, 8'hDF, "program RA0");
    expect_byte(1, 8'h6D, "program RA1");
    for (int i = 0; i < PAGE; i++) expect_byte(2, page_a[i], $sformatf("program data %0d", i));
    expect_byte(0, 8'h85, "program 85h");
    expect_byte(1, 8'h00, "ECC CA0");
    expect_byte(1, 8'h08, "ECC CA1");
    for (int i = 0; i < NECC; i++)
      expect_byte(2, code_a[i/3][8*(i%3) +: 8], $sformatf("ECC byte %0d", i));
    expect_byte(0, 8'h10, "program 10h");
    expect_byte(0, 8'h70, "program status");
    expect_done_log("program");
    check(!PErr, "program passes");
    n_prog_ok++;

    // ---- page read, clean ----
    for (int i = 0; i < PAGE; i++) bf_write(i, 8'h00);
    run_op(CMD_READ, 16'h6DDF, cyc);
    $display("page read took %0d cycles", cyc);
    // 2070 bytes on the bus (no status byte, one command more) at 7 clocks
    // each, plus tWB and busy time
    check(cyc >= 7 * 2070 && cyc <= 7 * 2070 + 10 + 40 + 20,
          $sformatf("page read length %0d clocks", cyc));
    expect_byte(0, 8'h00, "read cmd");
    expect_byte(1, 8'h00, "read CA0");
    expect_byte(1, 8'h00, "read CA1");
    expect_byte(1, 8'hDF, "read RA0");
    expect_byte(1, 8'h6D, "read RA1");
    expect_byte(0, 8'h30, "read 30h");
    expect_byte(0, 8'h05, "read 05h");
    expect_byte(1, 8'h00, "read ECC CA0");
    expect_byte(1, 8'h08, "read ECC CA1");
    expect_byte(0, 8'hE0, "read E0h");
    expect_done_log("read");
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < PAGE; i++) begin
        bf_read(i, rd);
        if (rd != page_a[i]) bad++;
      end
      check(bad == 0, $sformatf("read data: %0d bytes differ", bad));
    end
    check(!RErr && ecc_bad == 4'b0000, "clean read: no ECC error");
    if (!RErr) n_read_ok++;

    // ---- page read with one flipped bit in sector 1 ----
    u_flash.inj_row  = 32'h6DDF;
    u_flash.inj_col  = 700;
    u_flash.inj_mask = 8'h20;
    u_flash.inj_en   = 1'b1;
    run_op(CMD_READ, 16'h6DDF, cyc);
    u_flash.log_q.delete();
    check(RErr, "flipped bit raises RErr");
    check(ecc_bad == 4'b0010 && ecc_fix == 4'b0010, $sformatf("bad/fix = %b/%b", ecc_bad, ecc_fix));
    check(ecc_loc[12 +: 12] == {9'(700 - 512), 3'd5}, $sformatf("error location %h", ecc_loc[12 +: 12]));
    bf_read(700, rd);
    check(rd == (page_a[700] ^ 8'h20), "buffer holds the byte as read");
    if (RErr && ecc_fix == 4'b0010) n_read_fix++;

    // ---- page read with two flipped bits: detected, not correctable ----
    u_flash.inj_row  = 32'h6DDF;
    u_flash.inj_col  = 3;
    u_flash.inj_mask = 8'h81;
    u_flash.inj_en   = 1'b1;
    run_op(CMD_READ, 16'h6DDF, cyc);
    u_flash.log_q.delete();
    check(RErr && ecc_bad == 4'b0001 && ecc_fix == 4'b0000, "double bit error detected, not correctable");
    if (RErr && ecc_fix == 4'b0000) n_read_bad++;

    // ---- program that fails ----
    u_flash.fail_next = 1'b1;
    run_op(CMD_PROGRAM, 16'h0041, cyc);
    u_flash.log_q.delete();
    check(PErr && !EErr, "failing program raises PErr");
    if (PErr) n_prog_fail++;

    // ---- erase that fails, then erase that passes ----
    u_flash.fail_next = 1'b1;
    run_op(CMD_ERASE, 16'h6DDF, cyc);
    expect_byte(0, 8'h60, "erase cmd");
    expect_byte(1, 8'hDF, "erase RA0");
    expect_byte(1, 8'h6D, "erase RA1");
    expect_byte(0, 8'hD0, "erase D0h");
    expect_byte(0, 8'h70, "erase status");
    expect_done_log("erase");
    check(EErr && !PErr, "failing erase raises EErr");
    if (EErr) n_erase_fail++;
    run_op(CMD_ERASE, 16'h6DDF, cyc);
    u_flash.log_q.delete();
    check(!EErr, "erase passes, EErr cleared");
    if (!EErr) n_erase_ok++;

    // ---- read of the erased page: all FFh, ECC mismatch reported ----
    run_op(CMD_READ, 16'h6DDF, cyc);
    u_flash.log_q.delete();
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < PAGE; i += 97) begin
        bf_read(i, rd);
        if (rd != 8'hFF) bad++;
      end
      check(bad == 0, "erased page reads FFh");
    end
    check(RErr && ecc_fix == 4'b0000, "erased page: stored FFh ECC does not match");
    // the reference code of an all-FFh page is zero
    check(ref_code(ones, 0) == 24'h0, "reference code of FFh page");

    // ---- unused command code ----
    run_op(3'b111, 16'h0000, cyc);
    check(u_flash.log_q.size() == 0, "unused command makes no bus traffic");
    check(cyc < 10, "unused command ends at once");
    n_unknown++;

    // ---- mechanism coverage ----
    check(n_contention == 0, "no DIO contention");
    check(u_flash.n_proto_err == 0, $sformatf("flash saw %0d protocol errors", u_flash.n_proto_err));
    $display("mechanisms: reset %0d readid %0d prog_ok %0d prog_fail %0d erase_ok %0d erase_fail %0d read_ok %0d read_fix %0d read_bad %0d busy_wait %0d unknown %0d",
             n_reset, n_readid, n_prog_ok, n_prog_fail, n_erase_ok, n_erase_fail, n_read_ok, n_read_fix, n_read_bad, n_busy_wait, n_unknown);
    check(n_reset > 0, "reset happened");
    check(n_readid > 0, "read ID happened");
    check(n_prog_ok > 0, "program pass happened");
    check(n_prog_fail > 0, "program fail happened");
    check(n_erase_ok > 0, "erase pass happened");
    check(n_erase_fail > 0, "erase fail happened");
    check(n_read_ok > 0, "clean read happened");
    check(n_read_fix > 0, "single-bit ECC error happened");
    check(n_read_bad > 0, "multi-bit ECC error happened");
    check(n_busy_wait > 0, "busy wait happened");
    check(n_unknown > 0, "unused command happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge CLK);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
