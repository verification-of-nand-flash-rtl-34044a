// tb_nfc_random: constrained-random style test of the NAND flash controller
// at its default sizes, built as a layered environment (see nfc_tb_pkg):
// generator -> driver -> host interface -> controller -> flash model, and
// monitor -> scoreboard against the generator's copy. It runs N_TXN random
// host transactions (reset, read ID, erase, program, read with and without
// injected bit errors, failing programs and erases) on full 2048-byte pages
// and checks every result against the scoreboard's own flash model. It also
// fails if any kind of transaction or outcome never occurred.
module tb_nfc_random;
  import nfc_tb_pkg::*;
  localparam int N_TXN = 120;

  logic clk = 1'b0, RES = 1'b1;
  always #5 clk = ~clk;

  nfc_host_if hif (clk);

  logic       CLE, ALE, WE_n, RE_n, CE_n, R_nB, DIO_oe;
  logic [7:0] DIO_o, DIO_i;

  nfcm_top dut (
    .CLK (clk), .RES (RES),
    .BF_sel (hif.BF_sel), .BF_ad (hif.BF_ad), .BF_din (hif.BF_din), .BF_we (hif.BF_we),
    .BF_dou (hif.BF_dou), .RWA (hif.RWA), .nfc_cmd (hif.nfc_cmd), .nfc_strt (hif.nfc_strt),
    .nfc_done (hif.nfc_done), .PErr (hif.PErr), .EErr (hif.EErr), .RErr (hif.RErr),
    .ecc_bad (hif.ecc_bad), .ecc_fix (hif.ecc_fix), .ecc_loc (hif.ecc_loc),
    .CLE, .ALE, .WE_n, .RE_n, .CE_n, .R_nB, .DIO_o, .DIO_oe, .DIO_i
  );

  nand_flash_model u_flash (
    .clk (clk), .CLE, .ALE, .WE_n, .RE_n, .CE_n, .R_nB,
    .din (DIO_o), .din_oe (DIO_oe), .dout (DIO_i)
  );

  // test controls from the driver to the flash model
  always @(posedge clk) begin
    if (hif.set_fail) u_flash.fail_next = 1'b1;
    if (hif.set_inj) begin
      u_flash.inj_row  = 32'(hif.inj_row);
      u_flash.inj_col  = 32'(hif.inj_col);
      u_flash.inj_mask = hif.inj_mask;
      u_flash.inj_en   = 1'b1;
    end
  end

  int checks = 0, failures = 0;
  nfc_tb_pkg::nfc_env env;

  initial begin
    env = new(hif, N_TXN);
    env.drv.init();
    repeat (4) @(negedge clk);
    RES = 1'b0;
    u_flash.n_proto_err = 0;
    u_flash.log_q.delete();
    env.run();
    checks   = env.sb.checks;
    failures = env.sb.failures;
    $display("commands: program %0d read %0d reset %0d erase %0d readid %0d",
             env.sb.n_cmd[1], env.sb.n_cmd[2], env.sb.n_cmd[3], env.sb.n_cmd[4], env.sb.n_cmd[5]);
    $display("outcomes: prog_fail %0d erase_fail %0d clean %0d single %0d double %0d erased %0d",
             env.sb.n_prog_fail, env.sb.n_erase_fail, env.sb.n_clean_read, env.sb.n_fix,
             env.sb.n_multi, env.sb.n_erased_read);
    checks++;
    if (u_flash.n_proto_err != 0) begin failures++; $display("FAIL: flash protocol errors"); end
    for (int c = 1; c <= 5; c++) begin
      checks++;
      if (env.sb.n_cmd[c] == 0) begin failures++; $display("FAIL: command %0d never ran", c); end
    end
    checks++;
    if (env.sb.n_prog_fail == 0 || env.sb.n_erase_fail == 0 || env.sb.n_clean_read == 0 ||
        env.sb.n_fix == 0 || env.sb.n_multi == 0 || env.sb.n_erased_read == 0) begin
      failures++;
      $display("FAIL: an outcome never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
