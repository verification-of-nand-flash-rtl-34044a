// tb_MFSM: self-checking test of the main FSM on its own, at its default
// sizes. The timing FSM is replaced by a responder that records every step
// (type and byte), answers after a random delay and returns queued bytes for
// read steps; the buffer is a reference array with one clock of read
// latency; the ECC generator is replaced by a fixed ECC byte pattern. The
// real address counter is used. For each host command the recorded step
// list is compared with the expected operation flow, and the buffer
// contents, the ECC bytes captured for the detector, the ECC generator feed,
// nfc_done and the error flags are checked.
module tb_MFSM;
  import nfc_pkg::*;
  localparam int PAGE = 2048, NECC = 12;

  logic        clk = 1'b0, rst = 1'b1;
  logic [2:0]  nfc_cmd = '0;
  logic        nfc_strt = 1'b0;
  logic [15:0] RWA = '0;
  logic        nfc_done, PErr, EErr, RErr;
  logic        tf_start, tf_ce, tf_done = 1'b0, tf_busy = 1'b0;
  tf_op_e      tf_op;
  logic [7:0]  tf_din, tf_dout = '0;
  logic        ac_clr, ac_inc, ac_changed;
  logic [11:0] ac_cnt;
  logic        bf_en, bf_we;
  logic [10:0] bf_addr;
  logic [7:0]  bf_din, bf_dout;
  logic        ecc_clr, ecc_en;
  logic [10:0] ecc_addr;
  logic [7:0]  ecc_din, ecc_byte;
  logic [3:0]  ecc_idx;
  logic [95:0] ecc_rd;
  logic        ecc_err = 1'b0;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  MFSM dut (.*);
  Acounter #(.WIDTH(12)) u_ac (.clk, .rst, .clr(ac_clr), .inc(ac_inc), .cnt(ac_cnt), .changed(ac_changed));

  // buffer stand-in
  logic [7:0] bmem [PAGE];
  always @(posedge clk) if (bf_en) begin
    bf_dout <= bmem[bf_addr];
    if (bf_we) bmem[bf_addr] <= bf_din;
  end
  // ECC generator stand-in
  assign ecc_byte = 8'hA0 ^ 8'(ecc_idx);
  logic [7:0]  feed_q [$];
  int          feed_bad = 0;
  always @(posedge clk) if (ecc_en) begin
    feed_q.push_back(ecc_din);
    if (int'(ecc_addr) != feed_q.size() - 1) feed_bad++;
  end

  // timing FSM responder
  logic [10:0] step_q [$];          // {op, byte}
  logic [7:0]  resp_q [$];
  int          tf_overlap = 0;
  initial begin
    forever begin
      @(posedge clk);
      tf_done <= 1'b0;
      if (tf_start) begin
        if (tf_busy) tf_overlap++;
        step_q.push_back({tf_op, tf_din});
        tf_busy <= 1'b1;
        repeat (1 + $urandom % 3) @(posedge clk);
        if (tf_op == TF_DRD) tf_dout <= (resp_q.size() > 0) ? resp_q.pop_front() : 8'h00;
        tf_done <= 1'b1;
        @(posedge clk);
        tf_done <= 1'b0;
        tf_busy <= 1'b0;
      end
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input logic [2:0] c, input logic [15:0] row);
    int n = 0;
    step_q.delete();
    feed_q.delete();
    @(negedge clk);
    nfc_cmd = c; RWA = row; nfc_strt = 1'b1;
    @(negedge clk);
    nfc_strt = 1'b0;
    check(!nfc_done, "done drops at start");
    while (!nfc_done && n < 200000) begin @(negedge clk); n++; end
    check(nfc_done, "operation ends");
    check(!tf_ce, "CE released at the end");
  endtask

  task automatic step(input tf_op_e o, input logic [7:0] b, input string what);
    logic [10:0] e;
    if (step_q.size() == 0) begin check(1'b0, {what, ": missing step"}); return; end
    e = step_q.pop_front();
    if (o == TF_DRD || o == TF_WB || o == TF_RB || o == TF_WHR)
      check(e[10:8] == o, $sformatf("%s: step %0d want %0d", what, e[10:8], o));
    else
      check(e == {o, b}, $sformatf("%s: step %0d/%02h want %0d/%02h", what, e[10:8], e[7:0], o, b));
  endtask

  logic [7:0] data [PAGE];

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // reset
    run(CMD_RESET, 16'h1234);
    step(TF_CMD, 8'hFF, "reset");
    check(step_q.size() == 0, "reset: one step");

    // read ID: 4 bytes into buffer 0..3
    resp_q = '{8'h2C, 8'hDA, 8'h90, 8'h95};
    run(CMD_READID, 16'h0);
    step(TF_CMD, 8'h90, "id cmd");
    step(TF_ADR, 8'h00, "id addr");
    for (int i = 0; i < 4; i++) step(TF_DRD, 0, "id read");
    check(step_q.size() == 0, "id: no extra steps");
    check(bmem[0] == 8'h2C && bmem[1] == 8'hDA && bmem[2] == 8'h90 && bmem[3] == 8'h95, "id bytes in buffer");

    // erase, pass then fail
    for (int f = 0; f < 2; f++) begin
      resp_q = '{f ? 8'hC1 : 8'hC0};
      run(CMD_ERASE, 16'hABCD);
      step(TF_CMD, 8'h60, "erase cmd");
      step(TF_ADR, 8'hCD, "erase RA0");
      step(TF_ADR, 8'hAB, "erase RA1");
      step(TF_CMD, 8'hD0, "erase D0");
      step(TF_WB, 0, "erase tWB");
      step(TF_RB, 0, "erase R_nB");
      step(TF_CMD, 8'h70, "erase status");
      step(TF_WHR, 0, "erase tWHR");
      step(TF_DRD, 0, "erase status read");
      check(step_q.size() == 0, "erase: no extra steps");
      check(EErr == f[0] && !PErr && !RErr, $sformatf("erase error flags, fail=%0d", f));
    end

    // program, pass then fail
    for (int i = 0; i < PAGE; i++) begin data[i] = 8'($urandom); bmem[i] = data[i]; end
    for (int f = 0; f < 2; f++) begin
      resp_q = '{f ? 8'hC1 : 8'hC0};
      run(CMD_PROGRAM, 16'h6DDF);
      step(TF_CMD, 8'h80, "prog cmd");
      step(TF_ADR, 8'h00, "prog CA0");
      step(TF_ADR, 8'h00, "prog CA1");
      step(TF_ADR, 8'hDF, "prog RA0");
      step(TF_ADR, 8'h6D, "prog RA1");
      for (int i = 0; i < PAGE; i++) step(TF_DWR, data[i], $sformatf("prog data %0d", i));
      step(TF_CMD, 8'h85, "prog 85");
      step(TF_ADR, 8'h00, "prog ECC CA0");
      step(TF_ADR, 8'h08, "prog ECC CA1");
      for (int i = 0; i < NECC; i++) step(TF_DWR, 8'hA0 ^ 8'(i), "prog ecc");
      step(TF_CMD, 8'h10, "prog 10");
      step(TF_WB, 0, "prog tWB");
      step(TF_RB, 0, "prog R_nB");
      step(TF_CMD, 8'h70, "prog status");
      step(TF_WHR, 0, "prog tWHR");
      step(TF_DRD, 0, "prog status read");
      check(step_q.size() == 0, "prog: no extra steps");
      check(PErr == f[0] && !EErr, $sformatf("program flags, fail=%0d", f));
      check(feed_q.size() == PAGE, $sformatf("ECC fed %0d bytes", feed_q.size()));
      begin
        int bad;
        bad = 0;
        for (int i = 0; i < PAGE && i < feed_q.size(); i++) if (feed_q[i] != data[i]) bad++;
        check(bad == 0 && feed_bad == 0, "ECC fed the page in order");
      end
    end

    // page read, ECC match then mismatch
    for (int f = 0; f < 2; f++) begin
      resp_q.delete();
      for (int i = 0; i < PAGE; i++) begin data[i] = 8'($urandom); resp_q.push_back(data[i]); end
      for (int i = 0; i < NECC; i++) resp_q.push_back(8'h30 + 8'(i));
      ecc_err = f[0];
      feed_bad = 0;
      run(CMD_READ, 16'h0102);
      step(TF_CMD, 8'h00, "read cmd");
      step(TF_ADR, 8'h00, "read CA0");
      step(TF_ADR, 8'h00, "read CA1");
      step(TF_ADR, 8'h02, "read RA0");
      step(TF_ADR, 8'h01, "read RA1");
      step(TF_CMD, 8'h30, "read 30");
      step(TF_WB, 0, "read tWB");
      step(TF_RB, 0, "read R_nB");
      for (int i = 0; i < PAGE; i++) step(TF_DRD, 0, "read data");
      step(TF_CMD, 8'h05, "read 05");
      step(TF_ADR, 8'h00, "read ECC CA0");
      step(TF_ADR, 8'h08, "read ECC CA1");
      step(TF_CMD, 8'hE0, "read E0");
      for (int i = 0; i < NECC; i++) step(TF_DRD, 0, "read ecc");
      check(step_q.size() == 0, "read: no extra steps");
      check(RErr == f[0] && !PErr && !EErr, $sformatf("read flags, ecc_err=%0d", f));
      begin
        int bad;
        bad = 0;
        for (int i = 0; i < PAGE; i++) if (bmem[i] != data[i]) bad++;
        check(bad == 0, $sformatf("read: %0d buffer bytes wrong", bad));
        bad = 0;
        for (int i = 0; i < PAGE && i < feed_q.size(); i++) if (feed_q[i] != data[i]) bad++;
        check(feed_q.size() == PAGE && bad == 0 && feed_bad == 0, "read: ECC fed the page");
      end
      for (int i = 0; i < NECC; i++)
        check(ecc_rd[8*i +: 8] == 8'h30 + 8'(i), $sformatf("captured ECC byte %0d", i));
    end
    ecc_err = 1'b0;

    // unused code
    run(3'b000, 16'h0);
    check(step_q.size() == 0, "unused command: no steps");
    // start ignored while busy: issue a second start during an erase
    resp_q = '{8'hC0};
    step_q.delete();
    @(negedge clk);
    nfc_cmd = CMD_ERASE; nfc_strt = 1'b1;
    @(negedge clk);
    nfc_cmd = CMD_RESET;
    repeat (3) @(negedge clk);
    nfc_strt = 1'b0;
    while (!nfc_done) @(negedge clk);
    check(step_q.size() == 9, $sformatf("second start while busy ignored (%0d steps)", step_q.size()));
    check(tf_overlap == 0, "no step requested while the timing FSM was busy");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
