// nfc_tb_pkg: class-based verification environment for the NAND flash
// controller: transaction, generator, driver, monitor, scoreboard and
// environment, connected by mailboxes.
//
// The generator makes random host transactions (reset, read ID, erase,
// program, read) on a small set of rows so that reads find programmed pages,
// with random page data, random program/erase failures and random single or
// double bit flips on reads. Each transaction goes to the driver and a copy
// to the scoreboard. The driver loads the page buffer, sets the flash
// model's test controls, issues the command, waits for nfc_done and, after a
// read or read ID, reads the buffer back. The monitor watches only the
// interface: it records each command at nfc_strt, the flags at nfc_done and
// every byte the buffer returns, and passes the result to the scoreboard.
// The scoreboard keeps its own model of the flash contents (page data per
// row, whole 64-page blocks cleared by an erase) and compares flags, ECC
// classification and location, and data. The monitor hands a transaction
// over when the next one starts, so the generator ends every run with a
// reset that only closes the one before it.
package nfc_tb_pkg;

  localparam int PAGE   = 2048;
  localparam int BLOCK  = 64;
  localparam logic [31:0] ID_CODE = 32'h9510_DAEC;

  typedef enum logic [2:0] {
    T_PROGRAM = 3'b001, T_READ = 3'b010, T_RESET = 3'b011,
    T_ERASE = 3'b100, T_READID = 3'b101
  } tcmd_e;

  class nfc_txn;
    tcmd_e       cmd;
    logic [15:0] row;
    logic [7:0]  data [PAGE];
    bit          fail;            // program/erase status fails
    int          flips;           // bits flipped on a read: 0, 1 or 2
    int          flip_col;
    logic [7:0]  flip_mask;
    // observed
    logic        perr, eerr, rerr;
    logic [3:0]  ecc_bad, ecc_fix;
    logic [47:0] ecc_loc;
    logic [7:0]  rd [$];
    int          cycles;
  endclass

  class nfc_generator;
    mailbox #(nfc_txn) to_drv, to_sb;
    int n;
    function new(mailbox #(nfc_txn) d, mailbox #(nfc_txn) s, int count);
      to_drv = d; to_sb = s; n = count;
    endfunction
    task run();
      nfc_txn t;
      for (int i = 0; i < n; i++) begin
        int r;
        t = new();
        r = $urandom % 100;
        t.cmd = (i == 0 || i == n - 1) ? T_RESET :
                (r < 5)  ? T_RESET :
                (r < 10) ? T_READID :
                (r < 18) ? T_ERASE :
                (r < 55) ? T_PROGRAM : T_READ;
        // rows in two blocks, four pages each
        t.row = 16'(((($urandom % 2) * BLOCK) + ($urandom % 4)) | 16'h6D00);
        for (int j = 0; j < PAGE; j++) t.data[j] = 8'($urandom);
        t.fail  = ($urandom % 4) == 0;
        r = $urandom % 10;
        t.flips = (r < 6) ? 0 : (r < 9) ? 1 : 2;
        t.flip_col = $urandom % PAGE;
        if (t.flips == 1) t.flip_mask = 8'(1 << ($urandom % 8));
        else begin
          int b1, b2;
          b1 = $urandom % 8;
          b2 = (b1 + 1 + $urandom % 7) % 8;
          t.flip_mask = 8'((1 << b1) | (1 << b2));
        end
        to_sb.put(t);
        to_drv.put(t);
      end
    endtask
  endclass

  class nfc_driver;
    virtual nfc_host_if vif;
    mailbox #(nfc_txn) from_gen;
    function new(virtual nfc_host_if v, mailbox #(nfc_txn) g);
      vif = v; from_gen = g;
    endfunction
    task init();
      vif.BF_sel = 0; vif.BF_we = 0; vif.BF_ad = 0; vif.BF_din = 0;
      vif.RWA = 0; vif.nfc_cmd = 0; vif.nfc_strt = 0;
      vif.set_fail = 0; vif.set_inj = 0; vif.inj_row = 0; vif.inj_col = 0; vif.inj_mask = 0;
    endtask
    task run(int n);
      nfc_txn t;
      for (int i = 0; i < n; i++) begin
        from_gen.get(t);
        if (t.cmd == T_PROGRAM)
          for (int j = 0; j < PAGE; j++) begin
            @(negedge vif.clk);
            vif.BF_sel = 1; vif.BF_we = 1; vif.BF_ad = 11'(j); vif.BF_din = t.data[j];
          end
        @(negedge vif.clk);
        vif.BF_sel = 0; vif.BF_we = 0;
        if ((t.cmd == T_PROGRAM || t.cmd == T_ERASE) && t.fail) vif.set_fail = 1;
        if (t.cmd == T_READ && t.flips > 0) begin
          vif.set_inj = 1; vif.inj_row = t.row; vif.inj_col = 12'(t.flip_col); vif.inj_mask = t.flip_mask;
        end
        @(negedge vif.clk);
        vif.set_fail = 0; vif.set_inj = 0;
        vif.nfc_cmd = t.cmd; vif.RWA = t.row; vif.nfc_strt = 1;
        @(negedge vif.clk);
        vif.nfc_strt = 0;
        while (!vif.nfc_done) @(negedge vif.clk);
        if (t.cmd == T_READ || t.cmd == T_READID)
          for (int j = 0; j < ((t.cmd == T_READ) ? PAGE : 4); j++) begin
            vif.BF_sel = 1; vif.BF_we = 0; vif.BF_ad = 11'(j);
            @(negedge vif.clk);
          end
        vif.BF_sel = 0;
        // after a reset the flash is busy for a while
        repeat ((t.cmd == T_RESET) ? 80 : 2) @(negedge vif.clk);
      end
    endtask
  endclass

  class nfc_monitor;
    virtual nfc_host_if vif;
    mailbox #(nfc_txn) to_sb;
    function new(virtual nfc_host_if v, mailbox #(nfc_txn) s);
      vif = v; to_sb = s;
    endfunction
    task run();
      nfc_txn t;
      logic   rd_pend, rd_cmd, busy_seen;
      t = null;
      rd_pend = 0;
      rd_cmd = 0;
      busy_seen = 0;
      forever begin
        @(posedge vif.clk);
        if (rd_pend && t != null && rd_cmd) t.rd.push_back(vif.BF_dou);
        rd_pend = vif.BF_sel && !vif.BF_we;
        if (vif.nfc_strt) begin
          if (t != null) to_sb.put(t);
          t = new();
          t.cmd = tcmd_e'(vif.nfc_cmd);
          t.row = vif.RWA;
          t.cycles = 0;
          rd_cmd = 0;
          busy_seen = 0;
        end else if (t != null && !vif.nfc_done) begin
          t.cycles++;
          busy_seen = 1;
        end
        // flags are taken once nfc_done has dropped and risen again
        if (t != null && busy_seen && vif.nfc_done && !rd_cmd) begin
          t.perr = vif.PErr; t.eerr = vif.EErr; t.rerr = vif.RErr;
          t.ecc_bad = vif.ecc_bad; t.ecc_fix = vif.ecc_fix; t.ecc_loc = vif.ecc_loc;
          rd_cmd = 1;
        end
      end
    endtask
  endclass

  class nfc_scoreboard;
    mailbox #(nfc_txn) from_gen, from_mon;
    logic [7:0] store [int][PAGE];
    int checks, failures;
    int n_cmd [8];
    int n_prog_fail, n_erase_fail, n_fix, n_multi, n_erased_read, n_clean_read;
    function new(mailbox #(nfc_txn) g, mailbox #(nfc_txn) m);
      from_gen = g; from_mon = m; checks = 0; failures = 0;
      n_prog_fail = 0; n_erase_fail = 0; n_fix = 0; n_multi = 0; n_erased_read = 0; n_clean_read = 0;
      foreach (n_cmd[i]) n_cmd[i] = 0;
    endfunction
    function void check(bit c, string what);
      checks++;
      if (!c) begin failures++; $display("SCOREBOARD FAIL: %s", what); end
    endfunction
    task compare_one();
      nfc_txn e, a;
      from_gen.get(e);
      from_mon.get(a);
      n_cmd[e.cmd]++;
      check(a.cmd == e.cmd && a.row == e.row, $sformatf("command %0d/%h seen as %0d/%h", e.cmd, e.row, a.cmd, a.row));
      unique case (e.cmd)
        T_PROGRAM: begin
          check(a.perr == e.fail && !a.eerr && !a.rerr, $sformatf("program flags P%b E%b R%b", a.perr, a.eerr, a.rerr));
          store[int'(e.row)] = e.data;
          if (e.fail) n_prog_fail++;
        end
        T_ERASE: begin
          int blk;
          check(a.eerr == e.fail && !a.perr && !a.rerr, $sformatf("erase flags P%b E%b R%b", a.perr, a.eerr, a.rerr));
          blk = int'(e.row) / BLOCK;
          for (int p = 0; p < BLOCK; p++) store.delete(blk * BLOCK + p);
          if (e.fail) n_erase_fail++;
        end
        T_READID: begin
          check(a.rd.size() == 4, "read ID returns 4 bytes");
          for (int i = 0; i < 4 && i < a.rd.size(); i++)
            check(a.rd[i] == ID_CODE[8*(3-i) +: 8], $sformatf("ID byte %0d = %02h", i, a.rd[i]));
        end
        T_READ: begin
          logic [7:0] exp [PAGE];
          int sec, bad;
          bit written;
          written = store.exists(int'(e.row));
          for (int i = 0; i < PAGE; i++) exp[i] = written ? store[int'(e.row)][i] : 8'hFF;
          if (e.flips > 0) exp[e.flip_col] ^= e.flip_mask;
          sec = e.flip_col / 512;
          bad = 0;
          check(a.rd.size() == PAGE, "read returns a page");
          for (int i = 0; i < PAGE && i < a.rd.size(); i++) if (a.rd[i] != exp[i]) bad++;
          check(bad == 0, $sformatf("read row %h: %0d bytes differ", e.row, bad));
          check(!a.perr && !a.eerr, "read: no program/erase flag");
          if (!written) begin
            // an erased sector holds FFh in place of its code; only a sector
            // with one flipped bit can look like a correctable error
            logic [3:0] fix_ok;
            fix_ok = (e.flips == 1) ? 4'(1 << sec) : 4'h0;
            check(a.rerr && a.ecc_bad == 4'hF && (a.ecc_fix & ~fix_ok) == 4'h0, "erased page: all sectors mismatch");
            n_erased_read++;
          end else if (e.flips == 0) begin
            check(!a.rerr && a.ecc_bad == 0, "clean read");
            n_clean_read++;
          end else if (e.flips == 1) begin
            int bitpos;
            for (int b = 0; b < 8; b++) if (e.flip_mask[b]) bitpos = b;
            check(a.rerr && a.ecc_bad == 4'(1 << sec) && a.ecc_fix == 4'(1 << sec), "single flip: one fixable sector");
            check(a.ecc_loc[12*sec +: 12] == {9'(e.flip_col % 512), 3'(bitpos)},
                  $sformatf("single flip location %h, want byte %0d bit %0d", a.ecc_loc[12*sec +: 12], e.flip_col % 512, bitpos));
            n_fix++;
          end else begin
            check(a.rerr && a.ecc_bad == 4'(1 << sec) && a.ecc_fix == 4'h0, "double flip: detected, not fixable");
            n_multi++;
          end
        end
        default: check(!a.perr && !a.eerr && !a.rerr, "reset: no flags");
      endcase
    endtask
  endclass

  class nfc_env;
    mailbox #(nfc_txn) g2d, g2s, m2s;
    nfc_generator gen;
    nfc_driver    drv;
    nfc_monitor   mon;
    nfc_scoreboard sb;
    int n;
    function new(virtual nfc_host_if vif, int count);
      n = count;
      g2d = new(); g2s = new(); m2s = new();
      gen = new(g2d, g2s, count);
      drv = new(vif, g2d);
      mon = new(vif, m2s);
      sb  = new(g2s, m2s);
    endfunction
    task run();
      drv.init();
      fork
        gen.run();
        mon.run();
      join_none
      fork
        drv.run(n);
        for (int i = 0; i < n - 1; i++) sb.compare_one();
      join
    endtask
  endclass

endpackage
