// nand_flash_model: behavioural model of an 8-bit NAND flash chip, for
// simulation only (not synthesizable). It stands in for the flash device
// the controller drives.
//
// Organisation: PAGE_BYTES data bytes plus SPARE_BYTES spare bytes per page,
// PAGES_PER_BLOCK pages per erase block, rows addressed by two row bytes.
// Pages never written read as FFh. The model samples the pins on the rising
// edge of clk (the controller's clock): a byte is taken when WE_n is seen
// rising with CE_n low, as a command if CLE is high, as an address byte if
// ALE is high, otherwise as data into the page register. A falling RE_n with
// CE_n low puts the next output byte on dout one clock later.
// Commands: FFh reset, 90h read ID (+1 address byte, 4 ID bytes),
// 60h/D0h block erase (2 row bytes), 80h/85h/10h page program (2 column +
// 2 row bytes, 85h takes 2 new column bytes), 00h/30h page read, 05h/E0h
// change read column, 70h read status. After D0h, 10h, 30h and FFh R_nB
// drops two clocks later and rises BUSY_CYCLES clocks after that.
// Test hooks: fail_next makes the next erase or program report failure in
// status bit 0; inj_row/inj_col/inj_mask (inj_en) flip bits of one byte when
// that page is next loaded by 30h. Counters and a log of the bytes latched
// let a testbench check the bus traffic.
module nand_flash_model #(
  parameter int unsigned PAGE_BYTES      = 2048,
  parameter int unsigned SPARE_BYTES     = 64,
  parameter int unsigned PAGES_PER_BLOCK = 64,
  parameter int unsigned BUSY_CYCLES     = 40,
  parameter logic [31:0] ID_CODE         = 32'h9510_DAEC
) (
  input  logic       clk,
  input  logic       CLE,
  input  logic       ALE,
  input  logic       WE_n,
  input  logic       RE_n,
  input  logic       CE_n,
  output logic       R_nB,
  input  logic [7:0] din,
  input  logic       din_oe,
  output logic [7:0] dout
);
  localparam int unsigned FULL = PAGE_BYTES + SPARE_BYTES;

  typedef logic [7:0] page_t [FULL];
  page_t       mem [int unsigned];
  logic [7:0]  preg [FULL];

  typedef enum { M_NONE, M_ID, M_STATUS, M_DATA } rmode_e;

  logic [7:0]  cmd;
  int unsigned nadr;
  logic [7:0]  adr [4];
  int unsigned col, row, id_idx;
  rmode_e      rmode;
  logic [7:0]  status;
  logic        we_q, re_q;
  int          busy_cnt, busy_delay;

  // test hooks
  bit          fail_next;
  bit          inj_en;
  int unsigned inj_row, inj_col;
  logic [7:0]  inj_mask;
  // observation
  int unsigned n_cmd, n_adr, n_din, n_dout, n_busy, n_proto_err;
  logic [9:0]  log_q [$];      // {kind[1:0], byte}: 0 cmd, 1 address, 2 data

  initial begin
    cmd = 8'h00; nadr = 0; col = 0; row = 0; id_idx = 0; rmode = M_NONE;
    status = 8'hC0; we_q = 1'b1; re_q = 1'b1; busy_cnt = 0; busy_delay = 0;
    R_nB = 1'b1; dout = 8'h00;
    fail_next = 0; inj_en = 0; inj_row = 0; inj_col = 0; inj_mask = 8'h00;
    n_cmd = 0; n_adr = 0; n_din = 0; n_dout = 0; n_busy = 0; n_proto_err = 0;
    for (int i = 0; i < FULL; i++) preg[i] = 8'hFF;
  end

  function automatic void go_busy();
    busy_delay = 2;
    n_busy++;
  endfunction

  function automatic void load_page(int unsigned r);
    for (int i = 0; i < FULL; i++) preg[i] = mem.exists(r) ? mem[r][i] : 8'hFF;
    if (inj_en && inj_row == r) begin
      preg[inj_col] ^= inj_mask;
      inj_en = 0;
    end
  endfunction

  function automatic void latch_cmd(logic [7:0] c);
    cmd  = c;
    nadr = 0;
    n_cmd++;
    log_q.push_back({2'd0, c});
    unique case (c)
      8'hFF: begin rmode = M_NONE; status = 8'hC0; go_busy(); end
      8'h90: begin rmode = M_ID; id_idx = 0; end
      8'h60, 8'h00, 8'h05, 8'h85: ;
      8'h80: for (int i = 0; i < FULL; i++) preg[i] = 8'hFF;
      8'hD0: begin
        int unsigned blk;
        blk = row / PAGES_PER_BLOCK;
        for (int p = 0; p < PAGES_PER_BLOCK; p++) mem.delete(blk * PAGES_PER_BLOCK + p);
        status = fail_next ? 8'hC1 : 8'hC0;
        fail_next = 0;
        go_busy();
      end
      8'h10: begin
        page_t pg;
        for (int i = 0; i < FULL; i++) pg[i] = preg[i];
        mem[row] = pg;
        status = fail_next ? 8'hC1 : 8'hC0;
        fail_next = 0;
        go_busy();
      end
      8'h30: begin load_page(row); rmode = M_DATA; go_busy(); end
      8'hE0: rmode = M_DATA;
      8'h70: rmode = M_STATUS;
      default: n_proto_err++;
    endcase
  endfunction

  function automatic void latch_adr(logic [7:0] a);
    n_adr++;
    log_q.push_back({2'd1, a});
    if (nadr < 4) adr[nadr] = a;
    nadr++;
    unique case (cmd)
      8'h60: if (nadr == 2) row = 32'({adr[1], adr[0]});
      8'h00, 8'h80: if (nadr == 4) begin
        col = 32'({adr[1], adr[0]});
        row = 32'({adr[3], adr[2]});
      end
      8'h85, 8'h05: if (nadr == 2) col = 32'({adr[1], adr[0]});
      8'h90: ;
      default: n_proto_err++;
    endcase
  endfunction

  always @(posedge clk) begin
    // busy timing
    if (busy_delay > 0) begin
      busy_delay--;
      if (busy_delay == 0) begin
        R_nB     <= 1'b0;
        busy_cnt = BUSY_CYCLES;
      end
    end else if (busy_cnt > 0) begin
      busy_cnt--;
      if (busy_cnt == 0) R_nB <= 1'b1;
    end
    // write strobe
    if (!we_q && WE_n && !CE_n) begin
      if (CLE && ALE) n_proto_err++;
      else if (!din_oe) n_proto_err++;
      else if (!R_nB && din != 8'h70) n_proto_err++;
      else if (CLE) latch_cmd(din);
      else if (ALE) latch_adr(din);
      else begin
        n_din++;
        log_q.push_back({2'd2, din});
        if (col < FULL) preg[col] = din;
        col++;
      end
    end
    // read strobe
    if (re_q && !RE_n && !CE_n) begin
      n_dout++;
      unique case (rmode)
        M_ID: begin
          dout <= ID_CODE[8*(3 - (id_idx % 4)) +: 8];
          id_idx++;
        end
        M_STATUS: dout <= status;
        M_DATA: begin
          dout <= (col < FULL) ? preg[col] : 8'hFF;
          col++;
        end
        default: begin
          dout <= 8'h00;
          n_proto_err++;
        end
      endcase
    end
    we_q = WE_n;
    re_q = RE_n;
  end

endmodule
