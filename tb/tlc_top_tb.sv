// tlc_top_tb -- end-to-end test of the parallel table-lookup coder at its
// default size (16 ports, 256-word tables), running JPEG-style Huffman
// encoding of AC run/size symbols.
//
// Symbol table: the 162 AC symbols (run 0..15 with size 1..10, plus EOB 0x00
// and ZRL 0xF0), one category per run value (word bits 7:4; bit 8 is also a
// category bit, so words with bit 8 set have no category). Bank r holds the
// ten run-r symbols at words 0..9, EOB and ZRL at word 10 of banks 0 and 15,
// so every bank is 11 words long and the counting value is set to 11.
// Code-word table: a canonical Huffman code whose length counts are those of
// the JPEG example luminance AC table, symbols taken in ascending order.
//
// Phases: (A) single search mode, 11-word loop, all 16 ports encoding a
// random symbol stream, each code word checked against the symbol's code and
// the clocks per symbol reported; (B) full 16-word loop, multiple search
// mode, masked searches with several matches, table words rewritten during
// the searches; (C) runs 14 and 15 joined into one category over two banks.
// A port_checker per port (fed the top's outputs and the request handshake,
// both one clock late, to line up with the code-word RAM) checks every match
// address, found flag and comparison count. Each mechanism must occur.
module tlc_top_tb;
  import fmcam_pkg::*;

  localparam int unsigned P = 16;
  localparam int unsigned NSYM = 162;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         cfg_we, tbl_we, code_we;
  cfg_wr_t      cfg;
  tbl_wr_t      tbl;
  addr_t        code_waddr;
  codeword_t    code_wdata;
  logic         sym_valid [P];
  logic         sym_ready [P];
  search_req_t  sym       [P];
  logic         out_valid [P];
  codeword_t    out_code  [P];
  addr_t        out_addr  [P];
  logic         out_done  [P];
  logic         out_found [P];

  // models
  search_mode_t mode_m;
  catreg_t      catregs_m [NUM_CAT];
  entry_t       table_m [NUM_CAT][BANK_DEPTH];
  codeword_t    code_m [1 << ADDR_W];
  codeword_t    code_of [256];      // code word of each symbol value
  int           loop_len;
  logic         refresh_en;

  // one-clock-late copies for the checkers
  logic         d_valid [P], d_ready [P];
  search_req_t  d_req [P];
  logic         d_bc_valid;
  waddr_t       d_bc_addr;
  search_rsp_t  o_rsp [P];

  int c_checks [P], c_fail [P], c_search [P], c_sstop [P], c_mhit [P], c_join [P];
  int c_nocat [P], c_paused [P], c_miss [P];
  int tb_checks = 0, tb_failures = 0;
  int n_allbusy = 0, n_codes = 0, n_modesw = 0, n_short_loop = 0;
  int last_sym [P];
  logic sym_open [P];

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc++;

  tlc_top dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg(cfg), .tbl_we(tbl_we), .tbl(tbl),
    .code_we(code_we), .code_waddr(code_waddr), .code_wdata(code_wdata),
    .sym_valid(sym_valid), .sym_ready(sym_ready), .sym(sym),
    .out_valid(out_valid), .out_code(out_code), .out_addr(out_addr),
    .out_done(out_done), .out_found(out_found)
  );

  always @(posedge clk) begin
    d_bc_valid <= dut.u_fmcam.u_cat.bc.valid;
    d_bc_addr  <= dut.u_fmcam.u_cat.bc.addr;
    for (int p = 0; p < P; p++) begin
      d_valid[p] <= sym_valid[p];
      d_ready[p] <= sym_ready[p];
      d_req[p]   <= sym[p];
    end
  end

  always_comb
    for (int p = 0; p < P; p++)
      o_rsp[p] = '{hit: out_valid[p], done: out_done[p], found: out_found[p], addr: out_addr[p]};

  for (genvar p = 0; p < P; p++) begin : g_chk
    port_checker chk (
      .clk(clk), .rst_n(rst_n), .req_valid(d_valid[p]), .req_ready(d_ready[p]), .req(d_req[p]),
      .mode(mode_m), .loop_len(loop_len), .catregs(catregs_m), .table_m(table_m),
      .bc_valid(d_bc_valid), .bc_addr(d_bc_addr), .rsp(o_rsp[p]),
      .checks(c_checks[p]), .failures(c_fail[p]), .n_search(c_search[p]), .n_single_stop(c_sstop[p]),
      .n_multi_hit(c_mhit[p]), .n_joined(c_join[p]), .n_nocat(c_nocat[p]), .n_paused(c_paused[p]),
      .n_miss(c_miss[p])
    );
  end

  // every code word leaving the RAM must be the one stored at its address;
  // in single search mode it must also be the code of the requested symbol
  always @(posedge clk) begin
    automatic int busy = 0;
    for (int p = 0; p < P; p++) begin
      if (!sym_ready[p]) busy++;
      if (rst_n && out_valid[p]) begin
        n_codes++;
        tb_checks++;
        if (out_code[p] != code_m[out_addr[p]]) begin
          tb_failures++;
          $display("port %0d addr %h: code %h want %h", p, out_addr[p], out_code[p], code_m[out_addr[p]]);
        end
        if (mode_m == MODE_SINGLE && sym_open[p]) begin
          tb_checks++;
          if (out_code[p] != code_of[last_sym[p]]) begin
            tb_failures++;
            $display("port %0d symbol %h: code %h want %h", p, last_sym[p], out_code[p], code_of[last_sym[p]]);
          end
        end
      end
      if (out_done[p]) sym_open[p] = 1'b0;
    end
    if (busy == P) n_allbusy++;
  end

  function automatic int total(input int v [P]);
    int s = 0;
    for (int p = 0; p < P; p++) s += v[p];
    return s;
  endfunction

  task automatic finish_tb(input int extra_fail);
    $display("searches %0d single-stops %0d multi-hit %0d joined %0d no-category %0d paused %0d",
             total(c_search), total(c_sstop), total(c_mhit), total(c_join), total(c_nocat), total(c_paused));
    $display("code words %0d  all-ports-busy clocks %0d  mode switches %0d  short-loop searches %0d",
             n_codes, n_allbusy, n_modesw, n_short_loop);
    $display("TB_RESULT checks=%0d failures=%0d", total(c_checks) + tb_checks, total(c_fail) + tb_failures + extra_fail);
    $finish;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    finish_tb(1);
  end

  task automatic cfg_write(input cfg_wr_t w);
    @(negedge clk);
    cfg = w; cfg_we = 1'b1;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  always @(negedge clk) begin
    if (refresh_en && $urandom_range(0, 6) == 0) begin
      tbl.bank  = cat_t'($urandom);
      tbl.addr  = waddr_t'($urandom);
      tbl.entry = table_m[tbl.bank][tbl.addr];
      tbl_we    = 1'b1;
    end else if (refresh_en) begin
      tbl_we = 1'b0;
    end
  end

  // random AC symbol: mostly short runs and small sizes, some EOB/ZRL,
  // now and then a word with bit 8 set (no category)
  function automatic int rand_symbol();
    case ($urandom_range(0, 19))
      0:       return 32'h00;
      1:       return 32'hf0;
      2:       return 32'h100 | $urandom_range(0, 255);
      default: return ($urandom_range(0, 15) << 4) | $urandom_range(1, 10);
    endcase
  endfunction

  task automatic port_stream(input int p, input int n, input logic masked);
    for (int i = 0; i < n; i++) begin
      automatic int s = rand_symbol();
      @(negedge clk);
      sym[p].data = word_t'(s);
      sym[p].mask = masked ? 32'h0000_0003 : '0;
      last_sym[p] = s & 255;
      sym_open[p] = 1'b1;
      sym_valid[p] = 1'b1;
      do @(posedge clk); while (!sym_ready[p]);
      if (loop_len < BANK_DEPTH) n_short_loop++;
      @(negedge clk);
      sym_valid[p] = 1'b0;
      do @(posedge clk); while (!out_done[p]);
    end
  endtask

  task automatic all_ports(input int n, input logic masked);
    for (int p = 0; p < P; p++) begin
      automatic int pp = p;
      fork
        port_stream(pp, n, masked);
      join_none
    end
    wait fork;
  endtask

  task automatic set_mode(input search_mode_t m);
    cfg_wr_t w;
    w = '0; w.kind = CFG_MODE; w.mode = m;
    cfg_write(w);
    mode_m = m;
    n_modesw++;
  endtask

  task automatic set_limit(input int l);
    cfg_wr_t w;
    wait (dut.u_fmcam.loop_addr == '0);
    w = '0; w.kind = CFG_LIMIT; w.limit = limit_t'(l);
    cfg_write(w);
    loop_len = l;
  endtask

  initial begin
    cfg_wr_t w;
    int code, k, t0, nsym;
    // JPEG example luminance AC table: number of codes of each length 1..16
    static int bits [16] = '{0, 2, 1, 3, 3, 2, 4, 3, 5, 5, 4, 4, 0, 0, 1, 125};
    int syms [NSYM];

    rst_n = 1'b0; cfg_we = 1'b0; tbl_we = 1'b0; code_we = 1'b0; cfg = '0; tbl = '0;
    code_waddr = '0; code_wdata = '0; refresh_en = 1'b0;
    mode_m = MODE_MULTIPLE; loop_len = BANK_DEPTH;
    for (int p = 0; p < P; p++) begin sym_valid[p] = 1'b0; sym[p] = '0; sym_open[p] = 1'b0; last_sym[p] = 0; end

    // symbol list in ascending order and the canonical code
    k = 0;
    for (int s = 0; s < 256; s++)
      if (s == 0 || s == 240 || (s[3:0] >= 1 && s[3:0] <= 10)) begin syms[k] = s; k++; end
    code = 0; k = 0;
    for (int l = 1; l <= 16; l++) begin
      for (int i = 0; i < bits[l-1]; i++) begin
        code_of[syms[k]] = '{len: LEN_W'(l), bits: CODE_W'(code)};
        code++; k++;
      end
      code = code << 1;
    end
    tb_checks++;
    if (k != NSYM) tb_failures++;

    // categories: bit 8 and the run nibble
    for (int c = 0; c < NUM_CAT; c++)
      catregs_m[c] = '{en: 1'b1, pattern: word_t'(c << 4), bits: 32'h0000_01f0};
    // placement: bank = run, word = size-1; EOB / ZRL at word 10
    for (int c = 0; c < NUM_CAT; c++)
      for (int a = 0; a < BANK_DEPTH; a++) table_m[c][a] = '0;
    for (int i = 0; i < NSYM; i++) begin
      automatic int s = syms[i];
      automatic int r = s >> 4;
      automatic int a = (s % 16 == 0) ? 10 : s % 16 - 1;
      table_m[r][a] = '{valid: 1'b1, data: word_t'(s)};
      code_m[{cat_t'(r), waddr_t'(a)}] = code_of[s];
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NUM_CAT; c++) begin
      w = '0; w.kind = CFG_CATREG; w.idx = cat_t'(c); w.catreg = catregs_m[c];
      cfg_write(w);
    end
    for (int c = 0; c < NUM_CAT; c++)
      for (int a = 0; a < BANK_DEPTH; a++) begin
        @(negedge clk);
        tbl_we = 1'b1; tbl.bank = cat_t'(c); tbl.addr = waddr_t'(a); tbl.entry = table_m[c][a];
        code_we = table_m[c][a].valid;
        code_waddr = {cat_t'(c), waddr_t'(a)}; code_wdata = code_m[{cat_t'(c), waddr_t'(a)}];
      end
    @(negedge clk);
    tbl_we = 1'b0; code_we = 1'b0;

    // (A) Huffman encoding: single search mode, counting value 11
    set_mode(MODE_SINGLE);
    set_limit(11);
    nsym = 40;
    t0 = cyc;
    all_ports(nsym, 1'b0);
    $display("phase A: %0d symbols on %0d ports in %0d clocks: %0.2f clocks per symbol per port, %0.3f per symbol overall",
             nsym * P, P, cyc - t0, real'(cyc - t0) / nsym, real'(cyc - t0) / (nsym * P));

    // (B) multiple search mode, full loop, masked searches, table rewrites
    set_limit(BANK_DEPTH);
    set_mode(MODE_MULTIPLE);
    refresh_en = 1'b1;
    all_ports(15, 1'b1);
    refresh_en = 1'b0;
    @(negedge clk);
    tbl_we = 1'b0;

    // (C) runs 14 and 15 joined: one category spread over banks 14 and 15
    w = '0; w.kind = CFG_CATREG; w.idx = cat_t'(14); w.catreg = '{en: 1'b1, pattern: 32'he0, bits: 32'h1e0};
    cfg_write(w); catregs_m[14] = w.catreg;
    w.idx = cat_t'(15);
    cfg_write(w); catregs_m[15] = w.catreg;
    set_mode(MODE_SINGLE);
    set_limit(11);
    all_ports(25, 1'b0);

    tb_checks++;
    if (total(c_sstop) == 0 || total(c_mhit) == 0 || total(c_join) == 0 || total(c_nocat) == 0 ||
        total(c_paused) == 0 || n_allbusy == 0 || n_modesw < 3 || n_short_loop == 0 || n_codes == 0) begin
      tb_failures++;
      $display("a mechanism never occurred");
    end
    finish_tb(0);
  end
endmodule
