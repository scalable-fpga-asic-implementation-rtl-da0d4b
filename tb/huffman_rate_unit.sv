// huffman_rate_unit -- one tlc_top of NUM_PORTS ports encoding a stream of
// JPEG AC run/size symbols back to back, twice: first in multiple search
// mode with the full 16-word loop (every search runs the whole loop, as a
// CAM without the single-search and counting-value features would), then in
// single search mode with the counting value 11. Every code word is checked
// against the code of the symbol that was sent. It reports the clocks each
// phase took; in the first phase every port must take exactly 17 clocks per
// symbol (1 to accept + 16 comparisons).
//
// Tables as in tlc_top_tb: symbol r<<4 | s in bank r, word s-1 (EOB and ZRL
// at word 10); canonical code from the JPEG example luminance AC length
// counts, symbols in ascending order.
module huffman_rate_unit
  import fmcam_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 1,
  parameter int unsigned NSYM_PER_PORT = 30
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   clocks_full,
  output int   clocks_adapted
);

  localparam int unsigned P = NUM_PORTS;
  localparam int unsigned NSYM = 162;

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

  codeword_t    code_of [256];
  int           syms [NSYM];
  int           sent [P][$];
  int           codes_seen [P];
  int           last_accept [P];
  logic         measure_full;

  tlc_top #(.NUM_PORTS(P)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg(cfg), .tbl_we(tbl_we), .tbl(tbl),
    .code_we(code_we), .code_waddr(code_waddr), .code_wdata(code_wdata),
    .sym_valid(sym_valid), .sym_ready(sym_ready), .sym(sym),
    .out_valid(out_valid), .out_code(out_code), .out_addr(out_addr),
    .out_done(out_done), .out_found(out_found)
  );

  initial begin
    checks = 0; failures = 0; finished = 1'b0; clocks_full = 0; clocks_adapted = 0;
    measure_full = 1'b0;
  end

  // code-word check and per-port interval check
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    for (int p = 0; p < P; p++) begin
      if (rst_n && out_valid[p]) begin
        checks++;
        if (sent[p].size() == 0 || out_code[p] != code_of[sent[p][0]]) begin
          failures++;
          $display("P=%0d port %0d: unexpected code %h", P, p, out_code[p]);
        end
        codes_seen[p]++;
      end
      if (rst_n && out_done[p]) begin
        checks++;
        if (codes_seen[p] != 1 || !out_found[p]) begin
          failures++;
          $display("P=%0d port %0d: %0d code words for one symbol", P, p, codes_seen[p]);
        end
        codes_seen[p] = 0;
        if (sent[p].size() != 0) void'(sent[p].pop_front());
      end
      if (rst_n && sym_valid[p] && sym_ready[p]) begin
        if (measure_full && last_accept[p] >= 0) begin
          checks++;
          if (cyc - last_accept[p] != 17) begin
            failures++;
            $display("P=%0d port %0d: %0d clocks between symbols, want 17", P, p, cyc - last_accept[p]);
          end
        end
        last_accept[p] = cyc;
      end
    end
  end

  task automatic cfg_write(input cfg_wr_t w);
    @(negedge clk);
    cfg = w; cfg_we = 1'b1;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // keep the port's request valid; present a new symbol after each accept
  task automatic port_stream(input int p, input int n);
    for (int i = 0; i < n; i++) begin
      automatic int s = syms[$urandom_range(0, NSYM - 1)];
      sym[p].data = word_t'(s);
      sym[p].mask = '0;
      sent[p].push_back(s);
      sym_valid[p] = 1'b1;
      do @(posedge clk); while (!sym_ready[p]);
      @(negedge clk);
    end
    sym_valid[p] = 1'b0;
    while (sent[p].size() != 0) @(posedge clk);
  endtask

  task automatic run_phase(output int clocks);
    int t0;
    for (int p = 0; p < P; p++) last_accept[p] = -1;
    @(negedge clk);
    t0 = cyc;
    for (int p = 0; p < P; p++) begin
      automatic int pp = p;
      fork
        port_stream(pp, NSYM_PER_PORT);
      join_none
    end
    wait fork;
    clocks = cyc - t0;
  endtask

  initial begin
    cfg_wr_t w;
    int code, k;
    static int bits [16] = '{0, 2, 1, 3, 3, 2, 4, 3, 5, 5, 4, 4, 0, 0, 1, 125};
    rst_n = 1'b0; cfg_we = 1'b0; tbl_we = 1'b0; code_we = 1'b0; cfg = '0; tbl = '0;
    code_waddr = '0; code_wdata = '0;
    for (int p = 0; p < P; p++) begin sym_valid[p] = 1'b0; sym[p] = '0; codes_seen[p] = 0; end
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
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NUM_CAT; c++) begin
      w = '0; w.kind = CFG_CATREG; w.idx = cat_t'(c);
      w.catreg = '{en: 1'b1, pattern: word_t'(c << 4), bits: 32'h0000_01f0};
      cfg_write(w);
    end
    for (int i = 0; i < NSYM; i++) begin
      automatic int s = syms[i];
      automatic int a = (s % 16 == 0) ? 10 : s % 16 - 1;
      @(negedge clk);
      tbl_we = 1'b1; tbl.bank = cat_t'(s / 16); tbl.addr = waddr_t'(a);
      tbl.entry = '{valid: 1'b1, data: word_t'(s)};
      code_we = 1'b1; code_waddr = {cat_t'(s / 16), waddr_t'(a)}; code_wdata = code_of[s];
    end
    @(negedge clk);
    tbl_we = 1'b0; code_we = 1'b0;

    // full loop, multiple search mode (reset state)
    measure_full = 1'b1;
    run_phase(clocks_full);
    measure_full = 1'b0;
    // single search mode, counting value 11
    w = '0; w.kind = CFG_MODE; w.mode = MODE_SINGLE;
    cfg_write(w);
    wait (dut.u_fmcam.loop_addr == '0);
    w = '0; w.kind = CFG_LIMIT; w.limit = limit_t'(11);
    cfg_write(w);
    run_phase(clocks_adapted);
    finished = 1'b1;
  end

endmodule
