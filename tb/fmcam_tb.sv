// fmcam_tb -- the whole adapted FMCAM with four ports, driven only through
// its own interfaces. The testbench defines the categories (top nibble of the
// word; banks 13 and 14 joined; nibble 15 without category), loads the
// contents-table, and runs parallel searches in multiple mode, single mode
// and single mode with a 12-word loop (counting value setting mode). During
// the searches it keeps rewriting table words with their current values, so
// the loop counter pauses without changing the expected results. A
// port_checker per port compares hits, found flags and comparison counts
// with its model.
module fmcam_tb;
  import fmcam_pkg::*;

  localparam int unsigned P = 4;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         cfg_we, tbl_we;
  cfg_wr_t      cfg;
  tbl_wr_t      tbl;
  logic         req_valid [P];
  logic         req_ready [P];
  search_req_t  req       [P];
  search_rsp_t  rsp       [P];
  search_mode_t mode_m;
  catreg_t      catregs_m [NUM_CAT];
  entry_t       table_m [NUM_CAT][BANK_DEPTH];
  int           loop_len;
  logic         refresh_en;

  int c_checks [P], c_fail [P], c_search [P], c_sstop [P], c_mhit [P], c_join [P];
  int c_nocat [P], c_paused [P], c_miss [P];
  int tb_checks = 0, tb_failures = 0;

  always #5 clk = ~clk;

  fmcam #(.NUM_PORTS(P)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg(cfg), .tbl_we(tbl_we), .tbl(tbl),
    .req_valid(req_valid), .req_ready(req_ready), .req(req), .rsp(rsp)
  );

  for (genvar p = 0; p < P; p++) begin : g_chk
    port_checker chk (
      .clk(clk), .rst_n(rst_n), .req_valid(req_valid[p]), .req_ready(req_ready[p]), .req(req[p]),
      .mode(mode_m), .loop_len(loop_len), .catregs(catregs_m), .table_m(table_m),
      .bc_valid(dut.u_cat.bc.valid), .bc_addr(dut.u_cat.bc.addr), .rsp(rsp[p]),
      .checks(c_checks[p]), .failures(c_fail[p]), .n_search(c_search[p]), .n_single_stop(c_sstop[p]),
      .n_multi_hit(c_mhit[p]), .n_joined(c_join[p]), .n_nocat(c_nocat[p]), .n_paused(c_paused[p]),
      .n_miss(c_miss[p])
    );
  end

  function automatic int total(input int v [P]);
    int s = 0;
    for (int p = 0; p < P; p++) s += v[p];
    return s;
  endfunction

  task automatic finish_tb(input int extra_fail);
    $display("searches %0d single-stops %0d multi-hit %0d joined %0d no-category %0d paused %0d",
             total(c_search), total(c_sstop), total(c_mhit), total(c_join), total(c_nocat), total(c_paused));
    $display("TB_RESULT checks=%0d failures=%0d", total(c_checks) + tb_checks, total(c_fail) + tb_failures + extra_fail);
    $finish;
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    $display("watchdog expired");
    finish_tb(1);
  end

  task automatic cfg_write(input cfg_wr_t w);
    @(negedge clk);
    cfg = w; cfg_we = 1'b1;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // while enabled, rewrite random table words with the value they hold
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

  task automatic port_stream(input int p, input int n);
    for (int i = 0; i < n; i++) begin
      automatic int c = $urandom_range(0, NUM_CAT - 1);
      automatic int a = $urandom_range(0, BANK_DEPTH - 1);
      @(negedge clk);
      req[p].data = ($urandom_range(0, 4) == 0) ? $urandom : table_m[c][a].data;
      req[p].mask = ($urandom_range(0, 3) == 0) ? 32'h0000_0003 : '0;
      req_valid[p] = 1'b1;
      do @(posedge clk); while (!req_ready[p]);
      @(negedge clk);
      req_valid[p] = 1'b0;
      do @(posedge clk); while (!rsp[p].done);
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
  endtask

  task automatic all_ports(input int n);
    for (int p = 0; p < P; p++) begin
      automatic int pp = p;
      fork
        port_stream(pp, n);
      join_none
    end
    wait fork;
  endtask

  initial begin
    cfg_wr_t w;
    rst_n = 1'b0; cfg_we = 1'b0; tbl_we = 1'b0; cfg = '0; tbl = '0; refresh_en = 1'b0;
    mode_m = MODE_MULTIPLE; loop_len = BANK_DEPTH;
    for (int p = 0; p < P; p++) begin req_valid[p] = 1'b0; req[p] = '0; end
    for (int c = 0; c < NUM_CAT; c++) begin
      catregs_m[c].en = (c != 15);
      catregs_m[c].bits = 32'hf000_0000;
      catregs_m[c].pattern = {4'(c), 28'h0};
    end
    catregs_m[14].pattern = {4'd13, 28'h0};
    for (int c = 0; c < NUM_CAT; c++)
      for (int a = 0; a < BANK_DEPTH; a++) begin
        table_m[c][a].valid = ($urandom_range(0, 7) != 0);
        table_m[c][a].data  = {catregs_m[c].pattern[31:28], 24'($urandom_range(0, 30)), 4'($urandom_range(0, 3))};
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // configuration and table load through the interfaces
    for (int c = 0; c < NUM_CAT; c++) begin
      w = '0; w.kind = CFG_CATREG; w.idx = cat_t'(c); w.catreg = catregs_m[c];
      cfg_write(w);
    end
    for (int c = 0; c < NUM_CAT; c++)
      for (int a = 0; a < BANK_DEPTH; a++) begin
        @(negedge clk);
        tbl_we = 1'b1; tbl.bank = cat_t'(c); tbl.addr = waddr_t'(a); tbl.entry = table_m[c][a];
      end
    @(negedge clk);
    tbl_we = 1'b0;
    refresh_en = 1'b1;
    all_ports(50);
    w = '0; w.kind = CFG_MODE; w.mode = MODE_SINGLE;
    cfg_write(w);
    mode_m = MODE_SINGLE;
    all_ports(50);
    // shorten the loop while the counter is below the new length
    refresh_en = 1'b0;
    @(negedge clk);
    tbl_we = 1'b0;
    wait (dut.loop_addr == '0);
    w = '0; w.kind = CFG_LIMIT; w.limit = limit_t'(12);
    cfg_write(w);
    loop_len = 12;
    refresh_en = 1'b1;
    all_ports(50);
    w = '0; w.kind = CFG_MODE; w.mode = MODE_MULTIPLE;
    cfg_write(w);
    mode_m = MODE_MULTIPLE;
    all_ports(50);
    tb_checks++;
    if (total(c_sstop) == 0 || total(c_mhit) == 0 || total(c_join) == 0 || total(c_nocat) == 0 || total(c_paused) == 0)
      tb_failures++;
    finish_tb(0);
  end
endmodule
