// port_block_tb -- four ports searching at the same time from one
// testbench broadcast source. Each port has its own request stream and its
// own port_checker; the ports start their searches at unrelated loop
// addresses, which is the point of the circular loop counter. Runs multiple
// mode, single mode and single mode with a 12-word loop.
module port_block_tb;
  import fmcam_pkg::*;

  localparam int unsigned P = 4;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         req_valid [P];
  logic         req_ready [P];
  search_req_t  req       [P];
  search_rsp_t  rsp       [P];
  search_mode_t mode;
  catreg_t      catregs [NUM_CAT];
  entry_t       table_m [NUM_CAT][BANK_DEPTH];
  bcast_t       bc;
  int           loop_len;
  waddr_t       cnt;
  logic         pause, pause_en;
  int           done_cnt [P];

  int c_checks [P], c_fail [P], c_search [P], c_sstop [P], c_mhit [P], c_join [P];
  int c_nocat [P], c_paused [P], c_miss [P];
  int tb_checks = 0, tb_failures = 0;
  int n_overlap = 0;

  always #5 clk = ~clk;

  port_block #(.NUM_PORTS(P)) dut (
    .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready), .req(req),
    .mode(mode), .catregs(catregs), .bc(bc), .rsp(rsp)
  );

  for (genvar p = 0; p < P; p++) begin : g_chk
    port_checker chk (
      .clk(clk), .rst_n(rst_n), .req_valid(req_valid[p]), .req_ready(req_ready[p]), .req(req[p]),
      .mode(mode), .loop_len(loop_len), .catregs(catregs), .table_m(table_m),
      .bc_valid(bc.valid), .bc_addr(bc.addr), .rsp(rsp[p]),
      .checks(c_checks[p]), .failures(c_fail[p]), .n_search(c_search[p]), .n_single_stop(c_sstop[p]),
      .n_multi_hit(c_mhit[p]), .n_joined(c_join[p]), .n_nocat(c_nocat[p]), .n_paused(c_paused[p]),
      .n_miss(c_miss[p])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0; bc.valid <= 1'b0; bc.addr <= '0;
    end else begin
      bc.valid <= !pause;
      bc.addr  <= cnt;
      for (int c = 0; c < NUM_CAT; c++) bc.entries[c] <= table_m[c][cnt];
      if (!pause) cnt <= (int'(cnt) + 1 >= loop_len) ? '0 : cnt + waddr_t'(1);
    end
  end
  assign bc.next_addr = cnt;

  always @(negedge clk) pause = pause_en && ($urandom_range(0, 5) == 0);

  // count clocks in which every port is busy at once
  always @(posedge clk) begin
    automatic int busy = 0;
    for (int p = 0; p < P; p++) if (!req_ready[p]) busy++;
    if (busy == P) n_overlap++;
  end

  function automatic int total(input int v [P]);
    int s = 0;
    for (int p = 0; p < P; p++) s += v[p];
    return s;
  endfunction

  task automatic finish_tb(input int extra_fail);
    $display("searches %0d single-stops %0d multi-hit %0d joined %0d no-category %0d paused %0d all-busy %0d",
             total(c_search), total(c_sstop), total(c_mhit), total(c_join), total(c_nocat), total(c_paused), n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", total(c_checks) + tb_checks, total(c_fail) + tb_failures + extra_fail);
    $finish;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    finish_tb(1);
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
      done_cnt[p]++;
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
    rst_n = 1'b0; mode = MODE_MULTIPLE; loop_len = BANK_DEPTH; pause_en = 1'b0; pause = 1'b0;
    for (int p = 0; p < P; p++) begin req_valid[p] = 1'b0; req[p] = '0; done_cnt[p] = 0; end
    for (int c = 0; c < NUM_CAT; c++) begin
      catregs[c].en = (c != 15);
      catregs[c].bits = 32'hf000_0000;
      catregs[c].pattern = {4'(c), 28'h0};
    end
    catregs[14].pattern = {4'd13, 28'h0};   // banks 13 and 14 form one category
    for (int c = 0; c < NUM_CAT; c++)
      for (int a = 0; a < BANK_DEPTH; a++) begin
        table_m[c][a].valid = ($urandom_range(0, 7) != 0);
        table_m[c][a].data  = {catregs[c].pattern[31:28], 24'($urandom_range(0, 30)), 4'($urandom_range(0, 3))};
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    pause_en = 1'b1;
    all_ports(60);
    mode = MODE_SINGLE;
    all_ports(60);
    wait (cnt == '0);
    @(negedge clk);
    loop_len = 12;
    all_ports(60);
    for (int p = 0; p < P; p++) begin
      tb_checks++;
      if (done_cnt[p] != 180) tb_failures++;
    end
    tb_checks++;
    if (total(c_sstop) == 0 || total(c_mhit) == 0 || total(c_join) == 0 || total(c_nocat) == 0 || n_overlap == 0)
      tb_failures++;
    finish_tb(0);
  end
endmodule
