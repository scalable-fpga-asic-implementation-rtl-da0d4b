// port_module_tb -- one port against a testbench broadcast source.
//
// The testbench plays the controller and category block: a free-running
// loop counter with a settable length, a model contents-table whose words
// are broadcast one clock after their address, and random broadcast pauses
// (as a table write causes). Categories are the top nibble of the word;
// banks 14 and 15 are joined into one category and nibble 15 has no
// category. Searches (exact, masked across the category bits, random) run
// in multiple mode, single mode, and single mode with a 12-word loop, and
// port_checker compares every response and comparison count with its model.
module port_module_tb;
  import fmcam_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         req_valid, req_ready;
  search_req_t  req;
  search_mode_t mode;
  catreg_t      catregs [NUM_CAT];
  entry_t       table_m [NUM_CAT][BANK_DEPTH];
  bcast_t       bc;
  search_rsp_t  rsp;
  int           loop_len;
  waddr_t       cnt;
  logic         pause;
  logic         pause_en;

  int checks, failures, n_search, n_single_stop, n_multi_hit, n_joined, n_nocat, n_paused, n_miss;
  int tb_checks = 0, tb_failures = 0;

  always #5 clk = ~clk;

  port_module dut (
    .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready), .req(req),
    .mode(mode), .catregs(catregs), .bc(bc), .rsp(rsp)
  );

  port_checker chk (
    .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready), .req(req),
    .mode(mode), .loop_len(loop_len), .catregs(catregs), .table_m(table_m),
    .bc_valid(bc.valid), .bc_addr(bc.addr), .rsp(rsp),
    .checks(checks), .failures(failures), .n_search(n_search), .n_single_stop(n_single_stop),
    .n_multi_hit(n_multi_hit), .n_joined(n_joined), .n_nocat(n_nocat), .n_paused(n_paused),
    .n_miss(n_miss)
  );

  // broadcast source
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt      <= '0;
      bc.valid <= 1'b0;
      bc.addr  <= '0;
    end else begin
      bc.valid <= !pause;
      bc.addr  <= cnt;
      for (int c = 0; c < NUM_CAT; c++) bc.entries[c] <= table_m[c][cnt];
      if (!pause) cnt <= (int'(cnt) + 1 >= loop_len) ? '0 : cnt + waddr_t'(1);
    end
  end
  assign bc.next_addr = cnt;

  always @(negedge clk) pause = pause_en && ($urandom_range(0, 5) == 0);

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + tb_checks, failures + tb_failures + 1);
    $finish;
  end

  task automatic one_search(input logic masked);
    automatic int c = $urandom_range(0, NUM_CAT - 1);
    automatic int a = $urandom_range(0, BANK_DEPTH - 1);
    @(negedge clk);
    case ($urandom_range(0, 5))
      0: begin req.data = $urandom; req.mask = '0; end
      1: begin req.data = {4'hf, 28'($urandom)}; req.mask = '0; end
      default: begin req.data = table_m[c][a].data; req.mask = '0; end
    endcase
    if (masked) req.mask = ($urandom_range(0, 1) == 0) ? 32'h0000_0003 : 32'h8000_0000;
    req_valid = 1'b1;
    do @(posedge clk); while (!req_ready);
    @(negedge clk);
    req_valid = 1'b0;
    // wait for the end of the search, then an idle gap
    do @(posedge clk); while (!rsp.done);
    repeat ($urandom_range(0, 3)) @(posedge clk);
  endtask

  initial begin
    rst_n = 1'b0; req_valid = 1'b0; req = '0; mode = MODE_MULTIPLE; loop_len = BANK_DEPTH;
    pause_en = 1'b0; pause = 1'b0;
    for (int c = 0; c < NUM_CAT; c++) begin
      catregs[c].en      = 1'b1;
      catregs[c].bits    = 32'hf000_0000;
      catregs[c].pattern = {4'(c), 28'h0};
    end
    catregs[15].pattern = {4'd14, 28'h0};   // bank 15 joins category 14
    for (int c = 0; c < NUM_CAT; c++)
      for (int a = 0; a < BANK_DEPTH; a++) begin
        table_m[c][a].valid = ($urandom_range(0, 7) != 0);
        table_m[c][a].data  = {catregs[c].pattern[31:28], 24'($urandom_range(0, 40)), 4'($urandom_range(0, 3))};
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // reset state: idle and ready
    @(negedge clk);
    tb_checks++;
    if (!req_ready || rsp.hit || rsp.done) tb_failures++;
    pause_en = 1'b1;
    for (int n = 0; n < 150; n++) one_search(n % 4 == 3);
    mode = MODE_SINGLE;
    for (int n = 0; n < 150; n++) one_search(n % 4 == 3);
    // counting value setting mode: only the first 12 words of every bank
    wait (cnt == '0);
    @(negedge clk);
    loop_len = 12;
    for (int n = 0; n < 150; n++) one_search(n % 4 == 3);
    mode = MODE_MULTIPLE;
    for (int n = 0; n < 100; n++) one_search(n % 4 == 3);
    $display("searches %0d single-stops %0d multi-hit %0d joined %0d no-category %0d paused %0d miss %0d",
             n_search, n_single_stop, n_multi_hit, n_joined, n_nocat, n_paused, n_miss);
    tb_checks++;
    if (n_single_stop == 0 || n_multi_hit == 0 || n_joined == 0 || n_nocat == 0 || n_paused == 0 || n_miss == 0)
      tb_failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + tb_checks, failures + tb_failures);
    $finish;
  end
endmodule
