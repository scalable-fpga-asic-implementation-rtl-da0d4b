// port_checker -- testbench monitor for one FMCAM search port.
//
// It watches a port's request handshake, the broadcast loop address and the
// port's responses, all sampled at the rising clock edge. From its own copy
// of the category registers and of the contents-table it works out, for each
// accepted search, which categories (banks) the word belongs to, the
// addresses that must be reported and in which order (bank by bank, lowest
// bank first; inside a bank circularly from the loop address of the first
// comparison), and how many valid broadcasts the search must take
// (whole loops in multiple mode; up to the first match in single mode).
// It counts a failure for any difference and tallies the mechanisms seen.
module port_checker
  import fmcam_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_valid,
  input  logic         req_ready,
  input  search_req_t  req,
  input  search_mode_t mode,
  input  int           loop_len,
  input  catreg_t      catregs [NUM_CAT],
  input  entry_t       table_m [NUM_CAT][BANK_DEPTH],
  input  logic         bc_valid,
  input  waddr_t       bc_addr,
  input  search_rsp_t  rsp,
  output int           checks,
  output int           failures,
  output int           n_search,
  output int           n_single_stop,
  output int           n_multi_hit,
  output int           n_joined,
  output int           n_nocat,
  output int           n_paused,
  output int           n_miss
);

  logic         busy_tb = 1'b0;
  logic         first;
  search_req_t  cur;
  search_mode_t cur_mode;
  catvec_t      cats;
  int           compares;
  int           stalls;
  waddr_t       start;
  addr_t        got [$];

  initial begin
    checks = 0; failures = 0; n_search = 0; n_single_stop = 0; n_multi_hit = 0;
    n_joined = 0; n_nocat = 0; n_paused = 0; n_miss = 0;
  end

  function automatic logic entry_match(entry_t e, search_req_t r);
    if (!e.valid) return 1'b0;
    for (int b = 0; b < DATA_W; b++)
      if (!r.mask[b] && e.data[b] != r.data[b]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic finish_search(input logic found);
    addr_t want [$];
    int    want_cmp;
    int    ncat;
    logic  stop;
    logic  same;
    want_cmp = 0;
    ncat = 0;
    stop = 1'b0;
    for (int c = 0; c < NUM_CAT; c++) begin
      if (!cats[c] || stop) continue;
      ncat++;
      for (int k = 0; k < loop_len; k++) begin
        automatic int a = (int'(start) + k) % loop_len;
        if (stop) break;
        want_cmp++;
        if (entry_match(table_m[c][a], cur)) begin
          want.push_back({cat_t'(c), waddr_t'(a)});
          if (cur_mode == MODE_SINGLE) stop = 1'b1;
        end
      end
    end
    n_search++;
    if (ncat > 1) n_joined++;
    if (cats == '0) n_nocat++;
    if (stop) n_single_stop++;
    if (cur_mode == MODE_MULTIPLE && want.size() > 1) n_multi_hit++;
    if (want.size() == 0) n_miss++;
    if (stalls > 0) n_paused++;
    checks++;
    same = (got.size() == want.size());
    if (same)
      for (int i = 0; i < want.size(); i++)
        if (got[i] != want[i]) same = 1'b0;
    if (!same) begin
      failures++;
      $display("%m: key %h mask %h start %0d: got %p want %p", cur.data, cur.mask, start, got, want);
    end
    checks++;
    if (found != (want.size() != 0)) begin
      failures++;
      $display("%m: found %0b, want %0d hits", found, want.size());
    end
    checks++;
    if (compares != want_cmp) begin
      failures++;
      $display("%m: search took %0d comparisons, want %0d", compares, want_cmp);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (rsp.hit) begin
        got.push_back(rsp.addr);
        if (!busy_tb) begin failures++; $display("%m: hit while idle"); end
      end
      if (rsp.done) begin
        if (!busy_tb) begin
          failures++;
          $display("%m: done while idle");
        end else begin
          finish_search(rsp.found);
        end
        busy_tb = 1'b0;
      end
      if (req_valid && req_ready) begin
        checks++;
        if (busy_tb) begin failures++; $display("%m: accepted while a search is open"); end
        busy_tb  = 1'b1;
        cur      = req;
        cur_mode = mode;
        first    = 1'b1;
        compares = 0;
        stalls   = 0;
        start    = '0;
        got.delete();
        for (int c = 0; c < NUM_CAT; c++) begin
          cats[c] = catregs[c].en;
          for (int b = 0; b < DATA_W; b++)
            if (catregs[c].bits[b] && !req.mask[b] && req.data[b] != catregs[c].pattern[b])
              cats[c] = 1'b0;
        end
      end else if (busy_tb && cats != '0) begin
        if (bc_valid) begin
          if (first) start = bc_addr;
          first = 1'b0;
          compares++;
        end else begin
          stalls++;
        end
      end
    end
  end

endmodule
