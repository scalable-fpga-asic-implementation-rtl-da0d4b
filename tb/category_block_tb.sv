// category_block_tb -- random contents-table writes mixed with a stepping
// loop address. Checks that a write raises 'hold', that the broadcast one
// clock later is marked invalid, and otherwise that every bank's broadcast
// word equals the model table at the previous loop address, with the right
// 'addr' and 'next_addr'.
module category_block_tb;
  import fmcam_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n, tbl_we, hold;
  tbl_wr_t tbl;
  waddr_t  loop_addr, prev_addr;
  bcast_t  bc;
  entry_t  table_m [NUM_CAT][BANK_DEPTH];
  logic    prev_we;
  int      checks = 0, failures = 0, n_valid = 0;

  always #5 clk = ~clk;

  category_block dut (
    .clk(clk), .rst_n(rst_n), .loop_addr(loop_addr), .tbl_we(tbl_we), .tbl(tbl),
    .hold(hold), .bc(bc)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; tbl_we = 1'b0; tbl = '0; loop_addr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (bc.valid) failures++;
    // fill the whole table first
    for (int c = 0; c < NUM_CAT; c++)
      for (int a = 0; a < BANK_DEPTH; a++) begin
        tbl_we = 1'b1;
        tbl.bank = cat_t'(c); tbl.addr = waddr_t'(a);
        tbl.entry = {1'($urandom), $urandom};
        @(posedge clk);
        table_m[c][a] = tbl.entry;
        #1;
        checks++;
        if (bc.valid) begin failures++; $display("valid broadcast after a write"); end
      end
    prev_we = 1'b1;
    prev_addr = loop_addr;
    for (int n = 0; n < 1000; n++) begin
      tbl_we    = ($urandom_range(0, 4) == 0);
      tbl.bank  = cat_t'($urandom);
      tbl.addr  = waddr_t'($urandom);
      tbl.entry = {1'($urandom), $urandom};
      if (!prev_we) loop_addr = waddr_t'($urandom_range(0, BANK_DEPTH - 1));
      #1;
      checks++;
      if (hold != tbl_we || bc.next_addr != loop_addr) begin failures++; $display("hold/next_addr wrong"); end
      @(posedge clk);
      if (tbl_we) table_m[tbl.bank][tbl.addr] = tbl.entry;
      #1;
      checks++;
      if (bc.valid != !tbl_we) begin failures++; $display("valid %0b after we %0b", bc.valid, tbl_we); end
      if (!tbl_we) begin
        n_valid++;
        checks++;
        if (bc.addr != loop_addr) begin failures++; $display("bc.addr %0d want %0d", bc.addr, loop_addr); end
        for (int c = 0; c < NUM_CAT; c++) begin
          checks++;
          if (bc.entries[c] != table_m[c][loop_addr]) begin
            failures++;
            $display("bank %0d addr %0d: got %h want %h", c, loop_addr, bc.entries[c], table_m[c][loop_addr]);
          end
        end
      end
      prev_we = tbl_we;
    end
    checks++;
    if (n_valid < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
