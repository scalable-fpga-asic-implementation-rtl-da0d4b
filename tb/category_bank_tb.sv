// category_bank_tb -- single-port bank: after reset every word reads
// invalid; random writes and reads are compared with a model array; a read
// returns its word exactly one clock later and a write cycle leaves the read
// data unchanged.
module category_bank_tb;
  import fmcam_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n, we;
  waddr_t addr;
  entry_t wdata, rdata, prev;
  entry_t model [BANK_DEPTH];
  logic   mvalid [BANK_DEPTH];
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  category_bank dut (.clk(clk), .rst_n(rst_n), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we = 1'b0; addr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < BANK_DEPTH; i++) mvalid[i] = 1'b0;
    // every word invalid after reset
    for (int i = 0; i < BANK_DEPTH; i++) begin
      addr = waddr_t'(i);
      @(posedge clk);
      #1 checks++;
      if (rdata.valid) begin failures++; $display("word %0d valid after reset", i); end
    end
    for (int n = 0; n < 400; n++) begin
      we    = ($urandom_range(0, 2) == 0);
      addr  = waddr_t'($urandom_range(0, BANK_DEPTH - 1));
      wdata = {1'($urandom), $urandom};
      prev  = rdata;
      @(posedge clk);
      #1;
      if (we) begin
        model[addr] = wdata; mvalid[addr] = 1'b1;
        checks++;
        if (rdata != prev) begin failures++; $display("rdata changed on write"); end
      end else if (mvalid[addr]) begin
        checks++;
        if (rdata != model[addr]) begin
          failures++;
          $display("addr %0d got %h want %h", addr, rdata, model[addr]);
        end
      end else begin
        checks++;
        if (rdata.valid) begin failures++; $display("unwritten addr %0d valid", addr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
