// loop_address_counter_tb -- checks the circular count against a model
// counter for the full-bank loop, a shortened loop (counting value setting
// mode, 12 of 16 words), a loop of 1, an out-of-range limit and 'hold'.
module loop_address_counter_tb;
  import fmcam_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n;
  logic   hold;
  limit_t limit;
  waddr_t addr;
  int     checks = 0, failures = 0;
  int     model;
  int     eff;

  always #5 clk = ~clk;

  loop_address_counter dut (.clk(clk), .rst_n(rst_n), .hold(hold), .limit(limit), .addr(addr));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int lim, input int cycles, input bit with_hold);
    limit = limit_t'(lim);
    eff   = (lim == 0 || lim > BANK_DEPTH) ? BANK_DEPTH : lim;
    for (int i = 0; i < cycles; i++) begin
      hold = with_hold && ($urandom_range(0, 3) == 0);
      @(posedge clk);
      #1;
      if (!hold) model = (model + 1 >= eff) ? 0 : model + 1;
      checks++;
      if (int'(addr) != model) begin
        failures++;
        $display("mismatch lim=%0d addr=%0d model=%0d", lim, addr, model);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; hold = 1'b0; limit = limit_t'(BANK_DEPTH);
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (addr != '0) failures++;
    rst_n = 1'b1;
    model = 0;
    run(BANK_DEPTH, 40, 1'b0);
    // a shorter loop only takes effect once the count is below it
    do begin @(posedge clk); #1; end while (addr != '0);
    model = 0;
    run(12, 40, 1'b0);
    run(12, 60, 1'b1);
    do begin @(posedge clk); #1; end while (addr != '0);
    model = 0;
    run(1, 10, 1'b0);
    run(0, 40, 1'b0);
    run(BANK_DEPTH + 5, 40, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
