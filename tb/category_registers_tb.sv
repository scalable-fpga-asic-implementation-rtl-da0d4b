// category_registers_tb -- writes random category registers in random order
// and compares every register with a model copy after each write; checks
// that reset clears them and that nothing changes without 'we'.
module category_registers_tb;
  import fmcam_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n, we;
  cat_t    idx;
  catreg_t wdata;
  catreg_t regs  [NUM_CAT];
  catreg_t model [NUM_CAT];
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  category_registers dut (.clk(clk), .rst_n(rst_n), .we(we), .idx(idx), .wdata(wdata), .regs(regs));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int i = 0; i < NUM_CAT; i++) begin
      checks++;
      if (regs[i] != model[i]) begin
        failures++;
        $display("reg %0d: got %h want %h", i, regs[i], model[i]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; we = 1'b0; idx = '0; wdata = '0;
    for (int i = 0; i < NUM_CAT; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 compare_all();
    rst_n = 1'b1;
    for (int n = 0; n < 100; n++) begin
      we    = ($urandom_range(0, 3) != 0);
      idx   = cat_t'($urandom_range(0, NUM_CAT - 1));
      wdata = {1'($urandom), $urandom, $urandom};
      @(posedge clk);
      if (we) model[idx] = wdata;
      #1 compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
