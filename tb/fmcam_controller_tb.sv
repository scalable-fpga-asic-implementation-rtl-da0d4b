// fmcam_controller_tb -- configuration writes of all three kinds in random
// order; checks the category registers and search mode against a model after
// every write, and the loop address against a model counter that uses the
// written counting value and the 'hold' input.
module fmcam_controller_tb;
  import fmcam_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n, cfg_we, hold;
  cfg_wr_t      cfg;
  catreg_t      catregs [NUM_CAT];
  search_mode_t mode;
  waddr_t       loop_addr;
  catreg_t      m_regs [NUM_CAT];
  search_mode_t m_mode;
  int           m_limit, m_addr;
  int           checks = 0, failures = 0, n_wrap_short = 0;

  always #5 clk = ~clk;

  fmcam_controller dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg(cfg), .hold(hold),
    .catregs(catregs), .mode(mode), .loop_addr(loop_addr)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; cfg_we = 1'b0; hold = 1'b0; cfg = '0;
    for (int i = 0; i < NUM_CAT; i++) m_regs[i] = '0;
    m_mode = MODE_MULTIPLE; m_limit = BANK_DEPTH; m_addr = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 1500; n++) begin
      int eff;
      cfg_we = ($urandom_range(0, 2) == 0);
      cfg    = '0;
      case ($urandom_range(0, 9))
        0:       cfg.kind = CFG_MODE;
        1:       cfg.kind = CFG_LIMIT;
        default: cfg.kind = CFG_CATREG;
      endcase
      cfg.idx    = cat_t'($urandom);
      cfg.catreg = {1'($urandom), $urandom, $urandom};
      cfg.mode   = search_mode_t'($urandom_range(0, 1));
      // only shorten the loop while the count is low, as software would
      cfg.limit  = limit_t'($urandom_range(m_addr + 2, BANK_DEPTH));
      hold       = ($urandom_range(0, 4) == 0);
      @(posedge clk);
      eff = m_limit;
      if (!hold) m_addr = (m_addr + 1 >= eff) ? 0 : m_addr + 1;
      if (!hold && m_addr == 0 && eff < BANK_DEPTH) n_wrap_short++;
      if (cfg_we) begin
        if (cfg.kind == CFG_CATREG) m_regs[cfg.idx] = cfg.catreg;
        if (cfg.kind == CFG_MODE)   m_mode = cfg.mode;
        if (cfg.kind == CFG_LIMIT)  m_limit = int'(cfg.limit);
      end
      #1;
      checks++;
      if (int'(loop_addr) != m_addr) begin
        failures++;
        $display("loop addr %0d want %0d", loop_addr, m_addr);
      end
      checks++;
      if (mode != m_mode) failures++;
      for (int i = 0; i < NUM_CAT; i++) begin
        checks++;
        if (catregs[i] != m_regs[i]) failures++;
      end
    end
    checks++;
    if (n_wrap_short == 0) failures++;
    $display("short-loop wraps %0d", n_wrap_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
