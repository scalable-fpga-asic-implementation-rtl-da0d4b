// fmcam_controller -- controller of the adapted FMCAM.
//
// It holds the two main controller parts, the category registers and the
// loop-address counter, plus two mode registers: the search mode select
// (multiple or single search, broadcast to all ports) and the counting value
// that sets the loop length of the counter.
//
// Configuration arrives as one write per clock on 'cfg_we'/'cfg'; 'cfg.kind'
// selects the category register 'cfg.idx', the search mode or the counting
// value. Reset selects multiple search mode, the full-bank loop and no
// categories. 'hold' (a contents-table write) freezes the counter.
// Software should change the mode and the counting value only while every
// port is idle; a port keeps the mode it sampled when it accepted a request.
module fmcam_controller
  import fmcam_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_we,
  input  cfg_wr_t      cfg,
  input  logic         hold,
  output catreg_t      catregs [NUM_CAT],
  output search_mode_t mode,
  output waddr_t       loop_addr
);

  category_registers u_catregs (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (cfg_we && cfg.kind == CFG_CATREG),
    .idx   (cfg.idx),
    .wdata (cfg.catreg),
    .regs  (catregs)
  );

  limit_t limit;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode  <= MODE_MULTIPLE;
      limit <= limit_t'(BANK_DEPTH);
    end else if (cfg_we) begin
      if (cfg.kind == CFG_MODE)  mode  <= cfg.mode;
      if (cfg.kind == CFG_LIMIT) limit <= cfg.limit;
    end
  end

  loop_address_counter u_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .hold  (hold),
    .limit (limit),
    .addr  (loop_addr)
  );

endmodule
