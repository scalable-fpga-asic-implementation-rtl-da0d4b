// loop_address_counter -- circular word-address generator of the FMCAM
// controller.
//
// The counter steps through the word addresses of a category bank, one per
// clock, and wraps back to 0; it runs whether or not any port is searching.
// Because it never restarts for a request, every port can begin its search at
// whatever address is current and finish when the count comes round to that
// address again, so ports never wait for one another.
//
// Counting value setting mode: the loop length is 'limit' (1..BANK_DEPTH);
// the counter wraps after address limit-1. A limit of 0 or above BANK_DEPTH
// selects the default full-bank loop. 'hold' freezes the count for a cycle;
// the category block raises it while a bank is being written, because the
// single-port banks cannot be read in that cycle (this design's choice).
//
// Timing: 'addr' is a register; it changes on the clock edge after a cycle
// without 'hold'. Reset (active low, synchronous) sets it to 0.
module loop_address_counter
  import fmcam_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   hold,
  input  limit_t limit,
  output waddr_t addr
);

  limit_t eff_limit;

  always_comb begin
    if (limit == '0 || limit > limit_t'(BANK_DEPTH)) eff_limit = limit_t'(BANK_DEPTH);
    else                                              eff_limit = limit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr <= '0;
    end else if (!hold) begin
      if (limit_t'(addr) + limit_t'(1) >= eff_limit) addr <= '0;
      else                                          addr <= addr + waddr_t'(1);
    end
  end

endmodule
