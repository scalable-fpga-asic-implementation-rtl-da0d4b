// category_registers -- the category structure store of the FMCAM controller.
//
// One register per category bank holds an enable bit, a category pattern and
// a bit-select word naming which bit positions of a reference word form the
// category field. A word belongs to category i when those selected bits equal
// the pattern's. Because both the pattern and the positions of the category
// bits are written by software, the categorisation is freely scalable: giving
// several banks the same pattern and bit-select joins them into one larger
// category, which the ports then search bank after bank.
//
// All registers are broadcast to every port module. A write takes effect on
// the next clock edge. Reset clears every enable, so no category exists until
// software defines one. The register layout is this design's choice.
module category_registers
  import fmcam_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    we,
  input  cat_t    idx,
  input  catreg_t wdata,
  output catreg_t regs [NUM_CAT]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CAT; i++) regs[i] <= '0;
    end else if (we) begin
      regs[idx] <= wdata;
    end
  end

endmodule
