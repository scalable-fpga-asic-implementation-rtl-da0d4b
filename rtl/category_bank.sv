// category_bank -- single-port memory bank holding the reference words of
// one category.
//
// It stands for a conventional single-port memory macro: one access per
// clock, either a write (when 'we' is high) or a read. Reads are synchronous:
// 'rdata' shows the word at 'addr' one clock after the address is given. A
// write cycle performs no read and leaves 'rdata' unchanged. Every word carries
// a valid bit; reset clears the valid bits, so an unloaded word can never
// match (the valid bit is this design's choice).
module category_bank
  import fmcam_pkg::*;
#(
  parameter int unsigned DEPTH = BANK_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  entry_t                   wdata,
  output entry_t                   rdata
);

  entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i].valid <= 1'b0;
      rdata <= '0;
    end else if (we) begin
      mem[addr] <= wdata;
    end else begin
      rdata <= mem[addr];
    end
  end

endmodule
