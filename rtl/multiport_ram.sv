// multiport_ram -- code-word table with one read port per FMCAM port.
//
// Each FMCAM port sends its match address to its own read port here and gets
// the code word stored at that address one clock later. Software loads the
// table through the single write port. This is the simplest multi-port RAM
// that does the job: one storage array read by every port in the same clock;
// an area-optimised bank-based multi-port RAM can replace it without changing
// the interface. Reads are synchronous; a read and a write of the same
// address in one clock return the old word.
module multiport_ram
  import fmcam_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 16,
  parameter int unsigned DEPTH     = 1 << ADDR_W,
  parameter type         data_t    = codeword_t
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  data_t                    wdata,
  input  logic                     re    [NUM_PORTS],
  input  logic [$clog2(DEPTH)-1:0] raddr [NUM_PORTS],
  output data_t                    rdata [NUM_PORTS]
);

  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_rd
    always_ff @(posedge clk) begin
      if (re[p]) rdata[p] <= mem[raddr[p]];
    end
  end

endmodule
