// port_block -- the p port modules of the adapted FMCAM.
//
// All ports receive the same broadcast reference words, category registers
// and search mode, and run fully independently: each has its own request
// handshake and response. The number of ports is the scaling parameter of
// the design; the comparators grow linearly with it while the contents-table
// stays shared.
module port_block
  import fmcam_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_valid [NUM_PORTS],
  output logic         req_ready [NUM_PORTS],
  input  search_req_t  req       [NUM_PORTS],
  input  search_mode_t mode,
  input  catreg_t      catregs   [NUM_CAT],
  input  bcast_t       bc,
  output search_rsp_t  rsp       [NUM_PORTS]
);

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    port_module u_port (
      .clk       (clk),
      .rst_n     (rst_n),
      .req_valid (req_valid[p]),
      .req_ready (req_ready[p]),
      .req       (req[p]),
      .mode      (mode),
      .catregs   (catregs),
      .bc        (bc),
      .rsp       (rsp[p])
    );
  end

endmodule
