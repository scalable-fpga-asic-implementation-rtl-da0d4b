// fmcam -- the adapted flexible multi-ported content addressable memory.
//
// Three independent parts, as in the block diagram of the design:
//   controller     : category registers, search mode, counting value and the
//                    free-running loop-address counter;
//   category block : one single-port bank per category, all read at the loop
//                    address and broadcast to every port;
//   port block     : NUM_PORTS search ports, each with its own category
//                    comparators, category decoder and one search comparator.
// A search over one category bank is bit-parallel and block-parallel: one
// word per clock, so it lasts one counter loop (or less in single search
// mode). All ports search at once, so throughput scales with NUM_PORTS while
// the stored table is held only once.
//
// Interface: configuration writes (cfg_we/cfg), contents-table writes
// (tbl_we/tbl, one word per clock, briefly pausing the counter), and per port
// a request handshake (req_valid/req_ready/req) with a registered response
// (rsp). Latency from acceptance to the first comparison is 1 clock; a match
// is reported 1 clock after it is compared.
module fmcam
  import fmcam_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_we,
  input  cfg_wr_t      cfg,
  input  logic         tbl_we,
  input  tbl_wr_t      tbl,
  input  logic         req_valid [NUM_PORTS],
  output logic         req_ready [NUM_PORTS],
  input  search_req_t  req       [NUM_PORTS],
  output search_rsp_t  rsp       [NUM_PORTS]
);

  catreg_t      catregs [NUM_CAT];
  search_mode_t mode;
  waddr_t       loop_addr;
  logic         hold;
  bcast_t       bc;

  fmcam_controller u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_we    (cfg_we),
    .cfg       (cfg),
    .hold      (hold),
    .catregs   (catregs),
    .mode      (mode),
    .loop_addr (loop_addr)
  );

  category_block u_cat (
    .clk       (clk),
    .rst_n     (rst_n),
    .loop_addr (loop_addr),
    .tbl_we    (tbl_we),
    .tbl       (tbl),
    .hold      (hold),
    .bc        (bc)
  );

  port_block #(.NUM_PORTS(NUM_PORTS)) u_ports (
    .clk       (clk),
    .rst_n     (rst_n),
    .req_valid (req_valid),
    .req_ready (req_ready),
    .req       (req),
    .mode      (mode),
    .catregs   (catregs),
    .bc        (bc),
    .rsp       (rsp)
  );

endmodule
