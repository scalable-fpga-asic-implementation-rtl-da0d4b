// tlc_top -- parallel table-lookup coder: adapted FMCAM + multi-port RAM.
//
// Table-lookup coding (for example Huffman encoding in JPEG) is split in two
// tables. The input-symbol table sits in the FMCAM: each of NUM_PORTS ports
// looks up one input symbol and returns the address where it is stored. The
// code-word table sits in a NUM_PORTS-read-port RAM at the same addresses: the
// match address of a port is used directly as the read address of the same
// RAM port, which returns the code word. All ports work at once and
// independently, so a processing-element array can hand over up to
// NUM_PORTS symbols in parallel.
//
// Interface:
//   cfg_we/cfg           FMCAM configuration (categories, search mode,
//                        counting value)
//   tbl_we/tbl           input-symbol table write (one word per clock)
//   code_we/code_waddr/code_wdata  code-word table write
//   sym_valid/sym_ready/sym        one search request per port
//   out_*                per port: out_valid with out_code/out_addr for each
//                        match; out_done (with out_found) when the search ends
// Timing: a symbol accepted in clock t is first compared in t+1; a match
// compared in clock u appears on out_valid in clock u+2 (one clock in the
// port, one in the RAM). out_done is delayed by the same clock so that a
// port's last code word and its done arrive together.
module tlc_top
  import fmcam_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  cfg_wr_t     cfg,
  input  logic        tbl_we,
  input  tbl_wr_t     tbl,
  input  logic        code_we,
  input  addr_t       code_waddr,
  input  codeword_t   code_wdata,
  input  logic        sym_valid [NUM_PORTS],
  output logic        sym_ready [NUM_PORTS],
  input  search_req_t sym       [NUM_PORTS],
  output logic        out_valid [NUM_PORTS],
  output codeword_t   out_code  [NUM_PORTS],
  output addr_t       out_addr  [NUM_PORTS],
  output logic        out_done  [NUM_PORTS],
  output logic        out_found [NUM_PORTS]
);

  search_rsp_t rsp    [NUM_PORTS];
  logic        rd_en  [NUM_PORTS];
  addr_t       rd_adr [NUM_PORTS];

  fmcam #(.NUM_PORTS(NUM_PORTS)) u_fmcam (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_we    (cfg_we),
    .cfg       (cfg),
    .tbl_we    (tbl_we),
    .tbl       (tbl),
    .req_valid (sym_valid),
    .req_ready (sym_ready),
    .req       (sym),
    .rsp       (rsp)
  );

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    assign rd_en[p]  = rsp[p].hit;
    assign rd_adr[p] = rsp[p].addr;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        out_valid[p] <= 1'b0;
        out_addr[p]  <= '0;
        out_done[p]  <= 1'b0;
        out_found[p] <= 1'b0;
      end else begin
        out_valid[p] <= rsp[p].hit;
        out_addr[p]  <= rsp[p].addr;
        out_done[p]  <= rsp[p].done;
        out_found[p] <= rsp[p].found;
      end
    end
  end

  multiport_ram #(.NUM_PORTS(NUM_PORTS)) u_codes (
    .clk   (clk),
    .we    (code_we),
    .waddr (code_waddr),
    .wdata (code_wdata),
    .re    (rd_en),
    .raddr (rd_adr),
    .rdata (out_code)
  );

endmodule
