// category_block -- the contents-table of the FMCAM, split into one
// single-port bank per category.
//
// Every clock all banks are read at the loop address from the controller and
// the words they return are broadcast together to every port module; a port
// takes the word of the category it is searching. The CAM comparators live in
// the ports, not here, so the banks are plain memories.
//
// Contents-table writes: 'tbl_we' with 'tbl.bank', 'tbl.addr' and
// 'tbl.entry' raises the bank write enable of one bank. That bank then uses
// its single port for the write, so 'hold' tells the controller to freeze the
// loop counter and the broadcast of the following cycle is marked invalid;
// the ports skip it and lose no comparison (this handling of writes during
// searches is this design's choice).
//
// Timing: the broadcast is one clock behind the loop address (synchronous
// bank read). 'bc.addr' is the loop address the words belong to and
// 'bc.next_addr' the loop address that the next valid broadcast will carry.
module category_block
  import fmcam_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  waddr_t  loop_addr,
  input  logic    tbl_we,
  input  tbl_wr_t tbl,
  output logic    hold,
  output bcast_t  bc
);

  entry_t rdata [NUM_CAT];
  logic   bc_valid_q;
  waddr_t bc_addr_q;

  assign hold = tbl_we;

  for (genvar b = 0; b < NUM_CAT; b++) begin : g_bank
    logic bank_we;
    assign bank_we = tbl_we && (tbl.bank == cat_t'(b));

    category_bank u_bank (
      .clk   (clk),
      .rst_n (rst_n),
      .we    (bank_we),
      .addr  (bank_we ? tbl.addr : loop_addr),
      .wdata (tbl.entry),
      .rdata (rdata[b])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bc_valid_q <= 1'b0;
      bc_addr_q  <= '0;
    end else begin
      bc_valid_q <= !tbl_we;
      bc_addr_q  <= loop_addr;
    end
  end

  always_comb begin
    bc.valid     = bc_valid_q;
    bc.addr      = bc_addr_q;
    bc.next_addr = loop_addr;
    for (int b = 0; b < NUM_CAT; b++) bc.entries[b] = rdata[b];
  end

endmodule
