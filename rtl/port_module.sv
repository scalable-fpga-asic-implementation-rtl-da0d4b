// port_module -- one search port of the adapted FMCAM.
//
// A port accepts a search word and a mask ('req_valid' while 'req_ready').
// Its category-comparators decide which category banks the word can be in;
// the lowest such bank is selected by the category decoder and its broadcast
// word is fed to the search comparator each clock. The loop address of the
// first comparison is kept as the start address, and the bank is finished
// when the next broadcast address would equal it again, so a search covers
// exactly one loop of the counter from wherever the counter happened to be.
// A port therefore starts as soon as its request arrives, independently of
// the other ports.
//
// Search modes (sampled when the request is accepted):
//   multiple : every match is reported ('rsp.hit', 'rsp.addr') and the whole
//              loop is run;
//   single   : the search stops at the first match and the port is ready for
//              a new word on the next clock.
// Categories joined from several banks are searched one bank after the other,
// each for a full loop. A word that fits no category ends at once with
// 'found' = 0.
//
// Match address = {bank index, loop address}. Outputs are registered:
// 'rsp.hit' and 'rsp.done' are one-clock pulses one clock after the compared
// broadcast. With a loop of L words and no early stop a search takes L + 1
// clocks from acceptance to the next acceptance.
module port_module
  import fmcam_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_valid,
  output logic         req_ready,
  input  search_req_t  req,
  input  search_mode_t mode,
  input  catreg_t      catregs [NUM_CAT],
  input  bcast_t       bc,
  output search_rsp_t  rsp
);

  logic         busy;
  word_t        key, key_mask;
  search_mode_t mode_q;
  catvec_t      pending;
  logic         first;
  waddr_t       start_addr;
  logic         found_q;

  catvec_t      cat_hits;
  cat_t         sel;
  catvec_t      pending_next;
  logic         match;
  logic         bank_end;

  category_comparators u_catcmp (
    .key      (req.data),
    .key_mask (req.mask),
    .catregs  (catregs),
    .hits     (cat_hits)
  );

  // category decoder: lowest pending bank drives the multiplexer
  assign sel = first_set(pending);

  search_comparator u_cmp (
    .key      (key),
    .key_mask (key_mask),
    .entry    (bc.entries[sel]),
    .match    (match)
  );

  always_comb begin
    bank_end     = (bc.next_addr == (first ? bc.addr : start_addr));
    pending_next = pending;
    pending_next[sel] = 1'b0;
  end

  assign req_ready = !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      key        <= '0;
      key_mask   <= '0;
      mode_q     <= MODE_MULTIPLE;
      pending    <= '0;
      first      <= 1'b1;
      start_addr <= '0;
      found_q    <= 1'b0;
      rsp        <= '0;
    end else begin
      rsp.hit  <= 1'b0;
      rsp.done <= 1'b0;
      if (!busy) begin
        if (req_valid) begin
          key      <= req.data;
          key_mask <= req.mask;
          mode_q   <= mode;
          pending  <= cat_hits;
          first    <= 1'b1;
          found_q  <= 1'b0;
          if (cat_hits == '0) begin
            rsp.done  <= 1'b1;
            rsp.found <= 1'b0;
          end else begin
            busy <= 1'b1;
          end
        end
      end else if (bc.valid) begin
        first <= 1'b0;
        if (first) start_addr <= bc.addr;
        if (match) begin
          rsp.hit  <= 1'b1;
          rsp.addr <= {sel, bc.addr};
          found_q  <= 1'b1;
        end
        if (match && mode_q == MODE_SINGLE) begin
          busy      <= 1'b0;
          rsp.done  <= 1'b1;
          rsp.found <= 1'b1;
        end else if (bank_end) begin
          pending <= pending_next;
          first   <= 1'b1;
          if (pending_next == '0) begin
            busy      <= 1'b0;
            rsp.done  <= 1'b1;
            rsp.found <= found_q || match;
          end
        end
      end
    end
  end

  // a busy port always has a bank left to search
  a_pending : assert property (@(posedge clk) disable iff (!rst_n) busy |-> pending != '0);

endmodule
