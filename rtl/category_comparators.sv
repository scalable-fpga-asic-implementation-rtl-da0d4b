// category_comparators -- the c category-comparators of a port module.
//
// Each comparator checks the incoming search word against one category
// register: the word belongs to category i when the register is enabled and
// the bits it selects equal its pattern. Bits the search itself masks out
// (key_mask = 1) are left out of the category test as well, so a masked
// search that spans category bits is sent to every category it may hit
// (this treatment of masked category bits is this design's choice).
// Purely combinational; the result vector has one bit per category bank.
module category_comparators
  import fmcam_pkg::*;
(
  input  word_t   key,
  input  word_t   key_mask,
  input  catreg_t catregs [NUM_CAT],
  output catvec_t hits
);

  always_comb begin
    for (int i = 0; i < NUM_CAT; i++) begin
      hits[i] = catregs[i].en &&
                (((key ^ catregs[i].pattern) & catregs[i].bits & ~key_mask) == '0);
    end
  end

endmodule
