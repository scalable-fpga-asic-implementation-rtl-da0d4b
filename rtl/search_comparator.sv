// search_comparator -- the d-bit search comparator of a port module.
//
// Compares the search key with one broadcast reference word. Bits with
// key_mask = 1 are don't-care. An entry whose valid bit is clear never
// matches. Purely combinational.
module search_comparator
  import fmcam_pkg::*;
(
  input  word_t  key,
  input  word_t  key_mask,
  input  entry_t entry,
  output logic   match
);

  assign match = entry.valid && (((key ^ entry.data) & ~key_mask) == '0);

endmodule
