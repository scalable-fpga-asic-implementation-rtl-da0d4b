// search_comparator_tb -- random keys, masks and entries, plus entries built
// to match, compared with an independently written bitwise loop.
module search_comparator_tb;
  import fmcam_pkg::*;

  word_t  key, key_mask;
  entry_t entry;
  logic   match, want;
  int     checks = 0, failures = 0, hits = 0;

  search_comparator dut (.key(key), .key_mask(key_mask), .entry(entry), .match(match));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      key      = $urandom;
      key_mask = (n % 3 == 0) ? '0 : ($urandom & $urandom);
      entry.valid = (n % 7 != 0);
      case (n % 4)
        0: entry.data = $urandom;
        1: entry.data = key;
        2: entry.data = key ^ (word_t'(1) << $urandom_range(0, DATA_W - 1));
        default: entry.data = (key & ~key_mask) | ($urandom & key_mask);
      endcase
      #1;
      want = entry.valid;
      for (int b = 0; b < DATA_W; b++)
        if (!key_mask[b] && key[b] != entry.data[b]) want = 1'b0;
      checks++;
      if (want) hits++;
      if (match !== want) begin
        failures++;
        $display("key %h mask %h entry %h: got %0b want %0b", key, key_mask, entry, match, want);
      end
    end
    checks++;
    if (hits < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
