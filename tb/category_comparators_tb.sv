// category_comparators_tb -- random category registers (some sharing a
// pattern to form joined categories, some disabled) and random keys and
// masks; each hit bit is compared with a bitwise model.
module category_comparators_tb;
  import fmcam_pkg::*;

  word_t   key, key_mask;
  catreg_t catregs [NUM_CAT];
  catvec_t hits, want;
  int      checks = 0, failures = 0, nhit = 0;

  category_comparators dut (.key(key), .key_mask(key_mask), .catregs(catregs), .hits(hits));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      // category field: a random 4-bit slice of the word
      automatic int lo = $urandom_range(0, DATA_W - 4);
      for (int i = 0; i < NUM_CAT; i++) begin
        catregs[i].en      = ($urandom_range(0, 7) != 0);
        catregs[i].bits    = word_t'(4'hf) << lo;
        catregs[i].pattern = word_t'($urandom_range(0, 15)) << lo;
      end
      key      = (n % 2 == 1) ? catregs[$urandom_range(0, NUM_CAT - 1)].pattern | ($urandom & ~(word_t'(4'hf) << lo)) : $urandom;
      key_mask = (n % 5 == 0) ? $urandom : '0;
      #1;
      for (int i = 0; i < NUM_CAT; i++) begin
        want[i] = catregs[i].en;
        for (int b = 0; b < DATA_W; b++)
          if (catregs[i].bits[b] && !key_mask[b] && key[b] != catregs[i].pattern[b]) want[i] = 1'b0;
      end
      checks++;
      if (hits != '0) nhit++;
      if (hits !== want) begin
        failures++;
        $display("key %h mask %h: got %h want %h", key, key_mask, hits, want);
      end
    end
    checks++;
    if (nhit < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
