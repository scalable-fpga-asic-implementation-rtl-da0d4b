// huffman_rate_tb -- JPEG AC Huffman encoding on coders of 1, 2, 4, 8 and 16
// ports (huffman_rate_unit), each port encoding 30 symbols. For each size it
// prints clocks per symbol for the full-loop multiple-mode run and for the
// single-mode run with counting value 11, per port and for the whole coder.
// Checks: every code word; exactly 17 clocks per symbol per port in the
// full-loop run; the single-mode run faster than the full-loop run; and the
// full-loop time shrinking in proportion to the port count.
module huffman_rate_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 30;
  int   fin [5], chk [5], fail [5], cfull [5], cad [5];
  int   checks = 0, failures = 0;
  logic f0, f1, f2, f3, f4;

  huffman_rate_unit #(.NUM_PORTS(1),  .NSYM_PER_PORT(N)) u1  (.clk(clk), .finished(f0), .checks(chk[0]), .failures(fail[0]), .clocks_full(cfull[0]), .clocks_adapted(cad[0]));
  huffman_rate_unit #(.NUM_PORTS(2),  .NSYM_PER_PORT(N)) u2  (.clk(clk), .finished(f1), .checks(chk[1]), .failures(fail[1]), .clocks_full(cfull[1]), .clocks_adapted(cad[1]));
  huffman_rate_unit #(.NUM_PORTS(4),  .NSYM_PER_PORT(N)) u4  (.clk(clk), .finished(f2), .checks(chk[2]), .failures(fail[2]), .clocks_full(cfull[2]), .clocks_adapted(cad[2]));
  huffman_rate_unit #(.NUM_PORTS(8),  .NSYM_PER_PORT(N)) u8  (.clk(clk), .finished(f3), .checks(chk[3]), .failures(fail[3]), .clocks_full(cfull[3]), .clocks_adapted(cad[3]));
  huffman_rate_unit #(.NUM_PORTS(16), .NSYM_PER_PORT(N)) u16 (.clk(clk), .finished(f4), .checks(chk[4]), .failures(fail[4]), .clocks_full(cfull[4]), .clocks_adapted(cad[4]));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    static int ports [5] = '{1, 2, 4, 8, 16};
    wait (f0 && f1 && f2 && f3 && f4);
    $display("ports | full loop, multiple mode     | counting value 11, single mode");
    $display("      | clk/sym/port  clk/sym total  | clk/sym/port  clk/sym total");
    for (int i = 0; i < 5; i++) begin
      $display("%5d | %12.2f  %12.3f  | %12.2f  %12.3f", ports[i],
               real'(cfull[i]) / N, real'(cfull[i]) / (N * ports[i]),
               real'(cad[i]) / N, real'(cad[i]) / (N * ports[i]));
      checks += chk[i] + 2;
      failures += fail[i];
      if (cad[i] >= cfull[i]) begin failures++; $display("single mode not faster at %0d ports", ports[i]); end
      // same symbol count per port, 17 clocks each, a few clocks to drain
      if (cfull[i] < 17 * N || cfull[i] > 17 * N + 8) begin
        failures++;
        $display("full-loop run took %0d clocks at %0d ports", cfull[i], ports[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
