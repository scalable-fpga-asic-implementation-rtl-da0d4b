// multiport_ram_tb -- fills the code-word table, then every port reads random
// addresses in the same clock while writes continue; each port's data one
// clock later is compared with a model (a read of the word being written
// returns the old word). A port without 're' keeps its last data.
module multiport_ram_tb;
  import fmcam_pkg::*;

  localparam int unsigned P = 4;
  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic      clk = 1'b0;
  logic      we;
  addr_t     waddr;
  codeword_t wdata;
  logic      re    [P];
  addr_t     raddr [P];
  codeword_t rdata [P];
  codeword_t model [DEPTH];
  codeword_t want  [P];
  int        checks = 0, failures = 0;

  always #5 clk = ~clk;

  multiport_ram #(.NUM_PORTS(P)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .re(re), .raddr(raddr), .rdata(rdata)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < P; p++) begin re[p] = 1'b0; raddr[p] = '0; end
    we = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      waddr = addr_t'(i);
      wdata = codeword_t'($urandom);
      model[i] = wdata;
      @(posedge clk);
      #1;
    end
    for (int p = 0; p < P; p++) want[p] = rdata[p];
    for (int n = 0; n < 500; n++) begin
      we    = ($urandom_range(0, 3) == 0);
      waddr = addr_t'($urandom);
      wdata = codeword_t'($urandom);
      for (int p = 0; p < P; p++) begin
        re[p]    = ($urandom_range(0, 4) != 0);
        raddr[p] = (p == 0) ? waddr : addr_t'($urandom);
        if (re[p]) want[p] = model[raddr[p]];
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      for (int p = 0; p < P; p++) begin
        checks++;
        if (rdata[p] != want[p]) begin
          failures++;
          $display("port %0d got %h want %h", p, rdata[p], want[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
