// tb_rs_chien_search: Lambda with 0, 1 or 2 known roots alpha^-p (random
// positions, random scale) must give hits exactly at those positions,
// positions 0..14 in order over 15 clocks, and the right root count.
module tb_rs_chien_search;
  import tb_ref_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 50000)

  logic start = 0, busy, pos_valid, hit, done;
  logic [3:0] pos, x, x_inv, nroots;
  logic [3:0] lambda [3];
  logic [3:0] X1, X2, c;
  int p1, p2, k, nr, cyc;
  logic [14:0] expect_hits, got_hits;

  rs_chien_search dut (.*);

  initial begin
    for (int i = 0; i < 3; i++) lambda[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      k  = n % 3;
      p1 = $urandom_range(0, 14);
      do p2 = $urandom_range(0, 14); while (p2 == p1);
      X1 = alog(p1); X2 = alog(p2); c = 4'($urandom_range(1, 15));
      expect_hits = 0;
      case (k)
        0: begin lambda[0] = c; lambda[1] = 0; lambda[2] = 0; end
        1: begin lambda[0] = c; lambda[1] = mul(c, X1); lambda[2] = 0; expect_hits[p1] = 1; end
        default: begin
          lambda[0] = c; lambda[1] = mul(c, X1 ^ X2); lambda[2] = mul(c, mul(X1, X2));
          expect_hits[p1] = 1; expect_hits[p2] = 1;
        end
      endcase
      start = 1;
      @(negedge clk); start = 0;
      got_hits = 0; cyc = 0;
      while (!done) begin
        if (pos_valid) begin
          `CHECK(pos == 4'(cyc), "positions in order");
          `CHECK(x == alog(cyc) && x_inv == alog(15 - cyc), "X and X^-1");
          got_hits[pos] = hit;
          cyc++;
        end
        @(negedge clk);
      end
      `CHECK(cyc == 15, "15 positions");
      `CHECK(got_hits == expect_hits, $sformatf("hits %b != %b", got_hits, expect_hits));
      `CHECK(nroots == 4'($countones(expect_hits)), "root count");
    end
    `FINISH
  end
endmodule
