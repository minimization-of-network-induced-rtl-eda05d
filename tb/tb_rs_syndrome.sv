// tb_rs_syndrome: syndromes of random words (code words with 0..3 symbol
// errors) must equal r(alpha^j) from the reference, after 15 clocks.
module tb_rs_syndrome;
  import tb_ref_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)

  logic start = 0, busy, done, nonzero;
  logic [59:0] in_cw = 0;
  logic [3:0] syn [4];
  int lat, ne;
  logic any;

  rs_syndrome dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_cw = rs_encode({$urandom, $urandom});
      ne = n % 4;
      for (int e = 0; e < ne; e++) in_cw[4*$urandom_range(0,14) +: 4] ^= 4'($urandom_range(1,15));
      start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      `CHECK(lat == 16, $sformatf("latency %0d", lat));
      any = 0;
      for (int j = 0; j < 4; j++) begin
        `CHECK(syn[j] == rs_eval(in_cw, j), $sformatf("S%0d", j));
        any |= (rs_eval(in_cw, j) != 0);
      end
      `CHECK(nonzero == any, "nonzero flag");
    end
    `FINISH
  end
endmodule
