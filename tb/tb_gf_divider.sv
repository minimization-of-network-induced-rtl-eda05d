// tb_gf_divider: for random dividends (degree <= 4) and divisors of every
// degree 0..3, quotient and remainder must satisfy
// dividend = quot * divisor + rem with deg(rem) < deg(divisor); the
// number of clocks must be 3 + (3 - deg(divisor)).
module tb_gf_divider;
  import tb_ref_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 50000)

  logic start = 0, busy, done, div_zero;
  logic [3:0] dividend [5], divisor [4], quot [5], rem [4];
  logic [3:0] acc [9];
  int dd, lat;
  int seen [4] = '{0, 0, 0, 0};

  gf_divider dut (.*);

  initial begin
    for (int i = 0; i < 5; i++) dividend[i] = 0;
    for (int i = 0; i < 4; i++) divisor[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      dd = n % 4;
      for (int i = 0; i < 5; i++) dividend[i] = 4'($urandom);
      for (int i = 0; i < 4; i++) divisor[i] = (i < dd) ? 4'($urandom) : 4'd0;
      divisor[dd] = 4'($urandom_range(1, 15));
      start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      `CHECK(lat == 3 + (3 - dd) + 1, $sformatf("latency %0d for degree %0d", lat, dd));
      `CHECK(!div_zero, "no div_zero");
      for (int i = 0; i < 9; i++) acc[i] = 0;
      for (int a = 0; a < 5; a++)
        for (int b = 0; b < 4; b++) acc[a+b] ^= mul(quot[a], divisor[b]);
      for (int i = 0; i < 4; i++) acc[i] ^= rem[i];
      for (int i = 0; i < 9; i++)
        `CHECK(acc[i] == ((i < 5) ? dividend[i] : 4'd0), $sformatf("identity coef %0d deg %0d", i, dd));
      for (int i = dd; i < 4; i++) `CHECK(rem[i] == 0, "remainder degree");
      seen[dd]++;
    end
    // zero divisor
    @(negedge clk);
    for (int i = 0; i < 4; i++) divisor[i] = 0;
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    `CHECK(div_zero, "div_zero flagged");
    `FINISH
  end
endmodule
