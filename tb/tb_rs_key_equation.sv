// tb_rs_key_equation: syndromes of 0, 1 or 2 random symbol errors. Lambda
// must have degree equal to the number of errors and vanish at
// alpha^-p for every error position p; Omega must satisfy
// Omega = Lambda * S mod x^2 (key equation). Zero syndromes give Lambda = 1.
module tb_rs_key_equation;
  import tb_ref_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)

  logic start = 0, busy, done, fail;
  logic [3:0] syn [4], lambda [3], omega [2];
  logic [1:0] lambda_deg;
  int ne, p1, p2;
  logic [3:0] e1, e2, v, ks;

  rs_key_equation dut (.*);

  function automatic logic [3:0] lam_at(int p);
    logic [3:0] xi;
    xi = alog(15 - p);
    return lambda[0] ^ mul(lambda[1], xi) ^ mul(lambda[2], mul(xi, xi));
  endfunction

  initial begin
    for (int j = 0; j < 4; j++) syn[j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      ne = n % 3;
      p1 = $urandom_range(0, 14);
      do p2 = $urandom_range(0, 14); while (p2 == p1);
      e1 = (ne >= 1) ? 4'($urandom_range(1, 15)) : 4'd0;
      e2 = (ne == 2) ? 4'($urandom_range(1, 15)) : 4'd0;
      for (int j = 0; j < 4; j++) syn[j] = mul(e1, alog(p1 * j)) ^ mul(e2, alog(p2 * j));
      start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      `CHECK(!fail, "no failure for <= 2 errors");
      `CHECK(lambda_deg == 2'(ne), $sformatf("degree %0d for %0d errors", lambda_deg, ne));
      if (ne >= 1) `CHECK(lam_at(p1) == 0, "root at first error");
      if (ne == 2) `CHECK(lam_at(p2) == 0, "root at second error");
      if (ne == 0) `CHECK(lambda[0] != 0 && lambda[1] == 0 && lambda[2] == 0, "Lambda constant");
      `CHECK(omega[0] == mul(lambda[0], syn[0]), "key equation x^0");
      `CHECK(omega[1] == (mul(lambda[0], syn[1]) ^ mul(lambda[1], syn[0])), "key equation x^1");
      v  = mul(lambda[0], syn[2]) ^ mul(lambda[1], syn[1]) ^ mul(lambda[2], syn[0]);
      ks = mul(lambda[0], syn[3]) ^ mul(lambda[1], syn[2]) ^ mul(lambda[2], syn[1]);
      `CHECK(v == 0 && ks == 0, "key equation x^2, x^3");
    end
    `FINISH
  end
endmodule
