// tb_rs_forney: for one or two errors with random positions and values,
// Lambda and Omega are built from the error locations in the testbench
// (Omega = Lambda*S mod x^2, scaled by a random constant); the module must
// return each error value at its location.
module tb_rs_forney;
  import tb_ref_pkg::*;
  `include "tb_check.svh"

  logic [3:0] x, lambda1, err_val;
  logic [3:0] omega [2];
  logic [3:0] X1, X2, e1, e2, c, S [4], l [3];
  int p1, p2;

  rs_forney dut (.*);

  initial begin
    for (int n = 0; n < 500; n++) begin
      p1 = $urandom_range(0, 14);
      do p2 = $urandom_range(0, 14); while (p2 == p1);
      X1 = alog(p1); X2 = alog(p2);
      e1 = 4'($urandom_range(1, 15));
      e2 = (n % 2) ? 4'($urandom_range(1, 15)) : 4'd0;
      c  = 4'($urandom_range(1, 15));
      for (int j = 0; j < 4; j++) S[j] = mul(e1, alog(p1 * j)) ^ mul(e2, alog(p2 * j));
      if (e2 != 0) begin l[0] = c; l[1] = mul(c, X1 ^ X2); l[2] = mul(c, mul(X1, X2)); end
      else begin l[0] = c; l[1] = mul(c, X1); l[2] = 0; end
      omega[0] = mul(l[0], S[0]);
      omega[1] = mul(l[0], S[1]) ^ mul(l[1], S[0]);
      lambda1 = l[1];
      x = X1; #1;
      `CHECK(err_val == e1, $sformatf("e1 %h != %h", err_val, e1));
      if (e2 != 0) begin
        x = X2; #1;
        `CHECK(err_val == e2, $sformatf("e2 %h != %h", err_val, e2));
      end
    end
    `FINISH
  end
endmodule
