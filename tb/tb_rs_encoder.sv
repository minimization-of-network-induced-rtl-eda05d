// tb_rs_encoder: code words must match a reference long-division encoder,
// vanish at alpha^0..alpha^3, and appear RS_K+1 = 12 clocks after loading.
module tb_rs_encoder;
  import tb_ref_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)

  logic in_valid = 0, in_ready, out_valid;
  logic [43:0] in_msg = 0;
  logic [59:0] out_cw;
  int lat;

  rs_encoder dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      `CHECK(in_ready, "ready when idle");
      in_msg   = {$urandom, $urandom};
      if (n == 0) in_msg = 44'h1;
      in_valid = 1;
      @(negedge clk); in_valid = 0;
      lat = 1;
      while (!out_valid) begin @(negedge clk); lat++; end
      `CHECK(lat == 12, $sformatf("latency %0d", lat));
      `CHECK(out_cw == rs_encode(in_msg), $sformatf("cw %h != %h", out_cw, rs_encode(in_msg)));
      for (int j = 0; j < 4; j++) `CHECK(rs_eval(out_cw, j) == 0, "root of code word");
    end
    `FINISH
  end
endmodule
