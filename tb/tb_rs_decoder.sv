// tb_rs_decoder: reference code words with 0..2 random symbol errors must
// be corrected (with the right error count). Three errors exceed the code:
// the decoder may then miscorrect into another code word, but most such
// words must be flagged as failures. The latency
// must be the fixed 56 clocks whatever the number of errors.
module tb_rs_decoder;
  import tb_ref_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 400000)

  logic in_valid = 0, in_ready, out_valid, out_fail;
  logic [59:0] in_cw = 0, cw;
  logic [43:0] out_msg, msg;
  logic [1:0] out_nerr;
  int ne, lat, p [3], nfail3 = 0, n3 = 0, maxlat = 0;

  rs_decoder dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      `CHECK(in_ready, "ready when idle");
      msg = {$urandom, $urandom};
      cw  = rs_encode(msg);
      ne  = n % 4;
      p[0] = $urandom_range(0, 14);
      do p[1] = $urandom_range(0, 14); while (p[1] == p[0]);
      do p[2] = $urandom_range(0, 14); while (p[2] == p[0] || p[2] == p[1]);
      for (int e = 0; e < ne; e++) cw[4*p[e] +: 4] ^= 4'($urandom_range(1, 15));
      in_cw = cw; in_valid = 1;
      @(negedge clk); in_valid = 0;
      lat = 1;
      while (!out_valid) begin @(negedge clk); lat++; end
      if (lat > maxlat) maxlat = lat;
      `CHECK(lat == 56, $sformatf("latency %0d with %0d errors", lat, ne));
      if (ne <= 2) begin
        `CHECK(!out_fail && out_msg == msg, $sformatf("%0d errors: %h != %h", ne, out_msg, msg));
        `CHECK(out_nerr == 2'(ne), "error count");
      end else begin
        n3++;
        if (out_fail) nfail3++;
      end
    end
    $display("3-error words: %0d, flagged: %0d, max latency %0d", n3, nfail3, maxlat);
    `CHECK(nfail3 > n3 / 2, "most 3-error words flagged");
    `FINISH
  end
endmodule
