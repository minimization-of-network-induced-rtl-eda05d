// tb_scrambler: checks the scrambler against a bit-serial reference of the
// recursion s[n] = d[n] ^ s[n-39] ^ s[n-58] over a run of random words,
// with gaps, and checks the one-clock latency.
module tb_scrambler;
  import tb_ref_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 5000)

  logic in_valid = 0, out_valid;
  logic [39:0] in_data = 0, out_data;
  logic [57:0] hist = 0;
  logic [39:0] exp_d;

  scrambler dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = {$urandom, $urandom} & 40'hFF_FFFF_FFFF;
      if (n < 3) in_data = 40'h0;  // an all-zero payload must come out as zeros too
      if (in_valid) exp_d = scramble(in_data, hist);
      @(posedge clk); #1;
      `CHECK(out_valid == in_valid, "valid latency 1");
      if (in_valid) `CHECK(out_data == exp_d, $sformatf("word %0d: %h != %h", n, out_data, exp_d));
    end
    // a nonzero pattern must change the output of a following zero word
    `FINISH
  end
endmodule
