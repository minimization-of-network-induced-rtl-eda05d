// tb_descrambler: scrambled words from the reference scrambler, started from a
// random history that the descrambler does not know, must come back out
// unchanged from the third word on (58 > 40 bits of history) (self-synchronization); the drop flag
// must travel with its word and also mark the two words after a dropped
// one (their taps reach back into it).
module tb_descrambler;
  import tb_ref_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 5000)

  logic in_valid = 0, in_drop = 0, out_valid, out_drop;
  logic [39:0] in_data = 0, out_data;
  logic [57:0] hist;
  logic [39:0] d;
  int taint = 0;

  descrambler dut (.*);

  initial begin
    hist = {$urandom, $urandom} ;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      d        = {$urandom, $urandom};
      in_valid = 1;
      in_drop  = ($urandom_range(0, 5) == 0);
      in_data  = scramble(d, hist);
      @(posedge clk); #1;
      `CHECK(out_valid, "valid latency 1");
      `CHECK(out_drop == (in_drop || taint > 0), "drop flag");
      taint = in_drop ? 2 : (taint > 0 ? taint - 1 : 0);
      if (n > 1) `CHECK(out_data == d, $sformatf("word %0d: %h != %h", n, out_data, d));
      @(negedge clk); in_valid = 0;
    end
    `FINISH
  end
endmodule
