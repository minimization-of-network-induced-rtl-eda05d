// tb_hamming_decoder: reference code words with 0, 1 or 2 flipped bits.
// No error and single errors (any of the 47 bits) must give the payload
// back, single errors with the corrected flag; double errors must raise
// the uncorrectable flag. Latency is two clocks.
module tb_hamming_decoder;
  import tb_ref_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)

  logic in_valid = 0, out_valid, out_corr, out_uncorr;
  logic [46:0] in_cw = 0;
  logic [39:0] out_data, d;
  int nerr, a, b;
  int n_single = 0, n_double = 0;

  hamming_decoder dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      d     = {$urandom, $urandom};
      nerr  = n % 3;
      in_cw = ham_encode(d);
      a = $urandom_range(0, 46);
      do b = $urandom_range(0, 46); while (b == a);
      if (nerr >= 1) in_cw[a] = ~in_cw[a];
      if (nerr == 2) in_cw[b] = ~in_cw[b];
      in_valid = 1;
      @(negedge clk); in_valid = 0;
      @(posedge clk); #1;
      `CHECK(out_valid, "latency 2");
      case (nerr)
        0: `CHECK(out_data == d && !out_corr && !out_uncorr, "no error");
        1: begin `CHECK(out_data == d && out_corr && !out_uncorr, $sformatf("single error bit %0d", a)); n_single++; end
        default: begin `CHECK(out_uncorr, $sformatf("double error bits %0d %0d", a, b)); n_double++; end
      endcase
    end
    `CHECK(n_single > 0 && n_double > 0, "both error classes exercised");
    `FINISH
  end
endmodule
