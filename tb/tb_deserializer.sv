// tb_deserializer: the testbench drives frames (start bit, len bits MSB
// first, random idle gaps) and checks that every word comes out once,
// right-aligned, one clock after its last bit.
module tb_deserializer;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)

  logic line = 0, active, out_valid;
  logic [6:0] len = 40;
  logic [59:0] out_word, w;
  int lens [3] = '{40, 47, 60};
  int nout = 0, nin = 0;

  deserializer dut (.*);

  always @(posedge clk) if (out_valid) nout++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 150; n++) begin
      len = 7'(lens[n % 3]);
      w = {$urandom, $urandom};
      w = w & ((60'd1 << len) - 1);
      repeat ($urandom_range(1, 5)) @(negedge clk);
      line = 1;
      for (int i = 0; i < int'(len); i++) begin
        @(negedge clk); line = w[int'(len)-1-i];
        `CHECK(!out_valid, "no early word");
      end
      @(negedge clk); line = 0;
      `CHECK(out_valid && out_word == w, $sformatf("word %h != %h", out_word, w));
      nin++;
    end
    repeat (3) @(negedge clk);
    `CHECK(nout == nin, "one word per frame");
    `FINISH
  end
endmodule
