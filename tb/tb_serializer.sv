// tb_serializer: frames of 40, 47 and 60 bits. The line must show the start
// bit the clock after acceptance, then the code word MSB first with
// data_phase high and bit_idx counting, then GAP idle bits before the next
// acceptance (1 + len + GAP clocks per frame).
module tb_serializer;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)

  logic in_valid = 0, in_ready, line, data_phase, busy, frame_done;
  logic [59:0] in_word = 0;
  logic [6:0]  in_len = 0, bit_idx;
  int lens [3] = '{40, 47, 60};
  int len, cyc;

  serializer #(.GAP(2)) dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 150; n++) begin
      @(negedge clk);
      `CHECK(in_ready && !line, "idle between frames");
      len = lens[n % 3];
      in_word = {$urandom, $urandom};
      in_word = in_word & ((60'd1 << len) - 1);
      in_len = 7'(len); in_valid = 1;
      @(negedge clk); in_valid = 0;
      `CHECK(line == 1'b1 && !data_phase, "start bit");
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        `CHECK(line == in_word[len-1-i], $sformatf("bit %0d of %0d", i, len));
        `CHECK(data_phase && bit_idx == 7'(i), "data phase / index");
        `CHECK(!in_ready, "busy during frame");
      end
      cyc = 0;
      do begin @(negedge clk); cyc++; `CHECK(line == 0 && !data_phase, "gap idle"); end while (!in_ready);
      `CHECK(cyc == 2, $sformatf("gap %0d", cyc));
    end
    `FINISH
  end
endmodule
