// tb_sync_fifo: random pushes and pops (never beyond full or empty)
// against a queue model; data, empty and full must match the model.
module tb_sync_fifo;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)

  logic push = 0, pop = 0, empty, full;
  logic [59:0] din = 0, dout;
  logic [59:0] q [$];

  sync_fifo #(.W(60), .DEPTH(3)) dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      `CHECK(empty == (q.size() == 0), "empty");
      `CHECK(full == (q.size() == 3), "full");
      if (q.size() > 0) `CHECK(dout == q[0], "head data");
      push = !full && ($urandom_range(0, 1) == 1);
      pop  = !empty && ($urandom_range(0, 1) == 1);
      din  = {$urandom, $urandom};
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    `FINISH
  end
endmodule
