// tb_rx_capture_ram: writes with enable toggling; exactly the enabled
// words must be stored in order and read back (one clock read latency);
// writing stops at DEPTH (full); clear restarts at address 0.
module tb_rx_capture_ram;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 50000)

  localparam int DEPTH = 64;
  logic enable = 0, clear = 0, wr_valid = 0, full;
  logic [42:0] wr_data = 0, rd_data;
  logic [5:0] rd_addr = 0;
  logic [6:0] count;
  logic [42:0] model [$];

  rx_capture_ram #(.W(43), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      model.delete();
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        enable   = ($urandom_range(0, 3) != 0);
        wr_valid = $urandom_range(0, 1);
        wr_data  = {$urandom, $urandom};
        if (enable && wr_valid && model.size() < DEPTH) model.push_back(wr_data);
      end
      @(negedge clk); enable = 0; wr_valid = 0;
      `CHECK(int'(count) == model.size(), $sformatf("count %0d != %0d", count, model.size()));
      `CHECK(full == (model.size() == DEPTH), "full");
      for (int a = 0; a < model.size(); a++) begin
        rd_addr = 6'(a);
        @(negedge clk);
        `CHECK(rd_data == model[a], $sformatf("addr %0d", a));
      end
      clear = 1; @(negedge clk); clear = 0;
      `CHECK(count == 0, "clear");
    end
    `FINISH
  end
endmodule
