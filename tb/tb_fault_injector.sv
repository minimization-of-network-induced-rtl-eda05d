// tb_fault_injector: a forced mask must flip exactly the marked bits of a
// frame and nothing outside data_phase; a zero threshold must flip nothing;
// a threshold of 655 (p = 1e-2) must flip about 1 % of the bits of a long
// run (between 0.8 % and 1.2 % over 200000 bits); err_count must count flips.
module tb_fault_injector;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 400000)

  logic line_in = 0, data_phase = 0, bsc_en = 0, force_en = 0, line_out;
  logic [6:0] bit_idx = 0;
  logic [15:0] bsc_thresh = 0;
  logic [59:0] force_mask = 0;
  logic [31:0] err_count;
  int flips, c0;

  fault_injector dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // forced positions
    for (int n = 0; n < 20; n++) begin
      force_en = 1; force_mask = {$urandom, $urandom};
      c0 = err_count; flips = 0;
      for (int i = 0; i < 60; i++) begin
        @(negedge clk);
        data_phase = 1; bit_idx = 7'(i); line_in = $urandom_range(0, 1);
        #1 `CHECK(line_out == (line_in ^ force_mask[i]), "forced flip");
        flips += force_mask[i];
      end
      @(negedge clk); data_phase = 0; line_in = 1;
      #1 `CHECK(line_out == 1, "no flip outside data phase");
      @(posedge clk); #1;
      `CHECK(err_count - c0 == flips, "error count");
    end
    force_en = 0;
    // threshold 0
    bsc_en = 1; bsc_thresh = 0; flips = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk); data_phase = 1; line_in = 0; #1 flips += line_out;
    end
    `CHECK(flips == 0, "p = 0");
    // p = 1e-2
    bsc_thresh = 16'd655; flips = 0;
    for (int i = 0; i < 200000; i++) begin
      @(negedge clk); data_phase = 1; line_in = 0; #1 flips += line_out;
    end
    $display("flips at p=1e-2: %0d of 200000", flips);
    `CHECK(flips > 1600 && flips < 2400, "BSC rate");
    `FINISH
  end
endmodule
