// tb_fec_transmitter: payloads in all three modes; each frame captured from
// the line must be the reference code word of the reference-scrambled
// payload (scrambler history carried across modes). Checks the fixed
// delay from acceptance to the first code word bit (NONE 2, HAMMING 4,
// RS 14 clocks) and that tx_active covers the whole frame.
module tb_fec_transmitter;
  import tb_ref_pkg::*;
  import fec_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 200000)

  fec_mode_e mode = FEC_NONE;
  logic in_valid = 0, in_ready, line, data_phase, tx_active;
  logic [39:0] in_payload = 0;
  logic [6:0] bit_idx;
  logic [57:0] hist = 0;
  logic [59:0] got, expw;
  int m, len, lat;
  int exp_lat [3] = '{2, 4, 14};

  fec_transmitter dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 150; n++) begin
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      m = n % 3;
      mode = fec_mode_e'(m);
      in_payload = {$urandom, $urandom};
      in_valid = 1;
      expw = encode_mode(m, scramble(in_payload, hist));
      len = len_mode(m);
      @(negedge clk); in_valid = 0; mode = FEC_NONE;  // mode is sampled at acceptance
      lat = 1;
      while (!data_phase) begin
        `CHECK(tx_active, "tx_active before the frame");
        @(negedge clk); lat++;
      end
      `CHECK(lat == exp_lat[m] + 1, $sformatf("mode %0d delay %0d", m, lat - 1));
      got = 0;
      for (int i = 0; i < len; i++) begin
        `CHECK(data_phase && tx_active, "frame");
        got = {got[58:0], line};
        @(negedge clk);
      end
      `CHECK(got == expw, $sformatf("mode %0d cw %h != %h", m, got, expw));
      repeat (3) @(negedge clk);
      `CHECK(!tx_active && in_ready, "idle after frame");
    end
    `FINISH
  end
endmodule
