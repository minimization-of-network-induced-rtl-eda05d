// tb_fec_receiver: the testbench builds frames with the reference scrambler
// and encoders, adds bit errors and drives the line. NONE frames must come
// through unchanged; Hamming frames with one error must be corrected and
// with two flagged uncorrectable; RS frames with up to two symbol errors
// must be corrected. Also checks the decode delay after the last bit
// (NONE 2, HAMMING 4, RS 58 clocks, with or without errors) and rx_active.
module tb_fec_receiver;
  import tb_ref_pkg::*;
  import fec_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 400000)

  fec_mode_e mode = FEC_NONE;
  logic line = 0, out_valid, out_corr, out_uncorr, rx_active;
  logic [39:0] out_payload, d;
  logic [1:0] out_nerr;
  logic [57:0] hist = 0;
  logic [59:0] w;
  int m, len, ne, lat, a, b, p1, p2;
  int exp_lat [3] = '{2, 4, 58};
  int n_unc = 0, n_cor = 0, skip = 0;

  fec_receiver dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      m  = (n / 3) % 3;
      ne = n % 3;
      mode = fec_mode_e'(m);
      d = {$urandom, $urandom};
      w = encode_mode(m, scramble(d, hist));
      len = len_mode(m);
      a = $urandom_range(0, len - 1);
      do b = $urandom_range(0, len - 1); while (b == a);
      p1 = $urandom_range(0, 14);
      do p2 = $urandom_range(0, 14); while (p2 == p1);
      if (m == 1) begin
        if (ne >= 1) w[a] = ~w[a];
        if (ne == 2) w[b] = ~w[b];
      end else if (m == 2) begin
        if (ne >= 1) w[4*p1 +: 4] ^= 4'($urandom_range(1, 15));
        if (ne == 2) w[4*p2 +: 4] ^= 4'($urandom_range(1, 15));
      end
      repeat (4) @(negedge clk);
      line = 1;
      for (int i = 0; i < len; i++) begin @(negedge clk); line = w[len-1-i]; end
      @(negedge clk); line = 0;
      `CHECK(rx_active, "rx_active during decode");
      lat = 1;
      while (!out_valid) begin @(negedge clk); lat++; end
      `CHECK(lat == exp_lat[m], $sformatf("mode %0d decode delay %0d", m, lat));
      if (m == 1 && ne == 2) begin
        `CHECK(out_uncorr, "Hamming double error flagged"); n_unc++;
      end else begin
        // a discarded frame corrupts the descrambler history for the next
        // two frames (taps reach back 58 bits): those are flagged too
        `CHECK(out_uncorr == (skip > 0), "drop flag on the two following frames");
        if (skip == 0)
          `CHECK(out_payload == d, $sformatf("mode %0d errors %0d: %h != %h", m, ne, out_payload, d));
        if (m != 0) `CHECK(out_corr == (ne != 0), "corrected flag");
        if (out_corr) n_cor++;
      end
      skip = (m == 1 && ne == 2) ? 2 : (skip > 0 ? skip - 1 : 0);
      @(negedge clk);
      `CHECK(!rx_active, "rx_active cleared");
    end
    `CHECK(n_unc > 0 && n_cor > 0, "corrections and detections seen");
    `FINISH
  end
endmodule
