// tb_latency: transmit and receive durations of the whole link at default
// parameters, for the three codings, measured the way a scope would see
// them: the width of the tx_active pulse (payload accepted until the last
// frame bit leaves) and of the rx_active pulse (start bit seen until the
// payload is delivered).
// For each coding, 80 packets are sent with random forced error patterns
// (none, correctable, and one beyond the code's reach). The check is that
// both widths are the same for every packet of a coding, i.e. the link adds
// no jitter whatever the errors, and that the coded links are slower than
// the uncoded one, RS more than Hamming, on both sides. The widths are
// printed in clocks and in ns at 100 MHz next to the reference figures of
// the FPGA implementation this design follows (TX 460/540/750 ns, RX
// 450/570/1070 ns).
module tb_latency;
  import fec_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 2_000_000)

  fec_mode_e mode = FEC_NONE;
  logic signed [15:0] setpoint = 0, adc_sample = 0;
  logic adc_valid = 0;
  logic [23:0] aux = 0;
  logic fi_bsc_en = 0, fi_force_en = 0;
  logic [15:0] fi_bsc_thresh = 0;
  logic [59:0] fi_force_mask = 0;
  logic [31:0] fi_err_count, pkt_count, keepalive_count;
  logic line, tx_active, rx_active, rx_valid, rx_corr, rx_uncorr;
  logic [15:0] tx_duty, duty_active;
  logic [39:0] rx_payload;
  logic [1:0] rx_nerr;
  logic gate_hi, gate_lo, pwm_period_start;
  logic cap_enable = 0, cap_clear = 0;
  logic [9:0] cap_rd_addr = 0;
  logic [42:0] cap_rd_data;
  logic [10:0] cap_count;

  fec_link_system dut (.*);

  // pulse width counters
  int tx_w = 0, rx_w = 0, tx_last = 0, rx_last = 0;
  always @(posedge clk) begin
    if (tx_active) tx_w <= tx_w + 1; else if (tx_w != 0) begin tx_last <= tx_w; tx_w <= 0; end
    if (rx_active) rx_w <= rx_w + 1; else if (rx_w != 0) begin rx_last <= rx_w; rx_w <= 0; end
  end

  int tx_min [3], tx_max [3], rx_min [3], rx_max [3], n_unc [3], n_fix [3];
  int ref_tx [3] = '{460, 540, 750};
  int ref_rx [3] = '{450, 570, 1070};
  int len, ne, b;

  // mask of ne errors: bits for NONE/Hamming, symbols (one bit each) for RS
  function automatic logic [59:0] err_mask(int m, int cnt);
    logic [59:0] mk = '0;
    int l = (m == 2) ? 15 : ((m == 1) ? 47 : 40);
    while ($countones(mk) < cnt) begin
      b = $urandom_range(l - 1);
      if (m == 2) mk[4 * b + $urandom_range(3)] = 1'b1;
      else        mk[b] = 1'b1;
      if (m == 2 && cnt > 0) begin
        // keep at most one bit per symbol so that cnt counts symbols
        for (int s = 0; s < 15; s++)
          if ($countones(mk[4*s +: 4]) > 1) mk[4*s +: 4] = 4'b0001;
      end
    end
    return mk;
  endfunction

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      tx_min[m] = 1 << 30; tx_max[m] = 0; rx_min[m] = 1 << 30; rx_max[m] = 0;
      n_unc[m] = 0; n_fix[m] = 0;
      do @(negedge clk); while (tx_active || rx_active);
      mode = fec_mode_e'(m);
      for (int n = 0; n < 83; n++) begin
        // the first three packets resynchronize the descrambler
        ne = (n < 3) ? 0 : $urandom_range(m == 0 ? 1 : m + 1);
        fi_force_mask = err_mask(m, ne);
        fi_force_en = (ne != 0);
        @(negedge clk);
        aux = 24'($urandom); adc_sample = 16'($urandom);
        adc_valid = 1;
        @(negedge clk); adc_valid = 0;
        while (!tx_active) @(negedge clk);
        while (tx_active) @(negedge clk);
        while (!rx_valid) @(negedge clk);
        if (rx_uncorr) n_unc[m]++;
        if (rx_corr)   n_fix[m]++;
        while (rx_active) @(negedge clk);
        repeat (3) @(negedge clk);
        if (n >= 3) begin
          if (tx_last < tx_min[m]) tx_min[m] = tx_last;
          if (tx_last > tx_max[m]) tx_max[m] = tx_last;
          if (rx_last < rx_min[m]) rx_min[m] = rx_last;
          if (rx_last > rx_max[m]) rx_max[m] = rx_last;
        end
      end
      fi_force_en = 0;
      `CHECK(tx_min[m] == tx_max[m], $sformatf("mode %0d: TX width constant (%0d..%0d)", m, tx_min[m], tx_max[m]));
      `CHECK(rx_min[m] == rx_max[m], $sformatf("mode %0d: RX width constant (%0d..%0d)", m, rx_min[m], rx_max[m]));
      if (m > 0) begin
        `CHECK(n_fix[m] > 0, $sformatf("mode %0d: corrected packets seen", m));
        `CHECK(n_unc[m] > 0, $sformatf("mode %0d: uncorrectable packets seen", m));
      end
      $display("%-8s TX %4d ns (reference %4d)   RX %4d ns (reference %4d)   corrected %0d, discarded %0d",
               m == 0 ? "none" : (m == 1 ? "Hamming" : "RS"),
               10 * tx_max[m], ref_tx[m], 10 * rx_max[m], ref_rx[m], n_fix[m], n_unc[m]);
    end
    `CHECK(tx_max[0] < tx_max[1] && tx_max[1] < tx_max[2], "TX: none < Hamming < RS");
    `CHECK(rx_max[0] < rx_max[1] && rx_max[1] < rx_max[2], "RX: none < Hamming < RS");
    $display("added by coding (TX + RX): Hamming %0d ns, RS %0d ns (reference 200, 910)",
             10 * (tx_max[1] + rx_max[1] - tx_max[0] - rx_max[0]),
             10 * (tx_max[2] + rx_max[2] - tx_max[0] - rx_max[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
