// tb_ber_sweep: bit error ratio of the delivered payload against the error
// probability of a binary symmetric channel, for the three codings
// (uncoded, Hamming SECDED, RS(15,11)) at p = 1e-4, 1e-3 and 1e-2.
// The whole link runs at its default parameters; packets are sent back to
// back with random payloads, and the payload bits that arrive wrong are
// counted whether or not the receiver flagged the packet (errors after
// correction / payload bits sent). Expected: FEC below uncoded at every
// point with errors, RS not worse than Hamming, and the uncoded BER close
// to 3p (the self-synchronizing descrambler turns each line error into
// three payload errors). The number of packets the receiver flagged as
// uncorrectable is reported as well.
module tb_ber_sweep;
  import fec_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20_000_000)

  localparam int NPKT = 1500;
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

  logic [39:0] sent [$];
  logic [31:0] last_pkt = 0;
  longint biterr = 0, nbits = 0, nflag = 0;
  int     nflagged [3][3];
  always @(negedge clk) if (rst_n) begin
    if (pkt_count != last_pkt) begin sent.push_back({aux, tx_duty}); last_pkt = pkt_count; end
    if (rx_valid && sent.size() > 0) begin
      nflag  += rx_uncorr;
      biterr += $countones(rx_payload ^ sent.pop_front());
      nbits  += 40;
    end
  end

  int thr [3] = '{7, 66, 655};
  real ber [3][3];
  real p;
  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int pi = 0; pi < 3; pi++) begin
      for (int m = 0; m < 3; m++) begin
        // settle: idle, change mode, resynchronize the descrambler
        do @(negedge clk); while (tx_active || rx_active);
        repeat (100) @(negedge clk);
        mode = fec_mode_e'(m);
        for (int k = 0; k < 3; k++) begin
          @(negedge clk); adc_valid = 1; @(negedge clk); adc_valid = 0;
          while (pkt_count == last_pkt) @(negedge clk);
          do @(negedge clk); while (tx_active || rx_active);
        end
        repeat (1000) @(negedge clk);
        sent.delete(); biterr = 0; nbits = 0; nflag = 0;
        fi_bsc_thresh = 16'(thr[pi]); fi_bsc_en = 1;
        for (int n = 0; n < NPKT; n++) begin
          @(negedge clk);
          aux = 24'($urandom); adc_sample = 16'($urandom); setpoint = 16'($urandom);
          adc_valid = 1;
          @(negedge clk); adc_valid = 0;
          while (pkt_count == last_pkt) @(negedge clk);
          while (tx_active) @(negedge clk);
        end
        do @(negedge clk); while (rx_active);
        repeat (100) @(negedge clk);
        fi_bsc_en = 0;
        ber[pi][m] = real'(biterr) / real'(nbits);
        nflagged[pi][m] = int'(nflag);
        `CHECK(nbits == 40 * NPKT, $sformatf("all %0d packets delivered (%0d bits)", NPKT, nbits));
      end
      p = real'(thr[pi]) / 65536.0;
      $display("p = %.1e : BER none %.2e  hamming %.2e  rs %.2e   (packets flagged uncorrectable: %0d / %0d / %0d)",
               p, ber[pi][0], ber[pi][1], ber[pi][2], nflagged[pi][0], nflagged[pi][1], nflagged[pi][2]);
      if (ber[pi][0] > 0) `CHECK(ber[pi][1] < ber[pi][0] && ber[pi][2] < ber[pi][0], "FEC below uncoded");
      `CHECK(ber[pi][2] <= ber[pi][1], "RS not worse than Hamming");
    end
    `CHECK(ber[2][0] > 1.5 * 655.0 / 65536.0 && ber[2][0] < 4.5 * 655.0 / 65536.0, "uncoded BER near 3p at 1e-2");
    `CHECK(ber[2][2] > 0, "RS overwhelmed sometimes at 1e-2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
