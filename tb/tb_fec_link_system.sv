// tb_fec_link_system: end-to-end test of the whole link at default
// parameters (100 MHz clock, 40 kHz PWM, 2500-clock minimum packet period).
//
// A first-order model of the buck converter output current closes the
// loop: once per PWM period the current moves 1/8 of the way towards
// duty_active / 8 (ADC counts) and is sampled by the master. Phases:
//  A  closed loop in each FEC mode, no faults: the current must settle
//     at the set point and every payload must arrive intact;
//  B  forced faults: NONE with one bit error (error passes through),
//     Hamming with one (corrected) and two (discarded, duty kept), RS with
//     two symbol errors (corrected) and three (decoder failure);
//  C  random errors, binary symmetric channel p = 1e-2, in each mode:
//     packets lost or damaged must rank NONE > Hamming >= RS, and the loop
//     must stay at its set point with FEC;
//  D  no ADC samples: keep-alive packets;
//  E  the capture RAM must hold the flags of the phase B packets.
// Every mechanism is counted and must have occurred at least once.
module tb_fec_link_system;
  import fec_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 40_000_000)

  fec_mode_e mode = FEC_HAMMING;
  logic signed [15:0] setpoint = 16'sd2000, adc_sample = 0;
  logic adc_valid = 0;
  logic [23:0] aux = 24'hC0FFEE;
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

  // ---------------- plant model and sampling ----------------
  int  cur = 0;          // output current in ADC counts
  bit  sampling = 1;
  always @(posedge clk) if (rst_n && pwm_period_start) begin
    cur <= cur + (int'(duty_active) / 8 - cur) / 8;
  end
  always @(negedge clk) begin
    adc_valid <= 0;
    if (rst_n && sampling && pwm_period_start) begin
      adc_sample <= 16'(cur);
      adc_valid  <= 1;
    end
  end

  // ---------------- scoreboard ----------------
  logic [39:0] sent [$];
  int skip = 0, n_rx = 0, n_bad = 0, n_ok = 0, n_dmg = 0;
  int n_corr = 0, n_unc = 0;
  int cnt_mode [3] = '{0, 0, 0};
  logic [31:0] last_pkt = 0;
  bit tx_seen = 0, rx_seen = 0;
  always @(posedge clk) begin
    if (tx_active) tx_seen = 1;
    if (rx_active) rx_seen = 1;
  end
  always @(negedge clk) if (rst_n) begin
    if (pkt_count != last_pkt) begin
      sent.push_back({aux, tx_duty});
      last_pkt = pkt_count;
      cnt_mode[int'(mode)]++;
    end
  end
  logic [39:0] expd;
  always @(negedge clk) if (rst_n && rx_valid) begin
    expd = sent.size() > 0 ? sent.pop_front() : 40'hx;
    n_rx++;
    if (rx_uncorr || rx_payload != expd) n_dmg++;
    if (rx_corr)   n_corr++;
    if (rx_uncorr) n_unc++;
    if (!rx_uncorr && skip == 0) begin
      if (rx_payload == expd) n_ok++; else n_bad++;
    end
    if (rx_uncorr || rx_payload != expd) skip = 2;   // descrambler memory
    else if (skip > 0) skip--;
  end

  // ---------------- helpers ----------------
  task automatic wait_idle();
    do @(negedge clk); while (tx_active || rx_active || adc_valid);
    repeat (30) @(negedge clk);
  endtask

  // send one packet on demand (sampling off), return rx flags
  logic r_corr, r_unc; logic [1:0] r_nerr; logic [39:0] r_pl, r_exp; int r_idx;
  task automatic one_packet(input fec_mode_e m, input logic [59:0] mask);
    wait_idle();
    mode = m; fi_force_mask = mask; fi_force_en = (mask != 0);
    @(negedge clk);
    adc_sample = 16'(cur); adc_valid = 1;
    @(negedge clk); adc_valid = 0;
    while (!rx_valid) @(negedge clk);
    r_idx  = int'(cap_count);
    r_corr = rx_corr; r_unc = rx_uncorr; r_nerr = rx_nerr; r_pl = rx_payload;
    r_exp = {aux, tx_duty};
    @(negedge clk);
    fi_force_en = 0;
  endtask

  int m_hsingle = 0, m_hdouble = 0, m_rs2 = 0, m_rsfail = 0, m_rawerr = 0;
  int m_keep = 0, m_switch = 0, m_kept_duty = 0, m_settle = 0;
  logic [15:0] dkeep;
  int bad_at_start, res [3], nerr_lo, k0, ncap;
  int base_ok;
  logic [2:0] capflags [$];
  int capidx [$];

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    // ---------- A: closed loop, each mode ----------
    for (int m = 0; m < 3; m++) begin
      wait_idle();
      sampling = 0; wait_idle();
      mode = fec_mode_e'((m + 1) % 3); m_switch++;
      sampling = 1;
      repeat ((m == 0 ? 1200 : 500) * 2500) @(negedge clk);   // start-up from zero current first
      $display("mode %0d: current %0d, set point %0d", int'(mode), cur, setpoint);
      if (cur > 1960 && cur < 2040) m_settle++;
      `CHECK(cur > 1960 && cur < 2040, $sformatf("settled in mode %0d: %0d", int'(mode), cur));
    end
    `CHECK(n_bad == 0 && n_unc == 0 && n_ok > 500, $sformatf("clean link: ok %0d bad %0d", n_ok, n_bad));
    sampling = 0;
    // ---------- B: forced faults ----------
    cap_clear = 1; @(negedge clk); cap_clear = 0; cap_enable = 1;
    one_packet(FEC_NONE, 60'h0);
    one_packet(FEC_NONE, 60'h1 << 30);                 // bit error passes uncoded
    begin capflags.push_back({r_unc, r_corr, r_nerr[0]}); capidx.push_back(r_idx); end
    `CHECK(r_pl != r_exp && !r_corr && !r_unc, "uncoded error reaches the payload");
    if (r_pl != r_exp) m_rawerr++;
    for (int k = 0; k < 3; k++) one_packet(FEC_HAMMING, 60'h0);   // resync descrambler
    one_packet(FEC_HAMMING, 60'h1 << 11);
    begin capflags.push_back({r_unc, r_corr, r_nerr[0]}); capidx.push_back(r_idx); end
    `CHECK(r_corr && !r_unc && r_pl == r_exp, "Hamming single error corrected");
    if (r_corr && r_pl == r_exp) m_hsingle++;
    dkeep = duty_active;
    adc_sample = 16'(cur + 300);                       // a different duty is sent
    one_packet(FEC_HAMMING, (60'h1 << 3) | (60'h1 << 40));
    begin capflags.push_back({r_unc, r_corr, r_nerr[0]}); capidx.push_back(r_idx); end
    `CHECK(r_unc, "Hamming double error detected");
    if (r_unc) m_hdouble++;
    // the next PWM period starts before the keep-alive repeat can arrive
    while (!pwm_period_start) @(negedge clk);
    @(negedge clk);
    `CHECK(duty_active == dkeep, "discarded packet leaves the duty cycle unchanged");
    if (duty_active == dkeep) m_kept_duty++;
    for (int k = 0; k < 3; k++) one_packet(FEC_RS, 60'h0);
    one_packet(FEC_RS, 60'hF << 8 | 60'h3 << 33);       // two symbols
    begin capflags.push_back({r_unc, r_corr, r_nerr[0]}); capidx.push_back(r_idx); end
    `CHECK(r_corr && r_nerr == 2 && !r_unc && r_pl == r_exp, "RS two symbol errors corrected");
    if (r_corr && r_nerr == 2 && r_pl == r_exp) m_rs2++;
    for (int k = 0; k < 8 && m_rsfail == 0; k++) begin
      one_packet(FEC_RS, (60'h1 << (4*k)) | (60'h1 << (4*k + 21)) | (60'h1 << (4*k + 26)));
      begin capflags.push_back({r_unc, r_corr, r_nerr[0]}); capidx.push_back(r_idx); end
      if (r_unc) m_rsfail++;
    end
    `CHECK(m_rsfail > 0, "RS decoder failure on three symbol errors");
    cap_enable = 0;
    // ---------- E: capture RAM ----------
    ncap = int'(cap_count);
    `CHECK(ncap > capidx[$], $sformatf("captured %0d", ncap));
    for (int k = 0; k < capflags.size(); k++) begin
      cap_rd_addr = 10'(capidx[k]);
      @(negedge clk); @(negedge clk);
      `CHECK(cap_rd_data[42:40] == capflags[k], $sformatf("capture entry %0d flags", k));
    end
    // ---------- C: binary symmetric channel, p = 1e-2 ----------
    for (int m = 0; m < 3; m++) begin
      wait_idle();
      mode = fec_mode_e'(m); m_switch++;
      fi_bsc_en = 1; fi_bsc_thresh = 16'd655;
      bad_at_start = n_dmg;
      sampling = 1;
      repeat (400 * 2500) @(negedge clk);
      sampling = 0; wait_idle(); fi_bsc_en = 0;
      res[m] = n_dmg - bad_at_start;
      $display("BSC p=1e-2 mode %0d: %0d damaged packets, current %0d", m, res[m], cur);
      if (m != 0) `CHECK(cur > 1900 && cur < 2100, "loop holds with FEC under errors");
    end
    `CHECK(res[2] <= res[1] && res[1] < res[0], "residual errors NONE > Hamming >= RS");
    // ---------- D: keep-alive ----------
    k0 = int'(keepalive_count);
    wait_idle();
    repeat (10 * 2500) @(negedge clk);
    m_keep = int'(keepalive_count) - k0;
    `CHECK(m_keep >= 9, $sformatf("keep-alive packets %0d", m_keep));
    // ---------- mechanism coverage ----------
    $display("mechanisms: mode switches %0d, settle %0d, raw error %0d, Hamming fix %0d, Hamming detect %0d, duty kept %0d, RS 2-fix %0d, RS fail %0d, keep-alive %0d, corrected %0d, discarded %0d, injected %0d",
             m_switch, m_settle, m_rawerr, m_hsingle, m_hdouble, m_kept_duty, m_rs2, m_rsfail, m_keep, n_corr, n_unc, fi_err_count);
    `CHECK(m_switch > 0 && m_rawerr > 0 && m_hsingle > 0 && m_hdouble > 0 && m_kept_duty > 0 &&
           m_rs2 > 0 && m_rsfail > 0 && m_keep > 0 && tx_seen && rx_seen && fi_err_count > 0,
           "every mechanism exercised");
    for (int m = 0; m < 3; m++) `CHECK(cnt_mode[m] > 0, "packets in every mode");
    `FINISH
  end
endmodule
