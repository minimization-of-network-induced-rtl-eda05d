// tb_power_module: frames built by the reference scrambler and encoders
// carry duty cycles. A correct or corrected frame must reach the PWM (duty_active
// at the next period, high-side on time matching); a frame the Hamming
// decoder flags as uncorrectable must be discarded, keeping the old duty,
// and so must the two frames after it (descrambler memory).
module tb_power_module;
  import tb_ref_pkg::*;
  import fec_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 400000)

  localparam int PER = 200, DT = 10;
  fec_mode_e mode = FEC_NONE;
  logic line_in = 0, rx_valid, rx_corr, rx_uncorr, rx_active;
  logic gate_hi, gate_lo, pwm_period_start;
  logic [39:0] rx_payload, d;
  logic [1:0] rx_nerr;
  logic [15:0] duty_active, cur;
  logic [57:0] hist = 0;
  logic [59:0] w;
  int m, len, kind, hi, n_drop = 0, n_fix = 0, skip = 0;

  power_module #(.PWM_PERIOD(PER), .PWM_DEAD(DT)) dut (.*);

  initial begin
    cur = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 90; n++) begin
      m = n % 3; kind = (n / 3) % 3;   // 0 clean, 1 correctable, 2 Hamming double error
      mode = fec_mode_e'(m);
      d = {24'($urandom), 16'($urandom_range(8000, 60000))};
      w = encode_mode(m, scramble(d, hist));
      len = len_mode(m);
      if (kind == 1 && m == 1) w[5] = ~w[5];
      if (kind == 1 && m == 2) w[4*3 +: 4] ^= 4'h9;
      if (kind == 2 && m == 1) begin w[7] = ~w[7]; w[30] = ~w[30]; end
      @(negedge clk); line_in = 1;
      for (int i = 0; i < len; i++) begin @(negedge clk); line_in = w[len-1-i]; end
      @(negedge clk); line_in = 0;
      while (!rx_valid) @(negedge clk);
      if (kind == 2 && m == 1) begin
        `CHECK(rx_uncorr, "uncorrectable flagged"); n_drop++;
        skip = 2;
      end else if (skip > 0) begin
        // the two frames after a discarded one depend on it through the
        // descrambler and are discarded as well
        `CHECK(rx_uncorr, "frame after a discarded one flagged");
        skip--;
      end else begin
        `CHECK(!rx_uncorr && rx_payload == d, "payload");
        cur = d[15:0];
        if (kind == 1 && m != 0) begin `CHECK(rx_corr, "corrected"); n_fix++; end
      end
      // two full periods later the duty in force must be cur
      repeat (2) begin @(negedge clk); while (!pwm_period_start) @(negedge clk); end
      hi = 0;
      do begin @(negedge clk); hi += gate_hi; end while (!pwm_period_start);
      `CHECK(duty_active == cur, $sformatf("duty in force %0d != %0d", duty_active, cur));
      `CHECK(hi == int'((longint'(cur) * PER) >> 16) - DT, $sformatf("on time %0d", hi));
    end
    `CHECK(n_drop > 0 && n_fix > 0, "drops and corrections seen");
    `FINISH
  end
endmodule
