// tb_pwm_modulator: at the default 2500-clock period (40 kHz at 100 MHz)
// and 50-clock dead time, checks for a set of duty values over whole
// periods: period length, high-side on time = cmp - DEAD, low-side on time
// = PERIOD - cmp - DEAD (cmp = duty*PERIOD/65536), never both on, and that
// a new duty value takes effect only at the next period.
module tb_pwm_modulator;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 200000)

  localparam int PERIOD = 2500, DEAD = 50;
  logic [15:0] duty = 0, duty_active;
  logic duty_valid = 0, gate_hi, gate_lo, period_start;
  int hi, lo, len, cmp, exp_hi, exp_lo;
  logic [15:0] duties [6] = '{16'd32768, 16'd0, 16'd65535, 16'd6554, 16'd58982, 16'd1000};

  pwm_modulator #(.PERIOD(PERIOD), .DEAD(DEAD)) dut (.*);

  always @(posedge clk) if (rst_n) `CHECK(!(gate_hi && gate_lo), "no shoot-through");

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (duties[k]) begin
      @(negedge clk); duty = duties[k]; duty_valid = 1;
      @(negedge clk); duty_valid = 0;
      // finish the current period, then skip one so the new value applies
      while (!period_start) @(negedge clk);
      @(negedge clk);
      while (!period_start) @(negedge clk);
      hi = 0; lo = 0; len = 0;
      do begin
        @(negedge clk); hi += gate_hi; lo += gate_lo; len++;
      end while (!period_start);
      cmp = int'((longint'(duties[k]) * PERIOD) >> 16);
      exp_hi = (cmp > DEAD) ? cmp - DEAD : 0;
      exp_lo = (PERIOD - cmp - DEAD > 0) ? PERIOD - cmp - DEAD : 0;
      `CHECK(len == PERIOD, $sformatf("period %0d", len));
      `CHECK(hi == exp_hi, $sformatf("duty %0d: high %0d != %0d", duties[k], hi, exp_hi));
      `CHECK(lo == exp_lo, $sformatf("duty %0d: low %0d != %0d", duties[k], lo, exp_lo));
      `CHECK(duty_active == duties[k], "duty_active");
    end
    `FINISH
  end
endmodule
