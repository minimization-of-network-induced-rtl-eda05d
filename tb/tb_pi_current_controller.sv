// tb_pi_current_controller: random set points and measurements against an
// integer model of the PI law (gains 1.0 and 1/16, 8 fractional bits),
// including integrator clamping at both ends and duty saturation at 95 %;
// duty_valid one clock after each sample.
module tb_pi_current_controller;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 50000)

  logic signed [15:0] setpoint = 0, measurement = 0;
  logic sample_valid = 0, duty_valid;
  logic [15:0] duty;
  longint integ = 0, e, u;
  int n_sat_hi = 0, n_sat_lo = 0;

  pi_current_controller dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      setpoint    = 16'($urandom_range(0, 4000));
      measurement = (n % 600 < 200) ? 16'(int'(setpoint) - $urandom_range(0, 9000))
                                    : 16'(int'(setpoint) + $urandom_range(0, 9000));
      sample_valid = 1;
      e = longint'(setpoint) - longint'(measurement);
      integ = integ + 16 * e;
      if (integ < 0) integ = 0;
      if (integ > 65535 * 256) integ = 65535 * 256;
      u = (256 * e + integ) >>> 8;
      if (u < 0) begin u = 0; n_sat_lo++; end
      if (u > 62259) begin u = 62259; n_sat_hi++; end
      @(negedge clk); sample_valid = 0;
      `CHECK(duty_valid, "duty_valid after one clock");
      `CHECK(duty == 16'(u), $sformatf("duty %0d != %0d", duty, u));
      @(negedge clk);
      `CHECK(!duty_valid, "single pulse");
    end
    $display("saturated high %0d, low %0d", n_sat_hi, n_sat_lo);
    `CHECK(n_sat_hi > 0 && n_sat_lo > 0, "saturation exercised");
    `FINISH
  end
endmodule
