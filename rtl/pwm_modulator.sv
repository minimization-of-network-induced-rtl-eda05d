// pwm_modulator: complementary PWM for the synchronous buck converter.
//
// A counter runs 0 .. PERIOD-1 (PERIOD = f_clk / f_sw = 100 MHz / 40 kHz).
// The duty cycle (unsigned, 1/65536 of a period per LSB) is taken into a
// shadow register on duty_valid and used from the next counter wrap, so a
// period is never cut short. With cmp = duty * PERIOD / 65536:
//   gate_hi (high-side switch) on for DEAD <= cnt < cmp
//   gate_lo (low-side switch)  on for cmp + DEAD <= cnt < PERIOD
// so the two switches of the leg are never on together and each turn-on
// is delayed by DEAD clocks. period_start pulses at cnt = 0. The switching
// frequency is the document's; the clock of the power module, the dead
// time and the edge-aligned carrier are this design's choice.
module pwm_modulator #(
  parameter int PERIOD = 2500,
  parameter int DEAD   = 50
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] duty,
  input  logic        duty_valid,
  output logic        gate_hi,
  output logic        gate_lo,
  output logic        period_start,
  output logic [15:0] duty_active
);

  localparam int CW = $clog2(PERIOD + 1);

  logic [CW-1:0] cnt, cmp;
  logic [15:0]   shadow;
  logic [CW+15:0] prod;

  assign prod = shadow * (CW+16)'(PERIOD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; cmp <= '0; shadow <= '0; duty_active <= '0;
      gate_hi <= 1'b0; gate_lo <= 1'b0; period_start <= 1'b0;
    end else begin
      if (duty_valid) shadow <= duty;
      period_start <= (cnt == '0);
      if (cnt == CW'(PERIOD - 1)) begin
        cnt         <= '0;
        cmp         <= prod[CW+15:16];
        duty_active <= shadow;
      end else cnt <= cnt + 1'b1;
      gate_hi <= (cnt >= CW'(DEAD)) && (cnt < cmp);
      gate_lo <= ((CW+1)'(cnt) >= (CW+1)'(cmp) + (CW+1)'(DEAD));
    end
  end

  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n) !(gate_hi && gate_lo));

endmodule
