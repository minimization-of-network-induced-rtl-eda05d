// power_module: power-module side of the link.
//
// The FEC receiver recovers each payload; the low 16 bits are the duty
// cycle, which is passed to the PWM modulator unless the decoder flagged
// the packet as uncorrectable, in which case the packet is discarded and
// the previous duty cycle stays in force (the document lets the controller
// discard such messages). The PWM drives the complementary switches of
// the buck converter leg. Only the duty cycle field is used here; the rest
// of the payload is brought out on rx_payload.
module power_module
  import fec_pkg::*;
#(
  parameter int PWM_PERIOD = 2500,
  parameter int PWM_DEAD   = 50
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  fec_mode_e            mode,
  input  logic                 line_in,
  output logic                 rx_valid,
  output logic [PAYLOAD_W-1:0] rx_payload,
  output logic                 rx_corr,
  output logic                 rx_uncorr,
  output logic [1:0]           rx_nerr,
  output logic                 rx_active,
  output logic                 gate_hi,
  output logic                 gate_lo,
  output logic                 pwm_period_start,
  output logic [15:0]          duty_active
);

  fec_receiver u_rx (
    .clk, .rst_n, .mode, .line (line_in),
    .out_valid (rx_valid), .out_payload (rx_payload), .out_corr (rx_corr),
    .out_uncorr (rx_uncorr), .out_nerr (rx_nerr), .rx_active
  );

  pwm_modulator #(.PERIOD(PWM_PERIOD), .DEAD(PWM_DEAD)) u_pwm (
    .clk, .rst_n,
    .duty (rx_payload[15:0]), .duty_valid (rx_valid && !rx_uncorr),
    .gate_hi, .gate_lo, .period_start (pwm_period_start), .duty_active
  );

endmodule
