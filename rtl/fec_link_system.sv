// fec_link_system: master controller and power module joined by a serial
// link protected by forward error correction.
//
// The master computes a duty cycle from the current set point and the ADC
// sample, packs it into a 40-bit payload and sends it, scrambled and
// FEC-encoded (none, Hamming SECDED or RS(15,11), chosen by mode), over a
// one-bit serial line; a fault injector adds bit errors on the way. Here
// the line is an internal loopback, as in the document's bench setup, and
// both ends share one clock. The power module decodes, corrects or
// discards each packet and updates its PWM. A capture RAM records every
// received payload with its flags for error-ratio measurements.
// mode must only change while no packet is in flight (both ends read it).
//
// Capture word: {uncorrectable, corrected, rx_nerr[0], payload[39:0]}.
module fec_link_system
  import fec_pkg::*;
#(
  parameter int MIN_TX_PERIOD = 2500,
  parameter int PWM_PERIOD    = 2500,
  parameter int PWM_DEAD      = 50,
  parameter int CAP_DEPTH     = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  fec_mode_e                mode,
  // master controller
  input  logic signed [15:0]       setpoint,
  input  logic signed [15:0]       adc_sample,
  input  logic                     adc_valid,
  input  logic [23:0]              aux,
  // fault injection
  input  logic                     fi_bsc_en,
  input  logic [15:0]              fi_bsc_thresh,
  input  logic                     fi_force_en,
  input  logic [MAX_CW_W-1:0]      fi_force_mask,
  output logic [31:0]              fi_err_count,
  // link observation
  output logic                     line,
  output logic                     tx_active,
  output logic                     rx_active,
  output logic [15:0]              tx_duty,
  output logic [31:0]              pkt_count,
  output logic [31:0]              keepalive_count,
  output logic                     rx_valid,
  output logic [PAYLOAD_W-1:0]     rx_payload,
  output logic                     rx_corr,
  output logic                     rx_uncorr,
  output logic [1:0]               rx_nerr,
  // power stage
  output logic                     gate_hi,
  output logic                     gate_lo,
  output logic                     pwm_period_start,
  output logic [15:0]              duty_active,
  // capture RAM
  input  logic                     cap_enable,
  input  logic                     cap_clear,
  input  logic [$clog2(CAP_DEPTH)-1:0] cap_rd_addr,
  output logic [PAYLOAD_W+2:0]     cap_rd_data,
  output logic [$clog2(CAP_DEPTH):0]   cap_count
);

  master_controller #(.MIN_TX_PERIOD(MIN_TX_PERIOD)) u_master (
    .clk, .rst_n, .mode, .setpoint, .adc_sample, .adc_valid, .aux,
    .fi_bsc_en, .fi_bsc_thresh, .fi_force_en, .fi_force_mask,
    .line_out (line), .tx_active, .duty (tx_duty), .fi_err_count,
    .pkt_count, .keepalive_count
  );

  power_module #(.PWM_PERIOD(PWM_PERIOD), .PWM_DEAD(PWM_DEAD)) u_power (
    .clk, .rst_n, .mode, .line_in (line),
    .rx_valid, .rx_payload, .rx_corr, .rx_uncorr, .rx_nerr, .rx_active,
    .gate_hi, .gate_lo, .pwm_period_start, .duty_active
  );

  logic cap_full;

  rx_capture_ram #(.W(PAYLOAD_W + 3), .DEPTH(CAP_DEPTH)) u_cap (
    .clk, .rst_n, .enable (cap_enable), .clear (cap_clear),
    .wr_valid (rx_valid), .wr_data ({rx_uncorr, rx_corr, rx_nerr[0], rx_payload}),
    .rd_addr (cap_rd_addr), .rd_data (cap_rd_data), .count (cap_count), .full (cap_full)
  );

  logic unused_full;
  assign unused_full = cap_full;

endmodule
