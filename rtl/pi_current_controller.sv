// pi_current_controller: proportional-integral output current controller.
//
// On each ADC sample (sample_valid) computes
//   e      = setpoint - measurement
//   integ  = clamp(integ + KI*e, 0, 65535 * 2^FRAC)      (anti-windup)
//   duty   = clamp((KP*e + integ) / 2^FRAC, 0, DUTY_MAX)
// and presents duty (unsigned, fraction of the switching period in units
// of 1/65536) with duty_valid one clock later. Gains are fixed-point with
// FRAC fractional bits. The document uses a PI regulator on the output
// current of the buck converter but gives neither gains nor number formats;
// all of those are this design's choice. Reset clears the integrator.
module pi_current_controller #(
  parameter int          FRAC     = 8,
  parameter logic [15:0] KP       = 16'd256,
  parameter logic [15:0] KI       = 16'd16,
  parameter logic [15:0] DUTY_MAX = 16'd62259     // 95 % of full scale
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] setpoint,
  input  logic signed [15:0] measurement,
  input  logic               sample_valid,
  output logic [15:0]        duty,
  output logic               duty_valid
);

  localparam logic signed [47:0] IMAX = 48'sd65535 <<< FRAC;

  logic signed [47:0] integ, integ_n, e, u;

  always_comb begin
    e       = 48'(setpoint) - 48'(measurement);
    integ_n = integ + e * $signed({32'd0, KI});
    if (integ_n < 0)         integ_n = '0;
    else if (integ_n > IMAX) integ_n = IMAX;
    u = (e * $signed({32'd0, KP}) + integ_n) >>> FRAC;
    if (u < 0)                                  u = '0;
    else if (u > $signed({32'd0, DUTY_MAX}))    u = $signed({32'd0, DUTY_MAX});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ <= '0; duty <= '0; duty_valid <= 1'b0;
    end else begin
      duty_valid <= sample_valid;
      if (sample_valid) begin
        integ <= integ_n;
        duty  <= u[15:0];
      end
    end
  end

endmodule
