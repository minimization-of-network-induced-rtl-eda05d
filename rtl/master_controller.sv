// master_controller: control side of the link.
//
// The PI current controller turns each ADC sample into a duty cycle. A
// packet scheduler sends the payload {aux[23:0], duty[15:0]} through the
// FEC transmitter whenever a new duty cycle is ready and, if nothing was
// sent for MIN_TX_PERIOD clocks, repeats the last payload, so the line
// carries packets at a minimum rate (the document asks for a minimum packet
// transmission frequency to keep the scrambled line toggling). A duty cycle
// computed while a packet is still on the line waits and is sent next;
// a newer one replaces it. The fault injector sits between the transmitter
// and the line, as in the document's system figure.
// Payload layout, minimum rate and the replacement rule are this design's
// choice; the document does not give the payload format.
//
// Interface: line_out is the serial line; tx_active is the transmitter's
// busy flag; pkt_count / keepalive_count count packets sent / repeated.
module master_controller
  import fec_pkg::*;
#(
  parameter int MIN_TX_PERIOD = 2500,
  parameter int GAP           = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  fec_mode_e           mode,
  input  logic signed [15:0]  setpoint,
  input  logic signed [15:0]  adc_sample,
  input  logic                adc_valid,
  input  logic [23:0]         aux,
  input  logic                fi_bsc_en,
  input  logic [15:0]         fi_bsc_thresh,
  input  logic                fi_force_en,
  input  logic [MAX_CW_W-1:0] fi_force_mask,
  output logic                line_out,
  output logic                tx_active,
  output logic [15:0]         duty,
  output logic [31:0]         fi_err_count,
  output logic [31:0]         pkt_count,
  output logic [31:0]         keepalive_count
);

  localparam int TW = $clog2(MIN_TX_PERIOD + 1);

  logic        duty_valid;

  pi_current_controller u_pi (
    .clk, .rst_n, .setpoint, .measurement (adc_sample), .sample_valid (adc_valid),
    .duty, .duty_valid
  );

  logic          pending, tx_rdy, send;
  logic [TW-1:0] timer;

  assign send = pending && tx_rdy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0; timer <= '0; pkt_count <= '0; keepalive_count <= '0;
    end else begin
      if (send) begin
        pending   <= 1'b0;
        timer     <= '0;
        pkt_count <= pkt_count + 1;
      end else if (timer != TW'(MIN_TX_PERIOD - 1)) begin
        timer <= timer + 1'b1;
      end
      if (duty_valid) pending <= 1'b1;
      else if (!pending && !send && timer == TW'(MIN_TX_PERIOD - 1)) begin
        pending         <= 1'b1;
        keepalive_count <= keepalive_count + 1;
      end
    end
  end

  logic             line_raw, dphase;
  logic [LEN_W-1:0] bidx;

  fec_transmitter #(.GAP(GAP)) u_tx (
    .clk, .rst_n, .mode,
    .in_valid (send), .in_ready (tx_rdy), .in_payload ({aux, duty}),
    .line (line_raw), .data_phase (dphase), .bit_idx (bidx), .tx_active
  );

  fault_injector u_fi (
    .clk, .rst_n, .line_in (line_raw), .data_phase (dphase), .bit_idx (bidx),
    .bsc_en (fi_bsc_en), .bsc_thresh (fi_bsc_thresh),
    .force_en (fi_force_en), .force_mask (fi_force_mask),
    .line_out, .err_count (fi_err_count)
  );

endmodule
