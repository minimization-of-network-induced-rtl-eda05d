// fec_receiver: receive chain of the link (deserializer, FEC decoder, descrambler).
//
// The deserializer cuts frames of the length of the configured mode; the
// code word goes to the Hamming decoder, the RS decoder or straight through
// (FEC_NONE); the payload is then descrambled. Order follows the document's
// communication chain figure; run-time mode selection is this design's
// choice and mode must match the transmitter's.
// out_valid pulses per received frame with out_payload, out_corr (errors
// were corrected), out_uncorr (double error detected or RS decoding
// failure: the controller must discard the message) and out_nerr (bits
// (Hamming) or symbols (RS) corrected). rx_active is high from the start
// bit until out_valid (the "RX active" signal measured in the document).
//
// Latency from the last code word bit to out_valid: NONE 2, HAMMING 4,
// RS 58 clocks, independent of the number of errors.
module fec_receiver
  import fec_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  fec_mode_e            mode,
  input  logic                 line,
  output logic                 out_valid,
  output logic [PAYLOAD_W-1:0] out_payload,
  output logic                 out_corr,
  output logic                 out_uncorr,
  output logic [1:0]           out_nerr,
  output logic                 rx_active
);

  logic                des_active, des_v;
  logic [MAX_CW_W-1:0] des_word;

  deserializer u_des (
    .clk, .rst_n, .line, .len (frame_len(mode)),
    .active (des_active), .out_valid (des_v), .out_word (des_word)
  );

  logic                 ham_v, ham_corr, ham_unc;
  logic [PAYLOAD_W-1:0] ham_d;

  hamming_decoder u_ham (
    .clk, .rst_n,
    .in_valid (des_v && mode == FEC_HAMMING), .in_cw (des_word[HAM_CW_W-1:0]),
    .out_valid (ham_v), .out_data (ham_d), .out_corr (ham_corr), .out_uncorr (ham_unc)
  );

  logic                rs_v, rs_rdy, rs_fail;
  logic [RS_MSG_W-1:0] rs_msg;
  logic [1:0]          rs_nerr;

  rs_decoder u_rs (
    .clk, .rst_n,
    .in_valid (des_v && mode == FEC_RS), .in_ready (rs_rdy), .in_cw (des_word),
    .out_valid (rs_v), .out_msg (rs_msg), .out_nerr (rs_nerr), .out_fail (rs_fail)
  );

  logic                 dec_v, dec_unc, dec_corr;
  logic [PAYLOAD_W-1:0] dec_d;
  logic [1:0]           dec_nerr;

  always_comb begin
    case (mode)
      FEC_HAMMING: begin
        dec_v = ham_v; dec_d = ham_d; dec_unc = ham_unc; dec_corr = ham_corr;
        dec_nerr = {1'b0, ham_corr};
      end
      FEC_RS: begin
        dec_v = rs_v; dec_d = rs_msg[PAYLOAD_W-1:0]; dec_unc = rs_fail;
        dec_corr = (rs_nerr != 2'd0); dec_nerr = rs_nerr;
      end
      default: begin
        dec_v = des_v; dec_d = des_word[PAYLOAD_W-1:0]; dec_unc = 1'b0;
        dec_corr = 1'b0; dec_nerr = 2'd0;
      end
    endcase
  end

  logic dsc_drop;

  descrambler #(.W(PAYLOAD_W)) u_dsc (
    .clk, .rst_n,
    .in_valid (dec_v), .in_data (dec_d), .in_drop (dec_unc),
    .out_valid (out_valid), .out_data (out_payload), .out_drop (dsc_drop)
  );

  assign out_uncorr = dsc_drop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_corr <= 1'b0; out_nerr <= '0; rx_active <= 1'b0;
    end else begin
      if (dec_v) begin
        out_corr <= dec_corr;
        out_nerr <= dec_nerr;
      end
      if (des_active && !rx_active) rx_active <= 1'b1;
      else if (out_valid)           rx_active <= 1'b0;
    end
  end

  // the RS decoder has finished the previous word before the next arrives
  a_rs_ready: assert property (@(posedge clk) disable iff (!rst_n)
                               (des_v && mode == FEC_RS) |-> rs_rdy);
  logic unused_msg;
  assign unused_msg = ^rs_msg[RS_MSG_W-1:PAYLOAD_W];

endmodule
