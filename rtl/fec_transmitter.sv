// fec_transmitter: transmit chain of the link (scrambler, FEC encoder, serializer).
//
// A payload accepted on in_valid/in_ready is scrambled (1 clock), encoded
// according to mode and handed to the serializer:
//   FEC_NONE    : 40-bit word, no encoder
//   FEC_HAMMING : hamming_encoder, 47-bit code word (2 clocks)
//   FEC_RS      : rs_encoder, 60-bit code word, payload in the low 40 of
//                 the 44 message bits (12 clocks)
// The chain order follows the document's communication chain figure. Both
// encoders are present and mode selects one at run time; the document
// builds one version per FEC technique, so the run-time selection is this
// design's choice. mode is sampled when a payload is accepted.
// tx_active is high from acceptance of a payload until the serializer has
// finished its frame (the "TX active" signal measured in the document).
//
// Latency from acceptance to the first code word bit on the line
// (start bit excluded): NONE 2, HAMMING 4, RS 14 clocks.
module fec_transmitter
  import fec_pkg::*;
#(
  parameter int GAP = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  fec_mode_e            mode,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [PAYLOAD_W-1:0] in_payload,
  output logic                 line,
  output logic                 data_phase,
  output logic [LEN_W-1:0]     bit_idx,
  output logic                 tx_active
);

  fec_mode_e mode_q;
  logic      active;

  assign in_ready  = !active;
  assign tx_active = active;

  logic                 scr_v;
  logic [PAYLOAD_W-1:0] scr_d;

  scrambler #(.W(PAYLOAD_W)) u_scr (
    .clk, .rst_n,
    .in_valid (in_valid && in_ready), .in_data (in_payload),
    .out_valid (scr_v), .out_data (scr_d)
  );

  logic                ham_v;
  logic [HAM_CW_W-1:0] ham_cw;

  hamming_encoder u_ham (
    .clk, .rst_n,
    .in_valid (scr_v && mode_q == FEC_HAMMING), .in_data (scr_d),
    .out_valid (ham_v), .out_cw (ham_cw)
  );

  logic               rs_v, rs_rdy;
  logic [RS_CW_W-1:0] rs_cw;

  rs_encoder u_rs (
    .clk, .rst_n,
    .in_valid (scr_v && mode_q == FEC_RS), .in_ready (rs_rdy),
    .in_msg ({{(RS_MSG_W-PAYLOAD_W){1'b0}}, scr_d}),
    .out_valid (rs_v), .out_cw (rs_cw)
  );

  logic                ser_v, ser_rdy, ser_busy, ser_done;
  logic [MAX_CW_W-1:0] ser_word;

  always_comb begin
    case (mode_q)
      FEC_HAMMING: begin ser_v = ham_v; ser_word = MAX_CW_W'(ham_cw); end
      FEC_RS:      begin ser_v = rs_v;  ser_word = rs_cw; end
      default:     begin ser_v = scr_v; ser_word = MAX_CW_W'(scr_d); end
    endcase
  end

  serializer #(.GAP(GAP)) u_ser (
    .clk, .rst_n,
    .in_valid (ser_v), .in_ready (ser_rdy),
    .in_word (ser_word), .in_len (frame_len(mode_q)),
    .line, .data_phase, .bit_idx,
    .busy (ser_busy), .frame_done (ser_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      mode_q <= FEC_NONE;
    end else begin
      if (in_valid && in_ready) begin
        active <= 1'b1;
        mode_q <= mode;
      end else if (ser_done) active <= 1'b0;
    end
  end

  // the serializer is idle whenever a code word arrives (one payload in flight)
  a_ser_ready: assert property (@(posedge clk) disable iff (!rst_n) ser_v |-> ser_rdy);
  a_rs_ready:  assert property (@(posedge clk) disable iff (!rst_n)
                                (scr_v && mode_q == FEC_RS) |-> rs_rdy);
  logic unused_busy;
  assign unused_busy = ser_busy;

endmodule
