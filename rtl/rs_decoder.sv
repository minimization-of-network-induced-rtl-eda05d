// rs_decoder: RS(15,11) decoder over GF(16), corrects up to t = 2 symbol errors.
//
// Structure of the document's decoder figure: the received code word is
// kept in a FIFO while
//   rs_syndrome      computes S0..S3 (15 clocks),
//   rs_key_equation  finds Lambda and Omega by the Euclidean algorithm,
//   rs_chien_search  walks the 15 positions, and
//   rs_forney        gives the error value at each position found;
// a multiplexer selects the Forney value at an error position and 0000
// elsewhere, and the result is XORed onto the FIFO output.
// The stages run one after the other under a small controller, one code
// word at a time: a code word cannot arrive faster than 61 line clocks, longer
// than the worst-case decoding time, so the stages are not overlapped
// (this design's choice). A code word with zero syndromes skips the
// other stages.
// Failure (out_fail, the message must be discarded): the key equation
// failed, Lambda has degree 0 with a non-zero syndrome, or the Chien search
// found a number of roots different from the degree of Lambda.
//
// The result is held until a fixed OUT_LATENCY after acceptance, whatever
// the number of errors, so that decoding adds a constant delay and no
// jitter (the property the document asks of the link; the worst case of
// the stages above is 52 clocks, checked by an assertion).
//
// Interface: in_valid/in_cw accepted when in_ready. out_valid pulses with
// out_msg (44 data bits, corrected), out_nerr (symbols corrected) and
// out_fail exactly OUT_LATENCY clocks after acceptance.
module rs_decoder
  import fec_pkg::*;
#(
  parameter int OUT_LATENCY = 56
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [RS_CW_W-1:0]  in_cw,
  output logic                out_valid,
  output logic [RS_MSG_W-1:0] out_msg,
  output logic [1:0]          out_nerr,
  output logic                out_fail
);

  typedef enum logic [2:0] {D_IDLE, D_SYN, D_KEY, D_CHIEN, D_HOLD, D_OUT} dstate_e;
  dstate_e state;

  // FIFO holding the received word
  logic               f_push, f_pop, f_empty, f_full;
  logic [RS_CW_W-1:0] f_dout;

  sync_fifo #(.W(RS_CW_W), .DEPTH(2)) u_fifo (
    .clk, .rst_n,
    .push (f_push), .din (in_cw),
    .pop  (f_pop),  .dout (f_dout),
    .empty (f_empty), .full (f_full)
  );

  // syndromes
  logic syn_start, syn_busy, syn_done, syn_nz;
  gf_t  syn [RS_NPAR];

  rs_syndrome u_syn (
    .clk, .rst_n, .start (syn_start), .in_cw (in_cw),
    .busy (syn_busy), .done (syn_done), .syn (syn), .nonzero (syn_nz)
  );

  // key equation
  logic       key_start, key_busy, key_done, key_fail;
  gf_t        lambda [RS_T+1];
  gf_t        omega  [RS_T];
  logic [1:0] lambda_deg;

  rs_key_equation u_key (
    .clk, .rst_n, .start (key_start), .syn (syn),
    .busy (key_busy), .done (key_done), .lambda (lambda), .omega (omega),
    .lambda_deg (lambda_deg), .fail (key_fail)
  );

  // Chien search and Forney
  logic       ch_start, ch_busy, ch_pv, ch_hit, ch_done;
  logic [3:0] ch_pos, ch_nroots;
  gf_t        ch_x, ch_xinv, fy_val, err_sym;

  rs_chien_search u_chien (
    .clk, .rst_n, .start (ch_start), .lambda (lambda),
    .busy (ch_busy), .pos_valid (ch_pv), .pos (ch_pos), .x (ch_x),
    .x_inv (ch_xinv), .hit (ch_hit), .done (ch_done), .nroots (ch_nroots)
  );

  rs_forney u_forney (
    .x (ch_x), .omega (omega), .lambda1 (lambda[1]), .err_val (fy_val)
  );

  assign err_sym = ch_hit ? fy_val : 4'b0000;   // value / zero multiplexer

  logic [RS_CW_W-1:0] err_vec;
  logic               fail_q;
  logic [6:0]         lat_cnt;

  assign in_ready  = (state == D_IDLE) && !f_full;
  assign f_push    = in_valid && in_ready;
  assign syn_start = f_push;
  assign f_pop     = (state == D_OUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_IDLE; key_start <= 1'b0; ch_start <= 1'b0;
      err_vec <= '0; fail_q <= 1'b0; lat_cnt <= '0;
      out_valid <= 1'b0; out_msg <= '0; out_nerr <= '0; out_fail <= 1'b0;
    end else begin
      key_start <= 1'b0;
      ch_start  <= 1'b0;
      out_valid <= 1'b0;
      lat_cnt   <= (state == D_IDLE) ? 7'd0 : lat_cnt + 7'd1;
      case (state)
        D_IDLE: if (f_push) begin
          err_vec <= '0;
          fail_q  <= 1'b0;
          state   <= D_SYN;
        end
        D_SYN: if (syn_done) begin
          if (syn_nz) begin
            key_start <= 1'b1;
            state     <= D_KEY;
          end else state <= D_HOLD;
        end
        D_KEY: if (key_done) begin
          if (key_fail || lambda_deg == 2'd0) begin
            fail_q <= 1'b1;
            state  <= D_HOLD;
          end else begin
            ch_start <= 1'b1;
            state    <= D_CHIEN;
          end
        end
        D_CHIEN: begin
          if (ch_pv) err_vec[4*ch_pos +: 4] <= err_sym;
          if (ch_done) begin
            if (ch_nroots != {2'b00, lambda_deg}) fail_q <= 1'b1;
            state <= D_HOLD;
          end
        end
        D_HOLD: if (lat_cnt >= 7'(OUT_LATENCY - 3)) state <= D_OUT;
        D_OUT: begin
          out_valid <= 1'b1;
          out_msg   <= f_dout[RS_CW_W-1 -: RS_MSG_W] ^ err_vec[RS_CW_W-1 -: RS_MSG_W];
          out_fail  <= fail_q;
          out_nerr  <= fail_q ? 2'd0 : lambda_deg & {2{syn_nz}};
          state     <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  // the stages must always finish within the fixed latency
  a_fixed_latency: assert property (@(posedge clk) disable iff (!rst_n)
                                    (state != D_IDLE && state != D_HOLD && state != D_OUT)
                                    |-> lat_cnt < 7'(OUT_LATENCY - 3));

endmodule
