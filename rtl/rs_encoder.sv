// rs_encoder: systematic RS(15,11) encoder over GF(16), symbol serial.
//
// A linear feedback shift register of four 4-bit registers r3..r0 with four
// constant GF multipliers (the coefficients g3..g0 of the generator
// polynomial (x-1)(x-2)(x-4)(x-8)) and four GF adders (XOR), as in the
// document. The 11 message symbols enter highest degree first, one per
// clock; feedback fb = m ^ r3, then r3 <= r2 ^ g3*fb, ..., r0 <= g0*fb.
// After the last symbol the registers hold the remainder of m(x)*x^4 / g(x),
// which forms the 4 parity symbols.
//
// Code word layout: out_cw[4i+3:4i] is the coefficient of x^i; the message
// occupies x^14..x^4 (out_cw[59:16] = in_msg), parity x^3..x^0.
// Interface: in_valid loads in_msg (44 bits, in_ready must be high); the
// code word appears with out_valid RS_K+1 = 12 clocks later.
module rs_encoder
  import fec_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [RS_MSG_W-1:0] in_msg,
  output logic                out_valid,
  output logic [RS_CW_W-1:0]  out_cw
);

  localparam gf_t G0 = rs_gen_coef(0);
  localparam gf_t G1 = rs_gen_coef(1);
  localparam gf_t G2 = rs_gen_coef(2);
  localparam gf_t G3 = rs_gen_coef(3);

  logic                busy;
  logic [3:0]          cnt;
  logic [RS_MSG_W-1:0] msg;    // shifts left, top symbol is the next one
  gf_t                 r0, r1, r2, r3;
  gf_t                 fb;

  assign in_ready = !busy;
  assign fb = msg[RS_MSG_W-1 -: RS_M] ^ r3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0; msg <= '0;
      r0 <= '0; r1 <= '0; r2 <= '0; r3 <= '0;
      out_valid <= 1'b0; out_cw <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          busy <= 1'b1;
          cnt  <= '0;
          msg  <= in_msg;
          r0 <= '0; r1 <= '0; r2 <= '0; r3 <= '0;
          out_cw[RS_CW_W-1:RS_NPAR*RS_M] <= in_msg;
        end
      end else begin
        r3  <= r2 ^ gf_mul(fb, G3);
        r2  <= r1 ^ gf_mul(fb, G2);
        r1  <= r0 ^ gf_mul(fb, G1);
        r0  <= gf_mul(fb, G0);
        msg <= msg << RS_M;
        cnt <= cnt + 4'd1;
        if (cnt == 4'(RS_K - 1)) begin
          busy <= 1'b0;
          out_valid <= 1'b1;
          out_cw[RS_NPAR*RS_M-1:0] <= {r2 ^ gf_mul(fb, G3), r1 ^ gf_mul(fb, G2),
                                       r0 ^ gf_mul(fb, G1), gf_mul(fb, G0)};
        end
      end
    end
  end

endmodule
