// rs_chien_search: Chien search over the 15 positions of an RS(15,11) code word.
//
// Evaluates Lambda(x) = l0 + l1 x + l2 x^2 at x = alpha^-i for i = 0..14, one
// position per clock. The terms are kept in registers and multiplied each
// clock by the constants alpha^-1 and alpha^-2, so no general multiplier is
// needed. A position i with Lambda(alpha^-i) = 0 is an error location
// (X_i = alpha^i). The document names the Chien method; this serial,
// one-position-per-clock form is this design's choice.
//
// Interface: start with lambda[0..2] while idle. For the next 15 clocks
// pos_valid is high with pos (i), x (alpha^i), x_inv (alpha^-i) and hit.
// done pulses with the last position; nroots counts the hits.
module rs_chien_search
  import fec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  gf_t        lambda [RS_T+1],
  output logic       busy,
  output logic       pos_valid,
  output logic [3:0] pos,
  output gf_t        x,
  output gf_t        x_inv,
  output logic       hit,
  output logic       done,
  output logic [3:0] nroots
);

  localparam gf_t AINV  = gf_alpha_pow(14);   // alpha^-1
  localparam gf_t AINV2 = gf_alpha_pow(13);   // alpha^-2

  gf_t        l0, t1, t2;
  logic [3:0] i;
  logic [3:0] cnt;

  assign pos_valid = busy;
  assign pos       = i;
  assign hit       = busy && ((l0 ^ t1 ^ t2) == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; i <= '0; cnt <= '0; nroots <= '0;
      l0 <= '0; t1 <= '0; t2 <= '0; x <= 4'd1; x_inv <= 4'd1;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          i <= '0; cnt <= '0;
          l0 <= lambda[0]; t1 <= lambda[1]; t2 <= lambda[2];
          x <= 4'd1; x_inv <= 4'd1;
        end
      end else begin
        t1    <= gf_mul(t1, AINV);
        t2    <= gf_mul(t2, AINV2);
        x     <= gf_mul(x, 4'd2);
        x_inv <= gf_mul(x_inv, AINV);
        i     <= i + 4'd1;
        cnt   <= cnt + (hit ? 4'd1 : 4'd0);
        if (i == 4'(RS_N - 1)) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          nroots <= cnt + (hit ? 4'd1 : 4'd0);
        end
      end
    end
  end

endmodule
