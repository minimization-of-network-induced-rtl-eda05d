// rs_syndrome: the 2t = 4 syndrome cells of the RS(15,11) decoder.
//
// Cell j evaluates the received polynomial at the generator root alpha^j by
// Horner's rule, one symbol per clock, highest degree first:
//   S_j <= S_j * alpha^j + r_i.
// The multiplication by the constant alpha^j is a 16-entry look-up table
// (a constant-operand call of gf_mul); cell 0 (root alpha^0 = 1) needs no
// multiplier. Both points follow the document.
//
// Interface: start with in_cw (60 bits, coefficient of x^i at bits 4i+3:4i)
// while idle; 15 clocks later done pulses for one clock with syn[0..3]
// (S_j = r(alpha^j)) and nonzero (some syndrome is not zero).
module rs_syndrome
  import fec_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [RS_CW_W-1:0] in_cw,
  output logic               busy,
  output logic               done,
  output gf_t                syn [RS_NPAR],
  output logic               nonzero
);

  logic [RS_CW_W-1:0] cw;
  logic [3:0]         cnt;
  gf_t                acc [RS_NPAR];
  gf_t                sym;

  assign sym = cw[RS_CW_W-1 -: RS_M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; cnt <= '0; cw <= '0;
      for (int j = 0; j < RS_NPAR; j++) begin acc[j] <= '0; syn[j] <= '0; end
      nonzero <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          cnt  <= '0;
          cw   <= in_cw;
          for (int j = 0; j < RS_NPAR; j++) acc[j] <= '0;
        end
      end else begin
        acc[0] <= acc[0] ^ sym;
        for (int j = 1; j < RS_NPAR; j++)
          acc[j] <= gf_mul(acc[j], gf_alpha_pow(j)) ^ sym;
        cw  <= cw << RS_M;
        cnt <= cnt + 4'd1;
        if (cnt == 4'(RS_N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          syn[0] <= acc[0] ^ sym;
          for (int j = 1; j < RS_NPAR; j++)
            syn[j] <= gf_mul(acc[j], gf_alpha_pow(j)) ^ sym;
          nonzero <= ((acc[0] ^ sym) != '0) ||
                     ((gf_mul(acc[1], gf_alpha_pow(1)) ^ sym) != '0) ||
                     ((gf_mul(acc[2], gf_alpha_pow(2)) ^ sym) != '0) ||
                     ((gf_mul(acc[3], gf_alpha_pow(3)) ^ sym) != '0);
        end
      end
    end
  end

endmodule
