// gf_divider: GF(16) polynomial divider used by the Euclidean key equation solver.
//
// Registers T4..T0 hold a polynomial of degree <= 4 (T4 = x^4 coefficient),
// registers D3..D0 a polynomial of degree <= 3. Each step computes
//   Qi = T4 * inv(D3)
//   T4 <= T3 ^ Qi*D2,  T3 <= T2 ^ Qi*D1,  T2 <= T1 ^ Qi*D0,  T1 <= T0,  T0 <= Qi
// which is one step of long division of T(x) by D(x) with the quotient symbol
// shifted into T0 (the structure of the document's divider figure: one
// inverter, four multipliers, three adders). The document's prose swaps the
// names (it calls the T contents the divisor); the figure, where D3 feeds
// the inverter, is followed here: T holds the dividend, D the divisor.
// If the leading divisor symbol D3 is zero (e.g. the top syndrome is zero),
// the divisor is shifted up by s symbols at load so that D3 is not zero and
// 2+s steps are run instead of 2; the trailing zero symbols of D keep the
// quotient symbols already in T untouched. After n = 2+s steps the control
// logic splits T: T[n-1:0] is the quotient, T[4:n] the remainder
// (3-s symbols). A zero divisor raises div_zero and returns T unchanged.
//
// Interface: start with dividend/divisor while idle; done pulses 3+s clocks
// later with quot (index = degree) and rem (index = degree).
module gf_divider
  import fec_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  gf_t  dividend [5],
  input  gf_t  divisor  [4],
  output logic busy,
  output logic done,
  output logic div_zero,
  output gf_t  quot [5],
  output gf_t  rem  [4]
);

  gf_t        t [5];
  gf_t        d [4];
  logic [2:0] steps, cnt;
  gf_t        qi;

  assign qi = gf_mul(t[4], gf_inv(d[3]));

  // normalisation shift of the divisor
  logic [2:0] shift;
  logic       dzero;
  always_comb begin
    dzero = 1'b0;
    if (divisor[3] != '0)      shift = 3'd0;
    else if (divisor[2] != '0) shift = 3'd1;
    else if (divisor[1] != '0) shift = 3'd2;
    else if (divisor[0] != '0) shift = 3'd3;
    else begin shift = 3'd0; dzero = 1'b1; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; div_zero <= 1'b0;
      steps <= '0; cnt <= '0;
      for (int i = 0; i < 5; i++) begin t[i] <= '0; quot[i] <= '0; end
      for (int i = 0; i < 4; i++) begin d[i] <= '0; rem[i] <= '0; end
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          for (int i = 0; i < 5; i++) t[i] <= dividend[i];
          for (int i = 0; i < 4; i++)
            d[i] <= (i >= int'(shift)) ? divisor[i - int'(shift)] : gf_t'(0);
          steps <= 3'd2 + shift;
          cnt   <= '0;
          if (dzero) begin
            done     <= 1'b1;
            div_zero <= 1'b1;
            for (int i = 0; i < 5; i++) quot[i] <= '0;
            for (int i = 0; i < 4; i++) rem[i] <= dividend[i];
          end else begin
            busy     <= 1'b1;
            div_zero <= 1'b0;
          end
        end
      end else if (cnt == steps) begin
        // control logic: split T into quotient and remainder
        busy <= 1'b0;
        done <= 1'b1;
        for (int i = 0; i < 5; i++) quot[i] <= (i < int'(steps)) ? t[i] : gf_t'(0);
        for (int i = 0; i < 4; i++)
          rem[i] <= (i + int'(steps) < 5) ? t[(i + int'(steps)) % 5] : gf_t'(0);
      end else begin
        t[4] <= t[3] ^ gf_mul(qi, d[2]);
        t[3] <= t[2] ^ gf_mul(qi, d[1]);
        t[2] <= t[1] ^ gf_mul(qi, d[0]);
        t[1] <= t[0];
        t[0] <= qi;
        cnt  <= cnt + 3'd1;
      end
    end
  end

endmodule
