// rs_key_equation: Euclidean algorithm for the RS(15,11) key equation.
//
// Solves Lambda(x) S(x) = Omega(x) mod x^4 for the error locator Lambda
// (degree <= t = 2) and the error evaluator Omega (degree < 2):
//   r_prev = x^4, r_cur = S(x), t_prev = 0, t_cur = 1
//   while deg(r_cur) >= t:
//     (q, rem) = r_prev / r_cur          -- gf_divider
//     t_new    = t_prev + q * t_cur
//     r_prev = r_cur; r_cur = rem; t_prev = t_cur; t_cur = t_new
//   Lambda = t_cur, Omega = r_cur
// Both results carry the same constant factor, which cancels in Forney's
// formula and does not move the roots. The document names the Euclidean
// algorithm and the divider; the iteration control here is the textbook
// form. fail is raised when Lambda would exceed degree 2 or more than
// MAX_ITER divisions were needed (more errors than the code corrects).
//
// Interface: start with syn[0..3] while idle; done pulses when finished
// (at most MAX_ITER divisions of 3..6 clocks each, plus 2 clocks per
// iteration) with lambda[0..2], omega[0..1], lambda_deg and fail.
module rs_key_equation
  import fec_pkg::*;
#(
  parameter int MAX_ITER = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  gf_t        syn [RS_NPAR],
  output logic       busy,
  output logic       done,
  output gf_t        lambda [RS_T+1],
  output gf_t        omega  [RS_T],
  output logic [1:0] lambda_deg,
  output logic       fail
);

  typedef enum logic [1:0] {S_IDLE, S_CHECK, S_WAIT, S_FINISH} state_e;
  state_e state;

  gf_t rp [5];
  gf_t rc [4];
  gf_t tp [5];
  gf_t tc [5];
  logic [2:0] iter;

  logic div_start, div_busy, div_done, div_zero;
  gf_t  quot [5];
  gf_t  rem  [4];

  gf_divider u_div (
    .clk, .rst_n,
    .start    (div_start),
    .dividend (rp),
    .divisor  (rc),
    .busy     (div_busy),
    .done     (div_done),
    .div_zero (div_zero),
    .quot     (quot),
    .rem      (rem)
  );

  // t_new = t_prev + q * t_cur, truncated to degree 4
  gf_t tn [5];
  always_comb begin
    for (int k = 0; k < 5; k++) tn[k] = tp[k];
    for (int a = 0; a < 5; a++)
      for (int b = 0; b < 5; b++)
        if (a + b < 5) tn[a+b] = tn[a+b] ^ gf_mul(quot[a], tc[b]);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; fail <= 1'b0; div_start <= 1'b0;
      iter <= '0; lambda_deg <= '0;
      for (int k = 0; k < 5; k++) begin rp[k] <= '0; tp[k] <= '0; tc[k] <= '0; end
      for (int k = 0; k < 4; k++) rc[k] <= '0;
      for (int k = 0; k <= RS_T; k++) lambda[k] <= '0;
      for (int k = 0; k < RS_T; k++) omega[k] <= '0;
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          for (int k = 0; k < 4; k++) rp[k] <= '0;
          rp[4] <= 4'd1;
          for (int k = 0; k < 4; k++) rc[k] <= syn[k];
          for (int k = 0; k < 5; k++) begin tp[k] <= '0; tc[k] <= '0; end
          tc[0] <= 4'd1;
          iter  <= '0;
          state <= S_CHECK;
        end
        S_CHECK: begin
          if (rc[3] == '0 && rc[2] == '0) state <= S_FINISH;
          else if (iter == 3'(MAX_ITER)) state <= S_FINISH;
          else begin
            div_start <= 1'b1;
            state     <= S_WAIT;
          end
        end
        S_WAIT: if (div_done) begin
          for (int k = 0; k < 4; k++) rp[k] <= rc[k];
          rp[4] <= '0;
          for (int k = 0; k < 4; k++) rc[k] <= rem[k];
          for (int k = 0; k < 5; k++) begin tp[k] <= tc[k]; tc[k] <= tn[k]; end
          iter  <= iter + 3'd1;
          state <= S_CHECK;
        end
        S_FINISH: begin
          for (int k = 0; k <= RS_T; k++) lambda[k] <= tc[k];
          for (int k = 0; k < RS_T; k++) omega[k] <= rc[k];
          lambda_deg <= (tc[2] != '0) ? 2'd2 : (tc[1] != '0) ? 2'd1 : 2'd0;
          fail  <= (tc[3] != '0) || (tc[4] != '0) || (rc[3] != '0) || (rc[2] != '0);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
