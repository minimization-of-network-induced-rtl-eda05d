// scrambler: multiplicative (self-synchronizing) scrambler for the payload.
//
// Each payload word of W bits is scrambled as a serial stream, bit 0 first:
//   s[n] = d[n] ^ s[n-TAP_A] ^ s[n-TAP_B]
// i.e. division by the polynomial 1 + x^TAP_A + x^TAP_B. All W bits are
// computed in one clock by unrolling the recursion. The history of the
// last TAP_B scrambled bits carries over from word to word, so a receiver
// that sees the scrambled stream resynchronizes by itself after TAP_B bits.
// The document calls for a multiplicative, self-synchronizing scrambler but
// does not give its polynomial; 1 + x^39 + x^58 (the polynomial of the
// 64b/66b line code) is this design's choice.
//
// Interface: in_valid/in_data accepted every clock; out_valid/out_data one
// clock later (latency 1). Reset clears the history.
module scrambler #(
  parameter int W     = 40,
  parameter int TAP_A = 39,
  parameter int TAP_B = 58
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  logic [TAP_B-1:0] hist_q, hist_d;   // hist[k] = scrambled bit n-1-k
  logic [W-1:0]     scr;

  always_comb begin
    hist_d = hist_q;
    for (int i = 0; i < W; i++) begin
      scr[i] = in_data[i] ^ hist_d[TAP_A-1] ^ hist_d[TAP_B-1];
      hist_d = {hist_d[TAP_B-2:0], scr[i]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist_q    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        hist_q   <= hist_d;
        out_data <= scr;
      end
    end
  end

endmodule
