// descrambler: inverse of the multiplicative scrambler.
//
//   d[n] = s[n] ^ s[n-TAP_A] ^ s[n-TAP_B]
// The history holds received scrambled bits only, so the descrambler needs
// no reset alignment with the transmitter: after TAP_B correct bits its
// output is correct (self-synchronization). A word that the FEC decoder
// could not correct is still shifted into the history (in_valid with
// in_drop) to keep the bit alignment, but its output is marked dropped.
// Polynomial 1 + x^39 + x^58 is this design's choice (see scrambler).
//
// The words whose taps still reach into a dropped word (the next
// ceil(TAP_B/W) = 2 words) cannot be descrambled correctly either; they
// are marked dropped as well, so that a damaged word is never delivered
// as good (this design's choice, the document does not discuss it).
//
// Interface: in_valid/in_data/in_drop accepted every clock; out_valid,
// out_data and out_drop follow one clock later (latency 1).
module descrambler #(
  parameter int W     = 40,
  parameter int TAP_A = 39,
  parameter int TAP_B = 58
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  input  logic         in_drop,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output logic         out_drop
);

  localparam int TAINT = (TAP_B + W - 1) / W;

  logic [TAP_B-1:0] hist_q, hist_d;
  logic [W-1:0]     dsc;
  logic [$clog2(TAINT+1)-1:0] taint;   // words still depending on a dropped one

  always_comb begin
    hist_d = hist_q;
    for (int i = 0; i < W; i++) begin
      dsc[i] = in_data[i] ^ hist_d[TAP_A-1] ^ hist_d[TAP_B-1];
      hist_d = {hist_d[TAP_B-2:0], in_data[i]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist_q    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_drop  <= 1'b0;
      taint     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        hist_q   <= hist_d;
        out_data <= dsc;
        out_drop <= in_drop || (taint != '0);
        if (in_drop)           taint <= ($clog2(TAINT+1))'(TAINT);
        else if (taint != '0) taint <= taint - 1'b1;
      end
    end
  end

endmodule
