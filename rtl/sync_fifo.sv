// sync_fifo: synchronous first-in first-out buffer.
//
// DEPTH words of W bits in a register array with read and write pointers
// and a fill counter. Writes while full and reads while empty are ignored
// (and flagged by assertions). dout shows the oldest word whenever
// not empty (first-word fall-through). In the RS decoder it holds the
// received code word while the syndromes, key equation and Chien search
// run, as in the document's decoder figure; depth and style are this
// design's choice.
module sync_fifo #(
  parameter int W     = 60,
  parameter int DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign dout  = mem[rp];

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
      for (int k = 0; k < DEPTH; k++) mem[k] <= '0;
    end else begin
      if (push && !full) begin
        mem[wp] <= din;
        wp <= nxt(wp);
      end
      if (pop && !empty) rp <= nxt(rp);
      count <= count + (AW+1)'(push && !full) - (AW+1)'(pop && !empty);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
