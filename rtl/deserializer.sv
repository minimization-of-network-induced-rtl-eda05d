// deserializer: recovers code words from the serial bit stream.
//
// Waits for a start bit '1' on the idle-low line, then shifts in the next
// len bits (MSB first) and presents them right-aligned on out_word with a
// one-clock out_valid. len is the frame length of the configured FEC mode.
// active is high from the start bit to the end of the frame. Framing is
// this design's choice, matching the serializer.
//
// Interface: out_valid pulses one clock after the last bit was sampled.
module deserializer
  import fec_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                line,
  input  logic [LEN_W-1:0]    len,
  output logic                active,
  output logic                out_valid,
  output logic [MAX_CW_W-1:0] out_word
);

  logic [MAX_CW_W-1:0] sh;
  logic [LEN_W-1:0]    cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; out_valid <= 1'b0; out_word <= '0; sh <= '0; cnt <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!active) begin
        if (line) begin
          active <= 1'b1;
          cnt    <= '0;
          sh     <= '0;
        end
      end else begin
        sh  <= {sh[MAX_CW_W-2:0], line};
        cnt <= cnt + 1'b1;
        if (cnt == len - 1'b1) begin
          active    <= 1'b0;
          out_valid <= 1'b1;
          out_word  <= {sh[MAX_CW_W-2:0], line};
        end
      end
    end
  end

endmodule
