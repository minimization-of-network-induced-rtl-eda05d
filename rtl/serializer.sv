// serializer: sends a code word as a serial bit stream, one bit per clock.
//
// Frame on the line: one start bit '1', then len code word bits, most
// significant first (in_word[len-1] .. in_word[0]), then at least GAP
// idle bits '0'. The line idles at '0'. data_phase marks the code word
// bits and bit_idx numbers them from 0 (first bit sent), for the fault
// injector. The document only names the serializer; the framing is this
// design's choice (the document relies on the scrambled data for clock
// recovery, which the shared-clock loopback does not need).
//
// Interface: in_valid/in_word/in_len accepted when in_ready; the start
// bit is on the line the clock after acceptance; busy covers the frame and
// the gap. A frame of len bits takes 1 + len + GAP clocks.
module serializer
  import fec_pkg::*;
#(
  parameter int GAP = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [MAX_CW_W-1:0] in_word,
  input  logic [LEN_W-1:0]    in_len,
  output logic                line,
  output logic                data_phase,
  output logic [LEN_W-1:0]    bit_idx,
  output logic                busy,
  output logic                frame_done
);

  typedef enum logic [1:0] {Z_IDLE, Z_DATA, Z_GAP} zstate_e;
  zstate_e state;

  logic [MAX_CW_W-1:0] sh;
  logic [LEN_W-1:0]    len, cnt;

  assign in_ready = (state == Z_IDLE) && !line;
  assign busy     = (state != Z_IDLE) || line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= Z_IDLE; sh <= '0; len <= '0; cnt <= '0;
      line <= 1'b0; data_phase <= 1'b0; bit_idx <= '0; frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      case (state)
        Z_IDLE: begin
          line       <= 1'b0;
          data_phase <= 1'b0;
          if (in_valid && in_ready) begin
            // left-align the code word so that its MSB is sent first
            sh    <= in_word << (LEN_W'(MAX_CW_W) - in_len);
            len   <= in_len;
            cnt   <= '0;
            line  <= 1'b1;            // start bit
            state <= Z_DATA;
          end
        end
        Z_DATA: begin
          line       <= sh[MAX_CW_W-1];
          data_phase <= 1'b1;
          bit_idx    <= cnt;
          sh         <= sh << 1;
          cnt        <= cnt + 1'b1;
          if (cnt == len - 1'b1) begin
            cnt   <= '0;
            state <= Z_GAP;
          end
        end
        Z_GAP: begin
          line       <= 1'b0;
          data_phase <= 1'b0;
          if (cnt == LEN_W'(GAP - 1)) begin
            frame_done <= 1'b1;
            state      <= Z_IDLE;
          end
          cnt <= cnt + 1'b1;
        end
        default: state <= Z_IDLE;
      endcase
    end
  end

endmodule
