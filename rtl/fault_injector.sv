// fault_injector: adds bit errors to the transmitted code word bits.
//
// Two sources, ORed:
//  * a binary symmetric channel: each code word bit is flipped when a
//    32-bit Galois LFSR (x^32 + x^22 + x^2 + x + 1, seeded by SEED) gives a
//    16-bit value below bsc_thresh, i.e. with probability bsc_thresh / 65536.
//    The LFSR advances 16 steps per bit (unrolled), so that each draw uses
//    16 new bits and successive draws are not correlated (with a single
//    step per bit, errors would come in pairs)
//    (1e-4 .. 1e-2 in the document's sweep is 7 .. 655);
//  * predetermined positions: bit bit_idx of the frame is flipped when
//    force_mask[bit_idx[5:0]] is set and force_en is high.
// Start bits and idle bits are never touched (data_phase low), so framing
// survives and only code word bits see errors. The document describes the
// injection of errors before transmission in a binary symmetric channel
// model, at random but predetermined locations; the LFSR, the threshold
// encoding and the mask are this design's choice.
//
// Timing: combinational from line_in to line_out; err_count counts
// flipped bits.
module fault_injector
  import fec_pkg::*;
#(
  parameter logic [31:0] SEED = 32'hACE1_2468
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                line_in,
  input  logic                data_phase,
  input  logic [LEN_W-1:0]    bit_idx,
  input  logic                bsc_en,
  input  logic [15:0]         bsc_thresh,
  input  logic                force_en,
  input  logic [MAX_CW_W-1:0] force_mask,
  output logic                line_out,
  output logic [31:0]         err_count
);

  logic [31:0] lfsr, lfsr_n;
  logic        flip;

  always_comb begin
    lfsr_n = lfsr;
    for (int k = 0; k < 16; k++)
      lfsr_n = lfsr_n[0] ? ((lfsr_n >> 1) ^ 32'h8020_0003) : (lfsr_n >> 1);
  end

  assign flip = data_phase &&
                ((bsc_en && (lfsr[15:0] < bsc_thresh)) ||
                 (force_en && (bit_idx < LEN_W'(MAX_CW_W)) && force_mask[bit_idx[5:0]]));
  assign line_out = line_in ^ flip;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr      <= SEED;
      err_count <= '0;
    end else begin
      if (data_phase) lfsr <= lfsr_n;
      if (flip) err_count <= err_count + 1;
    end
  end

endmodule
