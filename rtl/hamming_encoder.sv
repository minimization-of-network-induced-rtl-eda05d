// hamming_encoder: shortened SECDED Hamming (47,40) encoder, two pipeline stages.
//
// Code word layout: bit p (1..46) is Hamming position p; positions that are
// powers of two (1,2,4,8,16,32) hold the 6 parity bits, the other 40 hold the
// payload in order (payload bit j at fec_pkg::ham_data_pos(j)). Bit 0 holds
// the overall checksum (even parity over bits 1..46), which turns the single
// error correcting code into a double error detecting one.
// Parity bit k is the XOR of the payload bits whose position has bit k set:
// the sparse generator matrix is a set of multi-input XOR gates.
// Stage 1 registers the parity bits and CHUNKS partial XORs of the payload;
// stage 2 combines them into the wide-fan-in overall checksum. The document
// specifies this split of the checksum over a two-stage pipeline; the chunking
// into 5 groups of 8 bits is this design's choice.
//
// Interface: in_valid/in_data every clock, out_valid/out_cw two clocks later.
module hamming_encoder
  import fec_pkg::*;
#(
  parameter int CHUNKS = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [PAYLOAD_W-1:0] in_data,
  output logic                 out_valid,
  output logic [HAM_CW_W-1:0]  out_cw
);

  localparam int CW = PAYLOAD_W / CHUNKS;

  logic [HAM_CW_W-1:0] word;     // positions 1..46 filled, bit 0 empty
  logic [HAM_M-1:0]    par;
  logic [CHUNKS-1:0]   part;

  always_comb begin
    word = '0;
    for (int j = 0; j < PAYLOAD_W; j++) word[ham_data_pos(j)] = in_data[j];
    par = '0;
    for (int p = 1; p < HAM_CW_W; p++)
      for (int k = 0; k < HAM_M; k++)
        if (((p >> k) & 1) == 1) par[k] = par[k] ^ word[p];
    for (int c = 0; c < CHUNKS; c++) part[c] = ^in_data[c*CW +: CW];
    for (int k = 0; k < HAM_M; k++) word[1 << k] = par[k];
  end

  // stage 1
  logic                v1;
  logic [HAM_CW_W-1:0] w1;
  logic [CHUNKS-1:0]   part1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; w1 <= '0; part1 <= '0;
      out_valid <= 1'b0; out_cw <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        w1    <= word;
        part1 <= part;
      end
      // stage 2: overall checksum = payload parity ^ parity-bit parity
      out_valid <= v1;
      if (v1) out_cw <= {w1[HAM_CW_W-1:1], (^part1) ^ (^par_of(w1))};
    end
  end

  function automatic logic [HAM_M-1:0] par_of(logic [HAM_CW_W-1:0] w);
    logic [HAM_M-1:0] r;
    for (int k = 0; k < HAM_M; k++) r[k] = w[1 << k];
    return r;
  endfunction

endmodule
