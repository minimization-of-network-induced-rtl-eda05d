// hamming_decoder: SECDED (47,40) decoder, two pipeline stages.
//
// Stage 1 computes the 6-bit syndrome (XOR of the positions of all set bits
// 1..46, i.e. the received word times the parity check matrix H) and the
// overall checksum (XOR of all 47 bits). Stage 2 addresses a 64-entry
// look-up table with the syndrome; the entry names the payload bit in error
// (or says that the position is a parity bit, or not a valid position).
// In the same cycle the checksum decides between the cases:
//   syndrome 0, checksum ok    : no error
//   checksum failed            : single error, corrected through the LUT
//                                (syndrome 0 => the checksum bit itself)
//   syndrome != 0, checksum ok : double error, out_uncorr raised
//   checksum failed, syndrome  : more than two errors seen, out_uncorr raised
//   names no position (47..63)
// The structure (syndrome and checksum in parallel, LUT correction and
// double error detection in the next cycle) follows the document; the LUT
// is a constant table built at elaboration from the code word layout.
//
// Interface: in_valid/in_cw every clock; two clocks later out_valid with
// out_data (corrected payload), out_corr (one error corrected) and
// out_uncorr (message must be discarded).
module hamming_decoder
  import fec_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [HAM_CW_W-1:0]  in_cw,
  output logic                 out_valid,
  output logic [PAYLOAD_W-1:0] out_data,
  output logic                 out_corr,
  output logic                 out_uncorr
);

  // LUT entry: [7] position valid, [6] payload bit, [5:0] payload bit index
  typedef logic [7:0] lut_t [64];

  function automatic lut_t build_lut();
    lut_t t;
    for (int s = 0; s < 64; s++) t[s] = '0;
    for (int p = 1; p < HAM_CW_W; p++) t[p] = 8'h80;
    for (int j = 0; j < PAYLOAD_W; j++) t[ham_data_pos(j)] = {2'b11, 6'(j)};
    return t;
  endfunction

  localparam lut_t LUT = build_lut();

  logic [HAM_M-1:0]     syn;
  logic [PAYLOAD_W-1:0] data;

  always_comb begin
    syn = '0;
    for (int p = 1; p < HAM_CW_W; p++)
      if (in_cw[p]) syn = syn ^ HAM_M'(p);
    for (int j = 0; j < PAYLOAD_W; j++) data[j] = in_cw[ham_data_pos(j)];
  end

  // stage 1 registers
  logic                 v1;
  logic [HAM_M-1:0]     syn1;
  logic                 chk1;
  logic [PAYLOAD_W-1:0] data1;

  // stage 2 logic
  logic [7:0]           ent;
  logic [PAYLOAD_W-1:0] fixed;
  logic                 corr, uncorr;

  always_comb begin
    ent    = LUT[syn1];
    fixed  = data1;
    corr   = 1'b0;
    uncorr = 1'b0;
    if (chk1) begin
      if (syn1 == '0) corr = 1'b1;
      else if (ent[7]) begin
        corr = 1'b1;
        if (ent[6]) fixed[ent[5:0]] = ~data1[ent[5:0]];
      end else uncorr = 1'b1;
    end else if (syn1 != '0) uncorr = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; syn1 <= '0; chk1 <= 1'b0; data1 <= '0;
      out_valid <= 1'b0; out_data <= '0; out_corr <= 1'b0; out_uncorr <= 1'b0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        syn1  <= syn;
        chk1  <= ^in_cw;
        data1 <= data;
      end
      out_valid <= v1;
      if (v1) begin
        out_data   <= fixed;
        out_corr   <= corr;
        out_uncorr <= uncorr;
      end
    end
  end

endmodule
