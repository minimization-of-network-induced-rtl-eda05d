// rx_capture_ram: stores received packets for later error-ratio analysis.
//
// While enable is high, every received packet (wr_valid) is written with
// its status flags at the next address; writing stops when the RAM is full.
// clear restarts at address 0. A synchronous read port (rd_data one clock
// after rd_addr) lets the contents be collected after a test. The document
// stores the received data in a RAM block and reads it out at the end of
// each test; depth and word format are this design's choice.
module rx_capture_ram #(
  parameter int W     = 43,
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  logic                     clear,
  input  logic                     wr_valid,
  input  logic [W-1:0]             wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [W-1:0]             rd_data,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     full
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];

  assign full = (count == (AW+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else if (clear) count <= '0;
    else if (enable && wr_valid && !full) count <= count + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (enable && wr_valid && !full && !clear) mem[count[AW-1:0]] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
