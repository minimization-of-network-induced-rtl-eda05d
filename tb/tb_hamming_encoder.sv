// tb_hamming_encoder: every code word must equal the reference SECDED code
// word (payload on non-power-of-two positions, zero syndrome, even overall
// parity), arriving exactly two clocks after its payload.
module tb_hamming_encoder;
  import tb_ref_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 5000)

  logic in_valid = 0, out_valid;
  logic [39:0] in_data = 0;
  logic [46:0] out_cw;
  logic [39:0] q [$];
  logic [39:0] d;
  logic [5:0]  syn;

  hamming_encoder dut (.*);

  // scoreboard: a code word at every out_valid, two clocks after in_valid
  logic v_d1, v_d2;
  always_ff @(posedge clk) begin v_d1 <= in_valid; v_d2 <= v_d1; end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      in_data  = {$urandom, $urandom};
      if (in_valid) q.push_back(in_data);
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    `CHECK(q.size() == 0, "all words out");
    `FINISH
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    `CHECK(out_valid == v_d2, "latency 2");
    if (out_valid && q.size() > 0) begin
      d = q.pop_front();
      `CHECK(out_cw == ham_encode(d), $sformatf("cw %h != %h", out_cw, ham_encode(d)));
      syn = 0;
      for (int p = 1; p < 47; p++) if (out_cw[p]) syn ^= 6'(p);
      `CHECK(syn == 0 && ^out_cw == 1'b0, "zero syndrome, even parity");
    end
  end
endmodule
