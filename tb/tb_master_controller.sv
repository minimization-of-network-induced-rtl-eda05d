// tb_master_controller: ADC samples drive the PI controller; every frame on
// the line is captured, checked against the reference encoder and
// descrambled by a reference model. Each new duty cycle must be sent as
// payload {aux, duty}; without samples the last payload must be repeated
// every MIN_TX_PERIOD clocks (keep-alive); forced fault positions must
// appear as exactly those flipped bits on the line.
module tb_master_controller;
  import tb_ref_pkg::*;
  import fec_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 400000)

  localparam int MTP = 400;
  fec_mode_e mode = FEC_NONE;
  logic signed [15:0] setpoint = 1000, adc_sample = 0;
  logic adc_valid = 0, fi_bsc_en = 0, fi_force_en = 0;
  logic [23:0] aux = 24'h5A5A5A;
  logic [15:0] fi_bsc_thresh = 0;
  logic [59:0] fi_force_mask = 0;
  logic line_out, tx_active;
  logic [15:0] duty;
  logic [31:0] fi_err_count, pkt_count, keepalive_count;

  master_controller #(.MIN_TX_PERIOD(MTP)) dut (.*);

  // frame capture and reference decoding
  logic [57:0] rhist = 0;
  logic [59:0] cw;
  logic [39:0] pl [$];
  int flips [$];
  int len;
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && line_out) begin
        len = len_mode(int'(mode));
        cw = 0;
        for (int i = 0; i < len; i++) begin @(posedge clk); cw = {cw[58:0], line_out}; end
        if (fi_force_en) begin
          // mask bit i is the i-th bit sent, i.e. code word bit len-1-i
          for (int i = 0; i < len; i++) if (fi_force_mask[i]) cw[len-1-i] = ~cw[len-1-i];
          flips.push_back($countones(fi_force_mask & ((60'd1 << len) - 1)));
        end
        `CHECK(cw == encode_mode(int'(mode), payload_of(int'(mode), cw)), "valid code word on line");
        pl.push_back(descramble(payload_of(int'(mode), cw), rhist));
      end
    end
  end

  logic [39:0] p;
  int k0, e0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      mode = fec_mode_e'(n % 3);
      @(negedge clk);
      adc_sample = 16'($urandom_range(0, 2000)); adc_valid = 1;
      @(negedge clk); adc_valid = 0;
      @(negedge clk);
      wait (pl.size() > 0);
      p = pl.pop_front();
      `CHECK(p == {aux, duty}, $sformatf("payload %h != %h", p, {aux, duty}));
      repeat (20) @(negedge clk);
    end
    // keep-alive: no samples for three periods
    k0 = int'(keepalive_count);
    repeat (3 * MTP + 10) @(negedge clk);
    `CHECK(int'(keepalive_count) - k0 == 3, $sformatf("keep-alive count %0d", int'(keepalive_count) - k0));
    `CHECK(pl.size() == 3, "keep-alive frames on the line");
    while (pl.size() > 0) begin p = pl.pop_front(); `CHECK(p == {aux, duty}, "repeated payload"); end
    // forced faults
    fi_force_en = 1; fi_force_mask = 60'h0000_0100_0000_0011; e0 = int'(fi_err_count);
    @(negedge clk); adc_sample = 16'd500; adc_valid = 1;
    @(negedge clk); adc_valid = 0;
    wait (pl.size() > 0);
    repeat (5) @(negedge clk);
    `CHECK(int'(fi_err_count) - e0 == flips[$], "injected bit flips counted");
    `CHECK(flips[$] == 3, "three forced flips");
    `CHECK(int'(pkt_count) == 60 + 3 + 1, $sformatf("packet count %0d", pkt_count));
    `FINISH
  end
endmodule
