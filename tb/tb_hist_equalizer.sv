// Testbench for hist_equalizer: the bench holds a cumulative histogram of a
// 100-pixel frame and answers the module's reads; after start the LUT must
// be complete in 256 clocks and hold min(255, floor(256*S(k)/100)) on both
// read ports. Two histograms are used, one that saturates at 255.
`include "tb/tb_common.svh"
module tb_hist_equalizer;
  int checks = 0, failures = 0;
  localparam int NPIX = 100;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [7:0] cum_bin;
  logic [6:0] cum_val;
  ipu_pkg::pixel_t lut_addr_a = 0, lut_data_a, lut_addr_b = 0, lut_data_b;
  int S [256];
  int cycles;

  always #5 clk = ~clk;
  hist_equalizer #(.NPIX(NPIX)) dut (.clk, .rst_n, .start, .cum_bin, .cum_val, .busy, .done,
                                      .lut_addr_a, .lut_data_a, .lut_addr_b, .lut_data_b);
  assign cum_val = 7'(S[cum_bin]);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  task automatic run(bit spread);
    int s = 0;
    for (int k = 0; k < 256; k++) begin
      if (spread) s += (k % 3 == 0 && s < NPIX) ? 1 : 0;
      else s += (k == 40) ? 30 : (k == 200) ? 70 : 0;
      S[k] = (k == 255) ? NPIX : s;
    end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    `TB_CHECK(cycles == 257, $sformatf("LUT pass took %0d clocks", cycles))
    for (int k = 0; k < 256; k++) begin
      int e = (256 * S[k]) / NPIX;
      if (e > 255) e = 255;
      lut_addr_a = 8'(k);
      lut_addr_b = 8'(255 - k);
      #1;
      `TB_CHECK(int'(lut_data_a) == e, $sformatf("LUT[%0d] = %0d exp %0d", k, lut_data_a, e))
      e = (256 * S[255-k]) / NPIX;
      if (e > 255) e = 255;
      `TB_CHECK(int'(lut_data_b) == e, "second read port")
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0);
    run(1);
    `TB_FINISH
  end
endmodule
