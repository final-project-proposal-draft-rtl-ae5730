// Testbench for image_builder: a random LUT in the bench, random pixels with
// addresses; each output must be LUT[pixel] at the same address, one clock
// after the input.
`include "tb/tb_common.svh"
module tb_image_builder;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [11:0] in_addr = 0, out_addr;
  ipu_pkg::pixel_t in_pix = 0, lut_addr, lut_data, out_pix;
  ipu_pkg::pixel_t lut [256];
  int exp_pix = -1, exp_addr;

  always #5 clk = ~clk;
  image_builder #(.AW(12)) dut (.clk, .rst_n, .in_valid, .in_addr, .in_pix, .lut_addr, .lut_data,
                                .out_valid, .out_addr, .out_pix);
  assign lut_data = lut[lut_addr];

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  initial begin
    for (int k = 0; k < 256; k++) lut[k] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      `TB_CHECK(out_valid == (exp_pix >= 0), "out_valid one clock after in_valid")
      if (exp_pix >= 0)
        `TB_CHECK(int'(out_pix) == exp_pix && int'(out_addr) == exp_addr, "mapped pixel and address")
      in_valid = $urandom_range(0, 3) != 0;
      in_pix = 8'($urandom);
      in_addr = 12'($urandom);
      exp_pix = in_valid ? int'(lut[in_pix]) : -1;
      exp_addr = int'(in_addr);
    end
    `TB_FINISH
  end
endmodule
