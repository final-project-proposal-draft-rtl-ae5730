// Testbench for input_buffer: lines of random pixels are written and read
// back, reads overlapping the writing of the next line.
`include "tb/tb_common.svh"
module tb_input_buffer;
  int checks = 0, failures = 0;
  localparam int LINE = 20;
  logic clk = 0, we = 0;
  logic [4:0] waddr = 0, raddr = 0;
  ipu_pkg::pixel_t wdata = 0, rdata;
  ipu_pkg::pixel_t model [LINE];
  ipu_pkg::pixel_t exp_d;
  bit chk = 0;

  always #5 clk = ~clk;
  input_buffer #(.LINE(LINE)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  initial begin
    for (int i = 0; i < LINE; i++) begin
      @(negedge clk);
      we = 1; waddr = 5'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (chk) `TB_CHECK(rdata == exp_d, $sformatf("read got %0h exp %0h", rdata, exp_d))
      we = $urandom_range(0, 1);
      waddr = 5'($urandom_range(0, LINE-1));
      wdata = 8'($urandom);
      raddr = 5'($urandom_range(0, LINE-1));
      exp_d = model[raddr];
      chk = 1;
      if (we) model[waddr] = wdata;
    end
    `TB_FINISH
  end
endmodule
