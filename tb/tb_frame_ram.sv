// Testbench for frame_ram: random writes and reads on both read ports,
// compared with a model array; data must appear one clock after the
// address, a read of the word being written returns the old word, and a
// port whose read enable is low holds its last output.
`include "tb/tb_common.svh"
module tb_frame_ram;
  int checks = 0, failures = 0;
  localparam int DEPTH = 300, WIDTH = 8;
  logic clk = 0, we = 0, re_a = 0, re_b = 0;
  logic [8:0] waddr = 0, raddr_a = 0, raddr_b = 0;
  logic [WIDTH-1:0] wdata = 0, rdata_a, rdata_b;
  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] exp_a, exp_b;
  bit chk_a, chk_b;

  always #5 clk = ~clk;
  frame_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .we, .waddr, .wdata, .re_a, .raddr_a, .rdata_a,
                                              .re_b, .raddr_b, .rdata_b);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  initial begin
    // fill the whole memory first
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 9'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (chk_a) `TB_CHECK(rdata_a == exp_a, $sformatf("port a got %0h exp %0h", rdata_a, exp_a))
      if (chk_b) `TB_CHECK(rdata_b == exp_b, $sformatf("port b got %0h exp %0h", rdata_b, exp_b))
      we = $urandom_range(0, 1);
      waddr = 9'($urandom_range(0, DEPTH-1));
      wdata = 8'($urandom);
      re_a = $urandom_range(0, 3) != 0;
      re_b = $urandom_range(0, 3) != 0;
      raddr_a = (t % 5 == 0) ? waddr : 9'($urandom_range(0, DEPTH-1));
      raddr_b = 9'($urandom_range(0, DEPTH-1));
      if (re_a) begin chk_a = 1; exp_a = model[raddr_a]; end
      if (re_b) begin chk_b = 1; exp_b = model[raddr_b]; end
      if (we) model[waddr] = wdata;
    end
    `TB_FINISH
  end
endmodule
