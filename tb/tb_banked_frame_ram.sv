// Testbench for banked_frame_ram: random writes and reads compared with a
// model array. Port A must return the addressed pixel and the aligned
// four-pixel group holding it, port B the addressed pixel, all one clock
// after the address; a read of the word being written returns the old
// word, and a port whose read enable is low holds its last output.
`include "tb/tb_common.svh"
module tb_banked_frame_ram;
  int checks = 0, failures = 0;
  localparam int DEPTH = 320, LANES = 4;
  logic clk = 0, we = 0, re_a = 0, re_b = 0;
  logic [8:0] waddr = 0, raddr_a = 0, raddr_b = 0;
  ipu_pkg::pixel_t wdata = 0, rdata_a, rdata_b;
  ipu_pkg::pixel_t rdata_a_wide [LANES];
  ipu_pkg::pixel_t model [DEPTH];
  ipu_pkg::pixel_t exp_a, exp_b;
  ipu_pkg::pixel_t exp_w [LANES];
  bit chk_a = 0, chk_b = 0;   // set once the port has been read

  always #5 clk = ~clk;
  banked_frame_ram #(.DEPTH(DEPTH), .LANES(LANES)) dut (.clk, .we, .waddr, .wdata, .re_a, .raddr_a,
                                                       .rdata_a, .rdata_a_wide, .re_b, .raddr_b, .rdata_b);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 9'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (chk_b) `TB_CHECK(rdata_b == exp_b, $sformatf("port b got %0h exp %0h", rdata_b, exp_b))
      if (chk_a) begin
        `TB_CHECK(rdata_a == exp_a, $sformatf("port a got %0h exp %0h", rdata_a, exp_a))
        for (int l = 0; l < LANES; l++)
          `TB_CHECK(rdata_a_wide[l] == exp_w[l], $sformatf("lane %0d got %0h exp %0h", l, rdata_a_wide[l], exp_w[l]))
      end
      we = $urandom_range(0, 1);
      waddr = 9'($urandom_range(0, DEPTH-1));
      wdata = 8'($urandom);
      re_a = $urandom_range(0, 3) != 0;
      re_b = $urandom_range(0, 3) != 0;
      raddr_a = (t % 5 == 0) ? waddr : 9'($urandom_range(0, DEPTH-1));
      raddr_b = (t % 7 == 0) ? waddr : 9'($urandom_range(0, DEPTH-1));
      if (re_a) begin
        chk_a = 1;
        exp_a = model[raddr_a];
        for (int l = 0; l < LANES; l++) exp_w[l] = model[(int'(raddr_a) / LANES) * LANES + l];
      end
      if (re_b) begin chk_b = 1; exp_b = model[raddr_b]; end
      if (we) model[waddr] = wdata;
    end
    `TB_FINISH
  end
endmodule
