// Testbench for window_gen: frames of 9 x 7 pixels with value
// f(x, y) = 16*y + x + seed, streamed with random gaps, two frames in a row.
// Every frame pixel must be a centre exactly once, in raster order; for
// centres marked inside, all 25 window pixels must equal f at the matching
// offset; the inside flag must match the two-pixel border rule.
`include "tb/tb_common.svh"
module tb_window_gen;
  int checks = 0, failures = 0;
  localparam int W = 9, H = 7;
  logic clk = 0, rst_n = 0, in_valid = 0;
  ipu_pkg::pixel_t in_pix = 0;
  logic busy, out_valid, out_inside;
  ipu_pkg::pixel_t win [5][5];
  logic [3:0] out_x;
  logic [2:0] out_y;
  int seed = 0, expect_lin = 0, frames_done = 0, n_inside = 0;

  always #5 clk = ~clk;
  window_gen #(.N(5), .W(W), .H(H)) dut (.clk, .rst_n, .in_valid, .in_pix, .busy,
                                        .out_valid, .win, .out_x, .out_y, .out_inside);

  function automatic ipu_pkg::pixel_t f(int x, int y); return 8'(16*y + x + seed); endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int ex = expect_lin % W, ey = expect_lin / W;
    automatic bit ins = (ex >= 2) && (ex < W-2) && (ey >= 2) && (ey < H-2);
    `TB_CHECK(int'(out_x) == ex && int'(out_y) == ey,
              $sformatf("centre (%0d,%0d) exp (%0d,%0d)", out_x, out_y, ex, ey))
    `TB_CHECK(out_inside == ins, "inside flag")
    if (ins) begin
      n_inside++;
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++)
          `TB_CHECK(win[r][c] == f(ex + c - 2, ey + r - 2), $sformatf("pixel [%0d][%0d] of (%0d,%0d)", r, c, ex, ey))
    end
    expect_lin++;
    if (expect_lin == W*H) begin expect_lin = 0; frames_done++; end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 2; fr++) begin
      seed = 37 * fr;
      for (int i = 0; i < W*H; i++) begin
        @(negedge clk);
        while (busy || $urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        in_pix = f(i % W, i / W);
      end
      @(negedge clk) in_valid = 0;
      while (busy) @(negedge clk);
      repeat (3) @(negedge clk);
    end
    `TB_CHECK(frames_done == 2, "two complete frames of centres")
    `TB_CHECK(n_inside == 2 * (W-4) * (H-4), "inside count")
    `TB_FINISH
  end
endmodule
