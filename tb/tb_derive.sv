// Testbench for derive: random 5x5 windows streamed back to back; the 18
// registered gradients are compared, one clock later, with the Sobel masks
// evaluated on the saved window.
`include "tb/tb_common.svh"
module tb_derive;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  ipu_pkg::pixel_t win [5][5];
  ipu_pkg::pixel_t prev [5][5];
  ipu_pkg::grad_t ix [3][3];
  ipu_pkg::grad_t iy [3][3];
  logic prev_v = 0;

  always #5 clk = ~clk;
  derive dut (.clk, .rst_n, .in_valid, .win, .out_valid, .ix, .iy);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  function automatic int px(int r, int c); return int'(prev[r][c]); endfunction

  initial begin
    win = '{default: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      // check what the previous clock captured
      if (prev_v) begin
        `TB_CHECK(out_valid, "out_valid one clock after in_valid")
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            int ex, ey;
            ex = px(r,c+2)-px(r,c) + 2*(px(r+1,c+2)-px(r+1,c)) + px(r+2,c+2)-px(r+2,c);
            ey = px(r+2,c)-px(r,c) + 2*(px(r+2,c+1)-px(r,c+1)) + px(r+2,c+2)-px(r,c+2);
            `TB_CHECK(int'(ix[r][c]) == ex && int'(iy[r][c]) == ey,
                      $sformatf("gradient (%0d,%0d) got %0d/%0d exp %0d/%0d", r, c, ix[r][c], iy[r][c], ex, ey))
          end
      end else begin
        `TB_CHECK(!out_valid, "no out_valid without input")
      end
      in_valid = ($urandom_range(0, 3) != 0);
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) win[r][c] = (t % 7 == 0) ? {8{c[0]}} : 8'($urandom);
      prev = win;
      prev_v = in_valid;
    end
    `TB_FINISH
  end
endmodule
