// Testbench for harris_window: random and full-scale gradient windows; the
// three sums are compared one clock later with integer sums in the bench.
`include "tb/tb_common.svh"
module tb_harris_window;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  ipu_pkg::grad_t ix [3][3];
  ipu_pkg::grad_t iy [3][3];
  logic signed [24:0] sxx, syy, sxy;
  longint exx, eyy, exy;

  always #5 clk = ~clk;
  harris_window dut (.clk, .rst_n, .in_valid, .ix, .iy, .out_valid, .sxx, .syy, .sxy);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  initial begin
    ix = '{default: '0};
    iy = '{default: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      exx = 0; eyy = 0; exy = 0;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          if (t < 2) begin          // full scale, both signs of the cross term
            ix[r][c] = -11'sd1020;
            iy[r][c] = (t == 0) ? -11'sd1020 : 11'sd1020;
          end else begin
            ix[r][c] = 11'($signed($urandom_range(0, 2040)) - 1020);
            iy[r][c] = 11'($signed($urandom_range(0, 2040)) - 1020);
          end
          exx += longint'(ix[r][c]) * longint'(ix[r][c]);
          eyy += longint'(iy[r][c]) * longint'(iy[r][c]);
          exy += longint'(ix[r][c]) * longint'(iy[r][c]);
        end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      `TB_CHECK(out_valid, "out_valid after one clock")
      `TB_CHECK(longint'(sxx) == exx && longint'(syy) == eyy && longint'(sxy) == exy,
                $sformatf("sums %0d %0d %0d exp %0d %0d %0d", sxx, syy, sxy, exx, eyy, exy))
    end
    `TB_FINISH
  end
endmodule
