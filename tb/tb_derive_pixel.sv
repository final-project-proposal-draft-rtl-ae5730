// Testbench for derive_pixel: random and extreme neighbourhoods, gradients
// compared with the two Sobel masks evaluated in integer arithmetic.
`include "tb/tb_common.svh"
module tb_derive_pixel;
  int checks = 0, failures = 0;
  ipu_pkg::pixel_t p [9];
  ipu_pkg::grad_t  ix, iy;

  derive_pixel dut (.p0(p[0]), .p1(p[1]), .p2(p[2]), .p3(p[3]), .p5(p[5]),
                    .p6(p[6]), .p7(p[7]), .p8(p[8]), .ix(ix), .iy(iy));

  initial begin
    #100000 failures++; $display("watchdog"); `TB_FINISH
  end

  initial begin
    int ex, ey;
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 9; i++) begin
        case (t)
          0: p[i] = (i % 3 == 2) ? 8'd255 : 8'd0;   // max positive Ix
          1: p[i] = (i % 3 == 0) ? 8'd255 : 8'd0;   // max negative Ix
          2: p[i] = (i >= 6) ? 8'd255 : 8'd0;       // max positive Iy
          3: p[i] = (i < 3) ? 8'd255 : 8'd0;        // max negative Iy
          default: p[i] = 8'($urandom);
        endcase
      end
      #1;
      ex = (int'(p[2]) - int'(p[0])) + 2*(int'(p[5]) - int'(p[3])) + (int'(p[8]) - int'(p[6]));
      ey = (int'(p[6]) - int'(p[0])) + 2*(int'(p[7]) - int'(p[1])) + (int'(p[8]) - int'(p[2]));
      `TB_CHECK(int'(ix) == ex, $sformatf("Ix %0d exp %0d", ix, ex))
      `TB_CHECK(int'(iy) == ey, $sformatf("Iy %0d exp %0d", iy, ey))
    end
    `TB_FINISH
  end
endmodule
