// Testbench for harris_corner: 5x5 windows cut from a bright rectangle on a
// dark background (corners, edges, flat areas) and random windows, one per
// clock. Each result must come five clocks after its window; the cornerness
// and the corner decision are recomputed in the bench from the window
// (Sobel gradients, 3x3 sums, det - 3/64*trace^2, compare), and the output
// coordinates must be (x, y) for a corner and (0, 0) otherwise.
`include "tb/tb_common.svh"
module tb_harris_corner;
  int checks = 0, failures = 0;
  localparam longint TH = 64'sd1_000_000_000_000;
  logic clk = 0, rst_n = 0, in_valid = 0, in_inside = 0;
  ipu_pkg::pixel_t win [5][5];
  logic [9:0] in_x = 0, out_x, pix_x;
  logic [8:0] in_y = 0, out_y, pix_y;
  logic out_valid, out_corner;
  logic signed [51:0] out_c;

  typedef struct { longint c; bit corner; int x, y; int due; } exp_t;
  exp_t exp_q [$];
  int cyc = 0, n_corner = 0, n_flat = 0;

  always #5 clk = ~clk;
  harris_corner #(.THRESH(TH)) dut (.clk, .rst_n, .in_valid, .win, .in_x, .in_y, .in_inside,
                    .out_valid, .out_corner, .out_x, .out_y, .pix_x, .pix_y, .out_c);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  function automatic longint model();
    longint sxx = 0, syy = 0, sxy = 0, t;
    for (int r = 1; r <= 3; r++)
      for (int c = 1; c <= 3; c++) begin
        longint gx, gy;
        gx = int'(win[r-1][c+1]) - int'(win[r-1][c-1]) + 2*(int'(win[r][c+1]) - int'(win[r][c-1]))
           + int'(win[r+1][c+1]) - int'(win[r+1][c-1]);
        gy = int'(win[r+1][c-1]) - int'(win[r-1][c-1]) + 2*(int'(win[r+1][c]) - int'(win[r-1][c]))
           + int'(win[r+1][c+1]) - int'(win[r-1][c+1]);
        sxx += gx*gx; syy += gy*gy; sxy += gx*gy;
      end
    t = sxx + syy;
    return sxx*syy - sxy*sxy - ((t*t*3) >>> 6);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      `TB_CHECK(exp_q.size() > 0, "unexpected result")
      if (exp_q.size() > 0) begin
        automatic exp_t e = exp_q.pop_front();
        `TB_CHECK(e.due == cyc, $sformatf("latency: at %0d due %0d", cyc, e.due))
        `TB_CHECK(longint'(out_c) == e.c, $sformatf("c %0d exp %0d", out_c, e.c))
        `TB_CHECK(out_corner == e.corner, "corner decision")
        `TB_CHECK(int'(out_x) == (e.corner ? e.x : 0) && int'(out_y) == (e.corner ? e.y : 0),
                  "reported coordinates")
        `TB_CHECK(int'(pix_x) == e.x && int'(pix_y) == e.y, "pixel coordinates")
        if (e.corner) n_corner++; else n_flat++;
      end
    end
    if (rst_n && in_valid) begin
      exp_t e;
      e.c = model();
      e.corner = in_inside && (e.c > TH);
      e.x = int'(in_x); e.y = int'(in_y); e.due = cyc + 5;
      exp_q.push_back(e);
    end
  end

  initial begin
    win = '{default: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 4) != 0);
      in_inside = ($urandom_range(0, 7) != 0);
      in_x = 10'($urandom_range(2, 637));
      in_y = 9'($urandom_range(2, 477));
      if (t % 2 == 0) begin
        // window at offset (ox, oy) over a rectangle 200 inside, 20 outside
        automatic int ox = $urandom_range(0, 12), oy = $urandom_range(0, 12);
        for (int r = 0; r < 5; r++)
          for (int c = 0; c < 5; c++)
            win[r][c] = ((ox + c >= 6) && (ox + c <= 12) && (oy + r >= 5) && (oy + r <= 10)) ? 8'd200 : 8'd20;
      end else begin
        for (int r = 0; r < 5; r++)
          for (int c = 0; c < 5; c++) win[r][c] = 8'($urandom);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (8) @(negedge clk);
    `TB_CHECK(exp_q.size() == 0, "all results delivered")
    `TB_CHECK(n_corner > 0 && n_flat > 0, "both decisions exercised")
    $display("corners %0d, not corners %0d", n_corner, n_flat);
    `TB_FINISH
  end
endmodule
