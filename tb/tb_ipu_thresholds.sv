// Threshold study on the whole unit: three copies of ipu_top, built with
// corner thresholds 1e9, 5e10 and 1e12, capture the same 48 x 32 scene with
// three rectangles of decreasing contrast (180, 90 and 40 grey levels).
// A higher threshold must report fewer corners: each copy's corner count is
// compared with an integer reference model at its threshold, and the counts
// must strictly decrease from the lowest to the highest threshold.
`include "tb/tb_common.svh"
module tb_ipu_thresholds;
  import ipu_pkg::*;
  localparam int W = 48, H = 32, N = W * H, NT = 3;
  localparam longint TH [NT] = '{64'sd1_000_000_000, 64'sd50_000_000_000, 64'sd1_000_000_000_000};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, snap = 0, cam_valid = 0, cam_sof = 0;
  pixel_t cam_pix = 0;
  logic busy [NT];
  logic done [NT];
  logic corner_valid [NT];
  int   n_corners [NT];

  always #5 clk = ~clk;

  for (genvar t = 0; t < NT; t++) begin : g_th
    logic hs, vs, de, fs;
    pixel_t pix;
    logic [5:0] cx;
    logic [4:0] cy;
    ipu_top #(.W(W), .H(H), .THRESH(TH[t])) dut (
      .clk, .rst_n, .snap, .src_eq (1'b0), .disp_mode (DISP_CORNERS),
      .busy (busy[t]), .done (done[t]),
      .cam_valid, .cam_sof, .cam_pix,
      .vga_hs (hs), .vga_vs (vs), .vga_de (de), .vga_pix (pix), .vga_frame_start (fs),
      .corner_valid (corner_valid[t]), .corner_x (cx), .corner_y (cy));
    always @(posedge clk) if (rst_n && corner_valid[t]) n_corners[t]++;
  end

  function automatic int scene(int x, int y);
    if (y >= 6 && y <= 24) begin
      if (x >= 4 && x <= 12)  return 200;
      if (x >= 18 && x <= 28) return 110;
      if (x >= 34 && x <= 44) return 60;
    end
    return 20;
  endfunction

  function automatic longint cornerness(int x, int y);
    longint sxx = 0, syy = 0, sxy = 0, t;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++) begin
        int px = x + dx, py = y + dy, gx, gy;
        gx = scene(px+1,py-1) - scene(px-1,py-1) + 2*(scene(px+1,py) - scene(px-1,py)) + scene(px+1,py+1) - scene(px-1,py+1);
        gy = scene(px-1,py+1) - scene(px-1,py-1) + 2*(scene(px,py+1) - scene(px,py-1)) + scene(px+1,py+1) - scene(px+1,py-1);
        sxx += gx*gx; syy += gy*gy; sxy += gx*gy;
      end
    t = sxx + syy;
    return sxx*syy - sxy*sxy - ((t*t*3) >>> 6);
  endfunction

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : camera
    @(posedge rst_n);
    forever
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        cam_valid = 1; cam_sof = (i == 0); cam_pix = 8'(scene(i % W, i / W));
      end
  end

  initial begin
    automatic int expect_n [NT];
    for (int t = 0; t < NT; t++) begin n_corners[t] = 0; expect_n[t] = 0; end
    for (int y = 2; y < H-2; y++)
      for (int x = 2; x < W-2; x++) begin
        automatic longint c = cornerness(x, y);
        for (int t = 0; t < NT; t++) if (c > TH[t]) expect_n[t]++;
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) snap = 1;
    @(negedge clk) snap = 0;
    while (!(done[0] && done[1] && done[2])) @(negedge clk);
    for (int t = 0; t < NT; t++) begin
      $display("threshold %0d: %0d corners (reference %0d)", TH[t], n_corners[t], expect_n[t]);
      `TB_CHECK(n_corners[t] == expect_n[t], $sformatf("corner count at threshold %0d", TH[t]))
    end
    `TB_CHECK(n_corners[0] > n_corners[1] && n_corners[1] > n_corners[2] && n_corners[2] > 0,
              "fewer corners at higher thresholds")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
