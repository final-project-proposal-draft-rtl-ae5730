// End-to-end bench for ipu_top, shared by the reduced-size and the
// full-size testbench (FULL = 1 instantiates ipu_top with its own defaults).
// A camera model streams frames showing bright rectangles on a dark, slightly
// textured background. Two snapshots are taken, the first filtering the raw
// frame, the second the equalised one. After each, the bench recomputes in
// plain integer code: the captured frame, the equalised frame
// (256 * CDF, clamped), the Sobel edge image and the Harris corner map, and
// compares them with the four memories of the design; the corner stream must
// list exactly the corners of the map. Then one VGA frame is checked in each
// display mode. The bench counts how often each mechanism of the design
// occurred (line-buffer swaps, window flush, LUT clamp, Sobel saturation,
// corners, both filter sources, all display modes) and fails one that never
// did.
`include "tb/tb_common.svh"
module ipu_tb_core #(
  parameter int  W = 16,
  parameter int  H = 12,
  parameter bit  FULL = 0,
  parameter int  GAP_PCT = 20,
  parameter int  LANES = 4          // must match ipu_top's default
);
  import ipu_pkg::*;
  localparam int N = W * H;
  localparam int XW = $clog2(W), YW = $clog2(H);
  localparam longint TH = 64'sd1_000_000_000_000;   // the design's default threshold

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, snap = 0, src_eq = 0;
  disp_mode_e disp_mode = DISP_RAW;
  logic busy, done, cam_valid = 0, cam_sof = 0;
  pixel_t cam_pix = 0;
  logic vga_hs, vga_vs, vga_de, vga_frame_start;
  pixel_t vga_pix;
  logic corner_valid;
  logic [XW-1:0] corner_x;
  logic [YW-1:0] corner_y;

  always #5 clk = ~clk;

  if (FULL) begin : g_dut
    ipu_top dut (.*);
  end else begin : g_dut
    ipu_top #(.W(W), .H(H)) dut (.*);
  end

  // ------------- scene -------------
  int frame_no = 0;
  function automatic pixel_t scene(int fr, int x, int y);
    int cx = x % 64, cy = y % 64;
    bit rect = FULL ? (cx >= 16 && cx < 48 && cy >= 20 && cy < 44)
                    : (x >= 4 && x <= 10 && y >= 3 && y <= 8);
    return rect ? 8'(200 + (fr % 3)) : 8'(20 + ((x + y + fr) % 4));
  endfunction

  initial begin : camera
    @(posedge rst_n);
    forever begin
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 99) < GAP_PCT) begin cam_valid = 0; cam_sof = 0; @(negedge clk); end
        cam_valid = 1; cam_sof = (i == 0); cam_pix = scene(frame_no, i % W, i / W);
      end
      frame_no++;
    end
  end

  // ------------- mechanism counters -------------
  int n_swap [2], n_flush = 0, n_corner_stream = 0, n_sat = 0, n_clamp = 0;
  int n_src [2], n_mode [4];
  int corner_list [$];
  int eq_cycles = 0, flt_cycles = 0;

  always @(posedge clk) if (rst_n) begin
    if (g_dut.dut.u_obtain.line_end) n_swap[g_dut.dut.u_obtain.fill_sel]++;
    if (g_dut.dut.wg_busy) n_flush++;
    // ipu_top sequencer states: 2 equalise, 3 filter, 4 filter drain
    if (int'(g_dut.dut.state) == 2) eq_cycles++;
    if (int'(g_dut.dut.state) == 3 || int'(g_dut.dut.state) == 4) flt_cycles++;
    if (corner_valid) corner_list.push_back(int'(corner_y) * W + int'(corner_x));
  end

  // ------------- copy of the captured frame out of the memory banks -------------
  pixel_t cap_copy [N];
  for (genvar b = 0; b < LANES; b++) begin : g_cap
    always @(posedge clk)
      if (done)
        for (int w = 0; w < N / LANES; w++)
          cap_copy[w*LANES + b] = g_dut.dut.u_internal_mem.g_bank[b].u_ram.mem[w];
  end

  // ------------- reference model -------------
  pixel_t raw [N];
  pixel_t eqi [N];
  pixel_t lut [256];

  function automatic int sx(int x, int y, bit use_eq);
    return use_eq ? int'(eqi[y*W + x]) : int'(raw[y*W + x]);
  endfunction

  function automatic void grad(int x, int y, bit e, output int gx, output int gy);
    gx = sx(x+1,y-1,e) - sx(x-1,y-1,e) + 2*(sx(x+1,y,e) - sx(x-1,y,e)) + sx(x+1,y+1,e) - sx(x-1,y+1,e);
    gy = sx(x-1,y+1,e) - sx(x-1,y-1,e) + 2*(sx(x,y+1,e) - sx(x,y-1,e)) + sx(x+1,y+1,e) - sx(x+1,y-1,e);
  endfunction

  function automatic int sobel_ref(int x, int y, bit e);
    int gx, gy, m;
    if (x < 1 || x > W-2 || y < 1 || y > H-2) return 0;
    grad(x, y, e, gx, gy);
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return m > 255 ? 255 : m;
  endfunction

  function automatic bit corner_ref(int x, int y, bit e);
    longint sxx = 0, syy = 0, sxy = 0, t, c;
    if (x < 2 || x > W-3 || y < 2 || y > H-3) return 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++) begin
        int gx, gy;
        grad(x+dx, y+dy, e, gx, gy);
        sxx += gx*gx; syy += gy*gy; sxy += gx*gy;
      end
    t = sxx + syy;
    c = sxx*syy - sxy*sxy - ((t*t*3) >>> 6);
    return c > TH;
  endfunction

  task automatic snapshot(bit use_eq);
    int fr, cum, n_ref_corners, bad;
    int hist [256];
    corner_list.delete();
    eq_cycles = 0;
    flt_cycles = 0;
    @(negedge clk);
    src_eq = use_eq;
    snap = 1;
    @(negedge clk) snap = 0;
    src_eq = 0;
    while (!(cam_valid && cam_sof)) @(negedge clk);
    fr = frame_no;
    while (!done) @(negedge clk);
    @(negedge clk);
    n_src[use_eq]++;
    // rates: equaliser N/LANES + N + 256 clocks; filters one pixel per clock
    `TB_CHECK(eq_cycles >= N/LANES + N + 256 && eq_cycles <= N/LANES + N + 256 + 12,
              $sformatf("equalise stage took %0d clocks", eq_cycles))
    `TB_CHECK(flt_cycles >= N + 2*W + 2 && flt_cycles <= N + 2*W + 2 + 12,
              $sformatf("filter stage took %0d clocks for %0d pixels", flt_cycles, N))
    // captured frame
    bad = 0;
    for (int i = 0; i < N; i++) begin
      raw[i] = scene(fr, i % W, i / W);
      if (cap_copy[i] != raw[i]) bad++;
    end
    `TB_CHECK(bad == 0, $sformatf("captured frame: %0d wrong pixels", bad))
    // equalised frame
    for (int k = 0; k < 256; k++) hist[k] = 0;
    for (int i = 0; i < N; i++) hist[raw[i]]++;
    cum = 0;
    for (int k = 0; k < 256; k++) begin
      cum += hist[k];
      lut[k] = ((256 * longint'(cum)) / N > 255) ? 8'd255 : 8'((256 * longint'(cum)) / N);
      if ((256 * longint'(cum)) / N > 255 && hist[k] > 0) n_clamp++;
    end
    bad = 0;
    for (int i = 0; i < N; i++) begin
      eqi[i] = lut[raw[i]];
      if (g_dut.dut.u_buffer_mem.mem[i] != eqi[i]) bad++;
    end
    `TB_CHECK(bad == 0, $sformatf("equalised frame: %0d wrong pixels", bad))
    // Sobel image
    bad = 0;
    for (int i = 0; i < N; i++) begin
      int e = sobel_ref(i % W, i / W, use_eq);
      if (int'(g_dut.dut.u_sobel_mem.mem[i]) != e) bad++;
      if (e == 255) n_sat++;
    end
    `TB_CHECK(bad == 0, $sformatf("Sobel image: %0d wrong pixels", bad))
    // corner map and corner stream
    bad = 0;
    n_ref_corners = 0;
    for (int i = 0; i < N; i++) begin
      bit e = corner_ref(i % W, i / W, use_eq);
      if (g_dut.dut.u_corner_mem.mem[i] != e) bad++;
      if (e) begin
        `TB_CHECK(n_ref_corners < corner_list.size() && corner_list[n_ref_corners] == i,
                  $sformatf("corner stream entry %0d", n_ref_corners))
        n_ref_corners++;
      end
    end
    `TB_CHECK(bad == 0, $sformatf("corner map: %0d wrong pixels", bad))
    `TB_CHECK(corner_list.size() == n_ref_corners, "corner stream length")
    n_corner_stream += corner_list.size();
    $display("snapshot of frame %0d, source %s: %0d corners", fr, use_eq ? "equalised" : "raw", n_ref_corners);
  endtask

  // one whole VGA frame in the given mode, compared with the reference
  task automatic show(disp_mode_e m, bit use_eq);
    int pos = 0, bad = 0;
    disp_mode = m;
    // the mode is taken at a frame start; check the frame after the next one
    while (!vga_frame_start) @(negedge clk);
    @(negedge clk);
    while (!vga_frame_start) @(negedge clk);
    while (pos < N) begin
      @(negedge clk);
      if (vga_de) begin
        int e;
        unique case (m)
          DISP_RAW:       e = raw[pos];
          DISP_EQUALISED: e = lut[raw[pos]];
          DISP_SOBEL:     e = sobel_ref(pos % W, pos / W, use_eq);
          DISP_CORNERS:   e = corner_ref(pos % W, pos / W, use_eq) ? 255 : raw[pos];
        endcase
        if (int'(vga_pix) != e) begin
          if (bad < 3) $display("mode %0d pos %0d got %0d exp %0d", m, pos, vga_pix, e);
          bad++;
        end
        pos++;
      end
    end
    `TB_CHECK(bad == 0, $sformatf("display mode %0d: %0d wrong pixels", m, bad))
    n_mode[m]++;
  endtask

  initial begin : watchdog
    repeat (FULL ? 12_000_000 : 400_000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  initial begin : main
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    snapshot(0);
    for (int m = 0; m < 4; m++) show(disp_mode_e'(m), 0);
    snapshot(1);
    show(DISP_SOBEL, 1);
    show(DISP_CORNERS, 1);
    $display("mechanisms: swaps %0d/%0d flush %0d clamp %0d sobel-sat %0d corners %0d src %0d/%0d modes %0d %0d %0d %0d",
             n_swap[0], n_swap[1], n_flush, n_clamp, n_sat, n_corner_stream, n_src[0], n_src[1],
             n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    `TB_CHECK(n_swap[0] > 0 && n_swap[1] > 0, "both input buffers used")
    `TB_CHECK(n_flush > 0, "window flush happened")
    `TB_CHECK(n_clamp > 0, "equalisation clamp at 255 happened")
    `TB_CHECK(n_sat > 0, "Sobel saturation happened")
    `TB_CHECK(n_corner_stream > 0, "corners detected")
    `TB_CHECK(n_src[0] > 0 && n_src[1] > 0, "both filter sources used")
    for (int m = 0; m < 4; m++) `TB_CHECK(n_mode[m] > 0, $sformatf("display mode %0d shown", m))
    `TB_FINISH
  end
endmodule
