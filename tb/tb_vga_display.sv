// Testbench for vga_display with a small 8 x 4 visible frame and short
// porches. Memory models answer the display address one clock later. The
// bench checks sync pulse lengths and periods, the number of visible pixels
// per line and frame, and that each visible pixel carries the value the
// selected mode calls for at its raster position, for all four modes.
`include "tb/tb_common.svh"
module tb_vga_display;
  import ipu_pkg::*;
  int checks = 0, failures = 0;
  localparam int HV = 8, HF = 2, HS = 3, HB = 2, VV = 4, VF = 1, VS = 2, VB = 1;
  localparam int HT = HV + HF + HS + HB, VT = VV + VF + VS + VB;
  logic clk = 0, rst_n = 0;
  disp_mode_e mode = DISP_RAW;
  logic rd_en, vga_hs, vga_vs, vga_de, frame_start;
  logic [4:0] rd_addr;
  pixel_t raw_pix, eq_pix, sobel_pix, vga_pix;
  logic corner_bit;
  int vis_cnt = 0, hs_low = 0, hs_period = 0, vs_low_lines = 0, frames = 0, last_hs_fall = -1, cyc = 0;
  int mode_seen [4];
  int hs_run = 0;

  always #5 clk = ~clk;
  vga_display #(.H_VIS(HV), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
                .V_VIS(VV), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)) dut (
    .clk, .rst_n, .mode, .rd_en, .rd_addr, .raw_pix, .eq_pix, .sobel_pix, .corner_bit,
    .vga_hs, .vga_vs, .vga_de, .vga_pix, .frame_start);

  function automatic pixel_t raw_f(int a); return 8'(a * 7 + 3); endfunction
  function automatic pixel_t eq_f(pixel_t p); return ~p; endfunction
  function automatic pixel_t sob_f(int a); return 8'(a * 11); endfunction
  function automatic bit cor_f(int a); return (a % 5) == 2; endfunction

  always @(posedge clk) begin
    if (rd_en) begin
      raw_pix    <= raw_f(rd_addr);
      sobel_pix  <= sob_f(rd_addr);
      corner_bit <= cor_f(rd_addr);
    end
  end
  assign eq_pix = eq_f(raw_pix);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  // output checks
  disp_mode_e cur_mode;
  int pos = 0;
  logic hs_prev = 1;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (frame_start) begin
      if (frames > 0) `TB_CHECK(pos == HV*VV, $sformatf("visible pixels per frame %0d", pos))
      pos = 0;
      frames <= frames + 1;
      cur_mode = mode;
    end
    if (vga_de && frames > 0) begin
      pixel_t e;
      unique case (cur_mode)
        DISP_RAW:       e = raw_f(pos);
        DISP_EQUALISED: e = eq_f(raw_f(pos));
        DISP_SOBEL:     e = sob_f(pos);
        DISP_CORNERS:   e = cor_f(pos) ? 8'hFF : raw_f(pos);
      endcase
      `TB_CHECK(vga_pix == e, $sformatf("mode %0d pixel %0d: %0h exp %0h", cur_mode, pos, vga_pix, e))
      mode_seen[cur_mode]++;
      pos++;
    end
    if (!vga_de) `TB_CHECK(vga_pix == 0, "black in blanking")
    if (hs_prev && !vga_hs) begin
      if (last_hs_fall >= 0) `TB_CHECK(cyc - last_hs_fall == HT, $sformatf("line period %0d", cyc - last_hs_fall))
      last_hs_fall <= cyc;
    end
    if (!vga_hs) begin hs_low++; hs_run++; end
    if (!hs_prev && vga_hs) begin
      `TB_CHECK(hs_run == HS, $sformatf("hsync pulse %0d clocks", hs_run))
      hs_run = 0;
    end
    hs_prev = vga_hs;
  end

  // vsync length in lines: count line starts while vsync is low
  int vs_lines = 0;
  logic vs_prev = 1;
  always @(posedge clk) if (rst_n) begin
    if (!vga_vs && hs_prev && !vga_hs) vs_lines++;
    if (!vs_prev && vga_vs) begin
      if (frames > 1) `TB_CHECK(vs_lines == VS, $sformatf("vsync lines %0d", vs_lines))
      vs_lines = 0;
    end
    vs_prev = vga_vs;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      mode = disp_mode_e'(m);
      repeat (2 * HT * VT) @(negedge clk);
    end
    `TB_CHECK(hs_low > 0, "hsync pulses seen")
    for (int m = 0; m < 4; m++) `TB_CHECK(mode_seen[m] > 0, $sformatf("mode %0d displayed", m))
    `TB_FINISH
  end
endmodule
