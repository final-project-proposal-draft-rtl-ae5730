// vga_display: VGA timing and the display multiplexer.
// A horizontal and a vertical counter scan the standard 640x480, 60 Hz frame
// (800 x 525 clocks including blanking; a 25 MHz pixel clock is assumed) and
// form the frame-memory address of the visible pixel. One clock later the
// stores return their words and the multiplexer picks, by mode:
//   DISP_RAW       the captured grey level,
//   DISP_EQUALISED the captured grey level looked up in the equalisation LUT,
//   DISP_SOBEL     the Sobel edge value,
//   DISP_CORNERS   the captured image with corner pixels painted white.
// Outputs are registered, so pixel, data-enable and both syncs (active low)
// appear two clocks after the counters; the mode is sampled once per frame.
// Porch and sync lengths are the usual VGA values, not taken from the
// design description, and are parameters so a smaller frame can be tested.
module vga_display #(
  parameter int unsigned H_VIS  = ipu_pkg::IMG_W,
  parameter int unsigned H_FP   = 16,
  parameter int unsigned H_SYNC = 96,
  parameter int unsigned H_BP   = 48,
  parameter int unsigned V_VIS  = ipu_pkg::IMG_H,
  parameter int unsigned V_FP   = 10,
  parameter int unsigned V_SYNC = 2,
  parameter int unsigned V_BP   = 33,
  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP,
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP,
  localparam int unsigned AW    = $clog2(H_VIS * V_VIS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  ipu_pkg::disp_mode_e mode,
  output logic                rd_en,
  output logic [AW-1:0]       rd_addr,
  input  ipu_pkg::pixel_t     raw_pix,
  input  ipu_pkg::pixel_t     eq_pix,
  input  ipu_pkg::pixel_t     sobel_pix,
  input  logic                corner_bit,
  output logic                vga_hs,
  output logic                vga_vs,
  output logic                vga_de,
  output ipu_pkg::pixel_t     vga_pix,
  output logic                frame_start
);
  logic [$clog2(H_TOT)-1:0] hc;
  logic [$clog2(V_TOT)-1:0] vc;
  logic [AW-1:0]            addr;
  logic                     vis, hs, vs;
  logic                     vis_d, hs_d, vs_d;
  ipu_pkg::disp_mode_e      mode_q;

  assign vis = (32'(hc) < H_VIS) && (32'(vc) < V_VIS);
  assign hs  = !((32'(hc) >= H_VIS + H_FP) && (32'(hc) < H_VIS + H_FP + H_SYNC));
  assign vs  = !((32'(vc) >= V_VIS + V_FP) && (32'(vc) < V_VIS + V_FP + V_SYNC));

  assign rd_en   = vis;
  assign rd_addr = addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hc          <= '0;
      vc          <= '0;
      addr        <= '0;
      mode_q      <= ipu_pkg::DISP_RAW;
      vis_d       <= 1'b0;
      hs_d        <= 1'b1;
      vs_d        <= 1'b1;
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      vga_de      <= 1'b0;
      vga_pix     <= '0;
      frame_start <= 1'b0;
    end else begin
      // scan counters and the linear address of the visible pixel
      if (32'(hc) == H_TOT - 1) begin
        hc <= '0;
        if (32'(vc) == V_TOT - 1) vc <= '0;
        else vc <= vc + 1'b1;
      end else begin
        hc <= hc + 1'b1;
      end
      if (vis) addr <= (32'(addr) == H_VIS*V_VIS - 1) ? '0 : addr + 1'b1;
      frame_start <= (hc == '0) && (vc == '0);
      if ((hc == '0) && (vc == '0)) mode_q <= mode;
      // data stage: memories answer the address of one clock ago
      vis_d <= vis;
      hs_d  <= hs;
      vs_d  <= vs;
      vga_de <= vis_d;
      vga_hs <= hs_d;
      vga_vs <= vs_d;
      if (!vis_d) vga_pix <= '0;
      else begin
        unique case (mode_q)
          ipu_pkg::DISP_RAW:       vga_pix <= raw_pix;
          ipu_pkg::DISP_EQUALISED: vga_pix <= eq_pix;
          ipu_pkg::DISP_SOBEL:     vga_pix <= sobel_pix;
          ipu_pkg::DISP_CORNERS:   vga_pix <= corner_bit ? 8'hFF : raw_pix;
        endcase
      end
    end
  end
endmodule
