// ipu_top: image processing unit. A still frame from the camera is captured,
// contrast-equalised, and filtered for edges (Sobel) and corners (Harris);
// a VGA output shows one of the results.
// Data path:
//   camera -> obtain_image (two ping-pong line buffers) -> internal memory
//   internal memory (LANES interleaved banks) -> hist_eq_unit -> buffer memory
//   internal or buffer memory (src_eq selects) -> window_gen (5x5 window)
//       -> sobel_edge on the inner 3x3  -> Sobel memory
//       -> harris_corner                -> corner memory + corner stream
//   internal memory, LUT, Sobel and corner memories -> vga_display
// A snapshot request (snap) runs the whole sequence once: capture, equalise
// (a histogram pass reading LANES pixels per clock, 256 clocks for the LUT,
// an image pass at one pixel per clock), then one filter
// pass that reads the chosen source in raster order at one pixel per clock
// and writes both result memories. done pulses at the end; busy is high
// throughout. The display runs continuously and independently; the mode
// selects the raw, equalised, edge or corner-overlay image. Every detected
// corner is also reported on corner_valid/corner_x/corner_y as it is found.
module ipu_top #(
  parameter int unsigned W      = ipu_pkg::IMG_W,
  parameter int unsigned H      = ipu_pkg::IMG_H,
  parameter int unsigned LANES  = 4,
  parameter int unsigned K_NUM  = 3,
  parameter int unsigned K_FRAC = 6,
  parameter longint      THRESH = 64'sd1_000_000_000_000,
  localparam int unsigned N  = W * H,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned XW = $clog2(W),
  localparam int unsigned YW = $clog2(H)
) (
  input  logic                clk,
  input  logic                rst_n,
  // control
  input  logic                snap,
  input  logic                src_eq,       // filters read the equalised frame
  input  ipu_pkg::disp_mode_e disp_mode,
  output logic                busy,
  output logic                done,
  // camera
  input  logic                cam_valid,
  input  logic                cam_sof,
  input  ipu_pkg::pixel_t     cam_pix,
  // VGA
  output logic                vga_hs,
  output logic                vga_vs,
  output logic                vga_de,
  output ipu_pkg::pixel_t     vga_pix,
  output logic                vga_frame_start,
  // corner stream
  output logic                corner_valid,
  output logic [XW-1:0]       corner_x,
  output logic [YW-1:0]       corner_y
);
  import ipu_pkg::*;

  typedef enum logic [2:0] {T_IDLE, T_CAPTURE, T_EQ, T_FILTER, T_DRAIN} top_state_e;
  top_state_e state;

  // ---------------- capture ----------------
  logic          cap_start, cap_we, cap_busy, cap_done;
  logic [AW-1:0] cap_waddr;
  pixel_t        cap_wdata;

  obtain_image #(.W(W), .H(H)) u_obtain (
    .clk (clk), .rst_n (rst_n), .snap (cap_start),
    .cam_valid (cam_valid), .cam_sof (cam_sof), .cam_pix (cam_pix),
    .mem_we (cap_we), .mem_waddr (cap_waddr), .mem_wdata (cap_wdata),
    .busy (cap_busy), .done (cap_done)
  );

  // ---------------- internal memory ----------------
  logic          int_re_a, disp_re;
  logic [AW-1:0] int_raddr_a, disp_addr;
  pixel_t        int_rdata_a, int_rdata_b;
  pixel_t        int_rdata_wide [LANES];

  banked_frame_ram #(.DEPTH(N), .LANES(LANES)) u_internal_mem (
    .clk (clk), .we (cap_we), .waddr (cap_waddr), .wdata (cap_wdata),
    .re_a (int_re_a), .raddr_a (int_raddr_a), .rdata_a (int_rdata_a),
    .rdata_a_wide (int_rdata_wide),
    .re_b (disp_re), .raddr_b (disp_addr), .rdata_b (int_rdata_b)
  );

  // ---------------- histogram equaliser ----------------
  logic          eq_start, eq_re, eq_busy, eq_done;
  logic [AW-1:0] eq_raddr;
  logic          buf_we;
  logic [AW-1:0] buf_waddr;
  pixel_t        buf_wdata, disp_eq;

  hist_eq_unit #(.W(W), .H(H), .LANES(LANES)) u_hist_eq (
    .clk (clk), .rst_n (rst_n), .start (eq_start),
    .mem_re (eq_re), .mem_raddr (eq_raddr), .mem_rdata (int_rdata_a),
    .mem_rdata_wide (int_rdata_wide),
    .buf_we (buf_we), .buf_waddr (buf_waddr), .buf_wdata (buf_wdata),
    .disp_pix (int_rdata_b), .disp_eq (disp_eq),
    .busy (eq_busy), .done (eq_done)
  );

  // ---------------- buffer memory ----------------
  logic          buf_re;
  logic [AW-1:0] flt_addr;
  pixel_t        buf_rdata;

  frame_ram #(.DEPTH(N), .WIDTH(8)) u_buffer_mem (
    .clk (clk), .we (buf_we), .waddr (buf_waddr), .wdata (buf_wdata),
    .re_a (buf_re), .raddr_a (flt_addr), .rdata_a (buf_rdata),
    .re_b (1'b0), .raddr_b ('0), .rdata_b ()
  );

  // ---------------- filter pass ----------------
  logic          flt_rd, flt_rd_q, src_eq_q;
  pixel_t        flt_pix;
  logic          wg_busy, wg_valid, wg_inside;
  pixel_t        wg_win [5][5];
  pixel_t        sob_win [3][3];
  logic [XW-1:0] wg_x;
  logic [YW-1:0] wg_y;

  assign int_re_a    = eq_re || (flt_rd && !src_eq_q);
  assign int_raddr_a = (state == T_EQ) ? eq_raddr : flt_addr;
  assign buf_re      = flt_rd && src_eq_q;
  assign flt_pix     = src_eq_q ? buf_rdata : int_rdata_a;   // source multiplexer

  window_gen #(.N(5), .W(W), .H(H)) u_window (
    .clk (clk), .rst_n (rst_n), .in_valid (flt_rd_q), .in_pix (flt_pix),
    .busy (wg_busy), .out_valid (wg_valid), .win (wg_win),
    .out_x (wg_x), .out_y (wg_y), .out_inside (wg_inside)
  );

  // Sobel: inner 3x3 of the window; valid one pixel from the border
  logic          sob_valid;
  pixel_t        sob_edge;
  logic [AW-1:0] sob_addr_q [2];
  logic          sob_in_q [2];
  logic          wg_inside1;

  always_comb
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) sob_win[r][c] = wg_win[r+1][c+1];

  assign wg_inside1 = (wg_x >= XW'(1)) && (32'(wg_x) < W - 1) &&
                      (wg_y >= YW'(1)) && (32'(wg_y) < H - 1);

  sobel_edge u_sobel (
    .clk (clk), .rst_n (rst_n), .in_valid (wg_valid), .win (sob_win),
    .out_valid (sob_valid), .edge_val (sob_edge)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sob_addr_q <= '{default: '0};
      sob_in_q   <= '{default: 1'b0};
    end else begin
      sob_addr_q[0] <= AW'(wg_y) * AW'(W) + AW'(wg_x);
      sob_in_q[0]   <= wg_inside1;
      sob_addr_q[1] <= sob_addr_q[0];
      sob_in_q[1]   <= sob_in_q[0];
    end
  end

  pixel_t sob_rdata;
  frame_ram #(.DEPTH(N), .WIDTH(8)) u_sobel_mem (
    .clk (clk), .we (sob_valid), .waddr (sob_addr_q[1]),
    .wdata (sob_in_q[1] ? sob_edge : 8'd0),
    .re_a (1'b0), .raddr_a ('0), .rdata_a (),
    .re_b (disp_re), .raddr_b (disp_addr), .rdata_b (sob_rdata)
  );

  // Harris
  logic          har_valid, har_corner;
  logic [XW-1:0] har_x, har_px;
  logic [YW-1:0] har_y, har_py;
  logic signed [51:0] har_c;

  harris_corner #(.XW(XW), .YW(YW), .SUM_W(25), .K_NUM(K_NUM), .K_FRAC(K_FRAC),
                  .THRESH(THRESH)) u_harris (
    .clk (clk), .rst_n (rst_n), .in_valid (wg_valid), .win (wg_win),
    .in_x (wg_x), .in_y (wg_y), .in_inside (wg_inside),
    .out_valid (har_valid), .out_corner (har_corner),
    .out_x (har_x), .out_y (har_y), .pix_x (har_px), .pix_y (har_py), .out_c (har_c)
  );

  logic corner_rdata;
  frame_ram #(.DEPTH(N), .WIDTH(1)) u_corner_mem (
    .clk (clk), .we (har_valid), .waddr (AW'(har_py) * AW'(W) + AW'(har_px)),
    .wdata (har_corner),
    .re_a (1'b0), .raddr_a ('0), .rdata_a (),
    .re_b (disp_re), .raddr_b (disp_addr), .rdata_b (corner_rdata)
  );

  assign corner_valid = har_valid && har_corner;
  assign corner_x     = har_x;
  assign corner_y     = har_y;

  // ---------------- sequencer ----------------
  logic [AW:0] sob_cnt, har_cnt;     // results written in this filter pass

  assign cap_start = (state == T_IDLE) && snap;
  assign busy      = (state != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= T_IDLE;
      eq_start <= 1'b0;
      flt_rd   <= 1'b0;
      flt_rd_q <= 1'b0;
      flt_addr <= '0;
      src_eq_q <= 1'b0;
      sob_cnt  <= '0;
      har_cnt  <= '0;
      done     <= 1'b0;
    end else begin
      eq_start <= 1'b0;
      done     <= 1'b0;
      flt_rd_q <= flt_rd;
      if (sob_valid) sob_cnt <= sob_cnt + 1'b1;
      if (har_valid) har_cnt <= har_cnt + 1'b1;
      unique case (state)
        T_IDLE: if (snap) begin
          state    <= T_CAPTURE;
          src_eq_q <= src_eq;
        end
        T_CAPTURE: if (cap_done) begin
          state    <= T_EQ;
          eq_start <= 1'b1;
        end
        T_EQ: if (eq_done) begin
          state    <= T_FILTER;
          flt_rd   <= 1'b1;
          flt_addr <= '0;
          sob_cnt  <= '0;
          har_cnt  <= '0;
        end
        T_FILTER: begin
          flt_addr <= flt_addr + 1'b1;
          if (flt_addr == AW'(N-1)) begin
            flt_rd <= 1'b0;
            state  <= T_DRAIN;
          end
        end
        T_DRAIN: if (32'(sob_cnt) == N && 32'(har_cnt) == N) begin
          state <= T_IDLE;
          done  <= 1'b1;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // ---------------- display ----------------
  vga_display #(.H_VIS(W), .V_VIS(H)) u_display (
    .clk (clk), .rst_n (rst_n), .mode (disp_mode),
    .rd_en (disp_re), .rd_addr (disp_addr),
    .raw_pix (int_rdata_b), .eq_pix (disp_eq), .sobel_pix (sob_rdata),
    .corner_bit (corner_rdata),
    .vga_hs (vga_hs), .vga_vs (vga_vs), .vga_de (vga_de), .vga_pix (vga_pix),
    .frame_start (vga_frame_start)
  );

  a_filter_wait: assert property (@(posedge clk) disable iff (!rst_n) flt_rd_q |-> !wg_busy)
    else $error("ipu_top: pixel sent while the window generator flushes");
endmodule
