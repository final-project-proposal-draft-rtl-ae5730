// window_gen: sliding NxN pixel window over a raster-order frame.
// Pixels of a W x H frame arrive one per in_valid clock, row by row. N-1
// line buffers hold the previous lines; each new pixel, with the pixels above
// it from the line buffers, forms a new window column that is shifted in on
// the right. The window is centred on the pixel h = (N-1)/2 lines and
// columns behind the newest one. After the last frame pixel, the generator
// feeds itself h*W + h zero pixels (busy stays high, in_valid is ignored), so
// that every pixel of the frame is a window centre exactly once, in raster
// order, with its coordinates (out_x, out_y). Windows reaching outside the
// frame hold stale or zero pixels; out_inside marks centres whose full window
// lies inside, at least h lines and columns from every edge.
// Timing: the window of a centre appears one clock after the pixel that
// completes it. win[0][*] is the top line, win[*][0] the left column.
module window_gen #(
  parameter int unsigned N = 5,
  parameter int unsigned W = ipu_pkg::IMG_W,
  parameter int unsigned H = ipu_pkg::IMG_H,
  localparam int unsigned XW = $clog2(W),
  localparam int unsigned YW = $clog2(H),
  localparam int unsigned RW = $clog2(H + N + 1),
  localparam int unsigned LW = $clog2(W*H + W*N + N + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  ipu_pkg::pixel_t in_pix,
  output logic            busy,
  output logic            out_valid,
  output ipu_pkg::pixel_t win [N][N],
  output logic [XW-1:0]   out_x,
  output logic [YW-1:0]   out_y,
  output logic            out_inside
);
  localparam int unsigned HALF  = (N - 1) / 2;
  localparam int unsigned LEAD  = HALF * W + HALF;   // pixels before the first centre
  localparam int unsigned TOTAL = W * H + LEAD;      // pixels incl. the zero flush

  ipu_pkg::pixel_t lbuf [N-1][W];
  logic [XW-1:0]   col;
  logic [RW-1:0]   row;
  logic [LW-1:0]   cnt;          // pixels taken so far in this frame
  logic            flushing;
  logic            take;
  ipu_pkg::pixel_t pix;
  int              cx, cy;       // centre of the window completed by this pixel

  assign take = flushing || in_valid;
  assign pix  = flushing ? '0 : in_pix;
  assign busy = flushing;

  always_comb begin
    if (32'(col) >= HALF) begin
      cx = int'(col) - int'(HALF);
      cy = int'(row) - int'(HALF);
    end else begin
      cx = int'(col) + int'(W) - int'(HALF);
      cy = int'(row) - int'(HALF) - 1;
    end
  end

  always_ff @(posedge clk) begin
    if (take) begin
      lbuf[0][col] <= pix;
      for (int i = 1; i < N-1; i++) lbuf[i][col] <= lbuf[i-1][col];
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N-1; c++) win[r][c] <= win[r][c+1];
      for (int r = 0; r < N-1; r++) win[r][N-1] <= lbuf[N-2-r][col];
      win[N-1][N-1] <= pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col        <= '0;
      row        <= '0;
      cnt        <= '0;
      flushing   <= 1'b0;
      out_valid  <= 1'b0;
      out_x      <= '0;
      out_y      <= '0;
      out_inside <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (take) begin
        out_valid  <= (32'(cnt) >= LEAD);
        out_x      <= XW'(cx);
        out_y      <= YW'(cy);
        out_inside <= (cx >= int'(HALF)) && (cx < int'(W - HALF)) &&
                      (cy >= int'(HALF)) && (cy < int'(H - HALF));
        if (32'(cnt) == TOTAL - 1) begin
          cnt      <= '0;
          col      <= '0;
          row      <= '0;
          flushing <= 1'b0;
        end else begin
          cnt <= cnt + 1'b1;
          if (32'(cnt) == W*H - 1) flushing <= (LEAD != 0);
          if (col == XW'(W-1)) begin
            col <= '0;
            row <= row + 1'b1;
          end else begin
            col <= col + 1'b1;
          end
        end
      end
    end
  end
endmodule
