// harris_corner: the Harris corner detector for one window position.
// A 5x5 pixel window around the pixel (x, y) passes through
//   derive (Ix, Iy of the inner 3x3, 1 clock) -> harris_window (sums,
//   1 clock) -> corner (cornerness c, 3 clocks) -> threshold (compare),
// five clocks from in_valid to out_valid, one pixel per clock. The pixel
// coordinates travel alongside. For a corner the detector outputs (x, y),
// otherwise (0, 0); pix_x/pix_y always give the coordinates of the
// pixel the result belongs to. in_inside tells whether the whole 5x5 window lies in
// the image; pixels near the border (outer two lines and columns) are never
// reported as corners. out_c gives the cornerness for inspection.
module harris_corner #(
  parameter int unsigned XW     = 10,
  parameter int unsigned YW     = 9,
  parameter int unsigned SUM_W  = 25,
  parameter int unsigned K_NUM  = 3,
  parameter int unsigned K_FRAC = 6,
  parameter longint      THRESH = 64'sd1_000_000_000_000,
  localparam int unsigned C_W   = 2*SUM_W + 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  ipu_pkg::pixel_t       win [5][5],
  input  logic [XW-1:0]         in_x,
  input  logic [YW-1:0]         in_y,
  input  logic                  in_inside,
  output logic                  out_valid,
  output logic                  out_corner,
  output logic [XW-1:0]         out_x,
  output logic [YW-1:0]         out_y,
  output logic [XW-1:0]         pix_x,
  output logic [YW-1:0]         pix_y,
  output logic signed [C_W-1:0] out_c
);
  localparam int unsigned LAT = 5;

  typedef struct packed {
    logic [XW-1:0] x;
    logic [YW-1:0] y;
    logic          interior;
  } meta_t;

  meta_t meta_q [LAT];

  logic                    d_valid, w_valid;
  ipu_pkg::grad_t          ix [3][3];
  ipu_pkg::grad_t          iy [3][3];
  logic signed [SUM_W-1:0] sxx, syy, sxy;
  logic                    above;

  derive u_derive (
    .clk (clk), .rst_n (rst_n), .in_valid (in_valid), .win (win),
    .out_valid (d_valid), .ix (ix), .iy (iy)
  );

  harris_window #(.SUM_W(SUM_W)) u_window (
    .clk (clk), .rst_n (rst_n), .in_valid (d_valid), .ix (ix), .iy (iy),
    .out_valid (w_valid), .sxx (sxx), .syy (syy), .sxy (sxy)
  );

  corner #(.SUM_W(SUM_W), .K_NUM(K_NUM), .K_FRAC(K_FRAC)) u_corner (
    .clk (clk), .rst_n (rst_n), .in_valid (w_valid),
    .sxx (sxx), .syy (syy), .sxy (sxy),
    .out_valid (out_valid), .c (out_c)
  );

  threshold #(.C_W(C_W), .THRESH(THRESH)) u_threshold (
    .c (out_c), .is_corner (above)
  );

  // coordinates follow the data through the five pipeline registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) meta_q[i] <= '0;
    end else begin
      meta_q[0] <= '{x: in_x, y: in_y, interior: in_inside};
      for (int i = 1; i < LAT; i++) meta_q[i] <= meta_q[i-1];
    end
  end

  assign out_corner = above && meta_q[LAT-1].interior;
  assign out_x      = out_corner ? meta_q[LAT-1].x : '0;
  assign out_y      = out_corner ? meta_q[LAT-1].y : '0;
  assign pix_x      = meta_q[LAT-1].x;
  assign pix_y      = meta_q[LAT-1].y;
endmodule
