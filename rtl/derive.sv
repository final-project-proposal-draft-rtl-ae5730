// derive: gradients of the 3x3 pixels around a window centre.
// From a 5x5 pixel window (win[row][col], row 0 on top) nine derive_pixel
// instances compute Ix and Iy of the inner 3x3 pixels, each from its own 3x3
// neighbourhood. The 18 gradients are registered: out_valid and the outputs
// follow in_valid by one clock. Gradients are passed on, never stored for
// the whole frame.
module derive (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  ipu_pkg::pixel_t win [5][5],
  output logic            out_valid,
  output ipu_pkg::grad_t  ix [3][3],
  output ipu_pkg::grad_t  iy [3][3]
);
  ipu_pkg::grad_t ix_d [3][3];
  ipu_pkg::grad_t iy_d [3][3];

  for (genvar r = 0; r < 3; r++) begin : g_row
    for (genvar c = 0; c < 3; c++) begin : g_col
      derive_pixel u_px (
        .p0 (win[r][c]),   .p1 (win[r][c+1]),   .p2 (win[r][c+2]),
        .p3 (win[r+1][c]),                      .p5 (win[r+1][c+2]),
        .p6 (win[r+2][c]), .p7 (win[r+2][c+1]), .p8 (win[r+2][c+2]),
        .ix (ix_d[r][c]),
        .iy (iy_d[r][c])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      ix <= '{default: '0};
      iy <= '{default: '0};
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        ix <= ix_d;
        iy <= iy_d;
      end
    end
  end
endmodule
