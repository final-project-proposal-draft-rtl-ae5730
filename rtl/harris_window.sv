// harris_window: the three entries of the Harris matrix G over a 3x3 window,
//   sxx = sum Ix^2,  syy = sum Iy^2,  sxy = sum Ix*Iy,
// with equal (unit) weights. Nine products per sum are added in a tree and
// registered: outputs follow in_valid by one clock.
// Width: 9 * 1020^2 = 9,363,600 needs 24 bits, plus a sign for sxy, so the
// sums are SUM_W = 25 bits signed. The design description gives 20 and 22
// bits, which would overflow on strong edges.
module harris_window #(
  parameter int unsigned SUM_W = 25
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  ipu_pkg::grad_t           ix [3][3],
  input  ipu_pkg::grad_t           iy [3][3],
  output logic                     out_valid,
  output logic signed [SUM_W-1:0]  sxx,
  output logic signed [SUM_W-1:0]  syy,
  output logic signed [SUM_W-1:0]  sxy
);
  typedef logic signed [SUM_W-1:0] sum_t;
  sum_t sxx_d, syy_d, sxy_d;

  always_comb begin
    sxx_d = '0;
    syy_d = '0;
    sxy_d = '0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        sxx_d = sxx_d + sum_t'(ix[r][c]) * sum_t'(ix[r][c]);
        syy_d = syy_d + sum_t'(iy[r][c]) * sum_t'(iy[r][c]);
        sxy_d = sxy_d + sum_t'(ix[r][c]) * sum_t'(iy[r][c]);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sxx <= '0;
      syy <= '0;
      sxy <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sxx <= sxx_d;
        syy <= syy_d;
        sxy <= sxy_d;
      end
    end
  end
endmodule
