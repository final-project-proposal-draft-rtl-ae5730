// sobel_edge: edge strength of the centre pixel of a 3x3 block of grey levels.
// The block (win[row][col], row 0 on top) is convolved with the dx mask
// [-1 0 1; -2 0 2; -1 0 1] and the dy mask [1 2 1; 0 0 0; -1 -2 -1]; the
// factor 2 is a wired shift. The edge value is |Gx| + |Gy|, limited to 255,
// so it can be shown directly as a grey level (brighter = sharper edge).
// Two pipeline registers: stage 1 holds the two gradients (three levels of
// signed adds), stage 2 the saturated sum. out_valid follows in_valid by two
// clocks and one pixel is accepted per clock. The centre pixel has weight 0
// in both masks and is not used.
module sobel_edge (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  ipu_pkg::pixel_t win [3][3],
  output logic            out_valid,
  output ipu_pkg::pixel_t edge_val
);
  typedef logic signed [10:0] g_t;

  function automatic g_t px(input ipu_pkg::pixel_t p);
    return g_t'({1'b0, p});
  endfunction

  g_t gx_d, gy_d, gx_q, gy_q;
  logic [11:0] mag;
  logic        v1;

  always_comb begin
    gx_d = (px(win[0][2]) - px(win[0][0])) + ((px(win[1][2]) - px(win[1][0])) <<< 1)
         + (px(win[2][2]) - px(win[2][0]));
    gy_d = (px(win[0][0]) - px(win[2][0])) + ((px(win[0][1]) - px(win[2][1])) <<< 1)
         + (px(win[0][2]) - px(win[2][2]));
    mag  = 12'(gx_q[10] ? -gx_q : gx_q) + 12'(gy_q[10] ? -gy_q : gy_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      gx_q      <= '0;
      gy_q      <= '0;
      edge_val  <= '0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (in_valid) begin
        gx_q <= gx_d;
        gy_q <= gy_d;
      end
      if (v1) edge_val <= (mag > 12'd255) ? 8'd255 : mag[7:0];
    end
  end
endmodule
