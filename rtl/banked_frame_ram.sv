// banked_frame_ram: frame store split into LANES interleaved banks, so that
// LANES neighbouring pixels can be read in one clock. Pixel address a lives
// in bank a % LANES at word a / LANES (LANES is a power of two). Each bank is
// a frame_ram with one write and two read ports.
// Port A serves the processing side and returns, one clock after raddr_a,
// both the pixel at raddr_a (rdata_a) and the whole LANES-pixel group that
// contains it (rdata_a_wide, element l = pixel (raddr_a & ~(LANES-1)) + l).
// The histogram pass uses the group, everything else the single pixel.
// Port B (display) returns the pixel at raddr_b one clock later.
// The interleaving is this implementation's way of giving the histogram
// builder the several pixels per clock that its parallel counters need.
module banked_frame_ram #(
  parameter int unsigned DEPTH = 640*480,
  parameter int unsigned LANES = 4,
  localparam int unsigned AW  = $clog2(DEPTH),
  localparam int unsigned BW  = (LANES > 1) ? $clog2(LANES) : 1,
  localparam int unsigned WAW = (DEPTH / LANES > 1) ? $clog2(DEPTH / LANES) : 1
) (
  input  logic            clk,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  ipu_pkg::pixel_t wdata,
  input  logic            re_a,
  input  logic [AW-1:0]   raddr_a,
  output ipu_pkg::pixel_t rdata_a,
  output ipu_pkg::pixel_t rdata_a_wide [LANES],
  input  logic            re_b,
  input  logic [AW-1:0]   raddr_b,
  output ipu_pkg::pixel_t rdata_b
);
  ipu_pkg::pixel_t rd_b [LANES];
  logic [BW-1:0]   sel_a, sel_b;

  function automatic logic [BW-1:0] bank_of(logic [AW-1:0] a);
    return (LANES > 1) ? BW'(a % LANES) : '0;
  endfunction

  function automatic logic [WAW-1:0] word_of(logic [AW-1:0] a);
    return WAW'(a / LANES);
  endfunction

  for (genvar b = 0; b < LANES; b++) begin : g_bank
    frame_ram #(.DEPTH(DEPTH / LANES), .WIDTH(8)) u_ram (
      .clk     (clk),
      .we      (we && bank_of(waddr) == BW'(b)),
      .waddr   (word_of(waddr)),
      .wdata   (wdata),
      .re_a    (re_a),
      .raddr_a (word_of(raddr_a)),
      .rdata_a (rdata_a_wide[b]),
      .re_b    (re_b),
      .raddr_b (word_of(raddr_b)),
      .rdata_b (rd_b[b])
    );
  end

  // bank selects follow the one-clock read latency
  always_ff @(posedge clk) begin
    if (re_a) sel_a <= bank_of(raddr_a);
    if (re_b) sel_b <= bank_of(raddr_b);
  end

  assign rdata_a = rdata_a_wide[sel_a];
  assign rdata_b = rd_b[sel_b];

  initial assert ((LANES & (LANES - 1)) == 0 && DEPTH % LANES == 0)
    else $error("banked_frame_ram: LANES must be a power of two dividing DEPTH");
endmodule
