// input_buffer: one camera line of pixels. The capture stage owns two of them
// and alternates: one fills from the camera while the other is copied into
// the frame memory. Writing and reading are independent; a read returns the
// pixel one clock after the address. The one-line depth is this
// implementation's choice; the design description only names the buffers.
module input_buffer #(
  parameter int unsigned LINE = 640,
  localparam int unsigned AW = $clog2(LINE)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  ipu_pkg::pixel_t wdata,
  input  logic [AW-1:0] raddr,
  output ipu_pkg::pixel_t rdata
);
  ipu_pkg::pixel_t line_q [LINE];

  always_ff @(posedge clk) begin
    if (we) line_q[waddr] <= wdata;
    rdata <= line_q[raddr];
  end
endmodule
