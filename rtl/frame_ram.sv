// frame_ram: frame store with one write port and two synchronous read ports.
// Used as the internal memory (captured frame), the buffer memory (equalised
// frame) and the result stores of the edge and corner filters. A 640x480
// 8-bit frame is 307.2 KB, the size the capture stage needs.
// Port A serves the processing pipeline, port B the display; both return the
// word one clock after the address (block-RAM style). A read of the address
// being written returns the old word. Contents are not reset.
module frame_ram #(
  parameter int unsigned DEPTH = 640*480,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re_a,
  input  logic [AW-1:0]    raddr_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic             re_b,
  input  logic [AW-1:0]    raddr_b,
  output logic [WIDTH-1:0] rdata_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re_a) rdata_a <= mem[raddr_a];
    if (re_b) rdata_b <= mem[raddr_b];
  end
endmodule
