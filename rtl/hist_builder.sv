// hist_builder: cumulative intensity histogram built with a switching decoder.
// Each incoming pixel value p is decoded into a thermometer code that is 1 for
// every bin j >= p, and every bin counter adds its code bit. After a frame,
// counter j therefore holds sum_{i<=j} n(i): the histogram and the running
// sum the equaliser needs are produced in the same pass, with nothing but
// increments. LANES pixels can be accepted per clock (parallel copies of the
// decoder feeding one adder per bin), which divides the pass time by LANES.
// Interface: clear zeroes all counters; in_valid/in_pix add LANES pixels;
// rd_bin/rd_cum read one counter combinationally. A clear and a pixel in the
// same clock: the clear wins. Counters are wide enough for NPIX pixels.
module hist_builder #(
  parameter int unsigned NPIX  = ipu_pkg::IMG_W * ipu_pkg::IMG_H,
  parameter int unsigned LANES = 1,
  localparam int unsigned CNT_W = $clog2(NPIX + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              in_valid,
  input  ipu_pkg::pixel_t   in_pix [LANES],
  input  logic [7:0]        rd_bin,
  output logic [CNT_W-1:0]  rd_cum
);
  localparam int unsigned NB = ipu_pkg::NBINS;
  localparam int unsigned LW = $clog2(LANES + 1);

  logic [CNT_W-1:0] cum_q [NB];
  logic [LW-1:0]    inc   [NB];   // pixels of this clock with value <= bin

  // switching decoder: one thermometer code per lane, summed per bin
  always_comb begin
    for (int j = 0; j < NB; j++) begin
      inc[j] = '0;
      for (int l = 0; l < LANES; l++)
        if (32'(in_pix[l]) <= j) inc[j] = inc[j] + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NB; j++) cum_q[j] <= '0;
    end else if (clear) begin
      for (int j = 0; j < NB; j++) cum_q[j] <= '0;
    end else if (in_valid) begin
      for (int j = 0; j < NB; j++) cum_q[j] <= cum_q[j] + CNT_W'(inc[j]);
    end
  end

  assign rd_cum = cum_q[rd_bin];
endmodule
