// hist_equalizer: turns the cumulative histogram into the equalisation LUT.
// For k = 0..255 it reads the cumulative count S(k) and stores
// LUT[k] = min(255, floor(256 * S(k) / NPIX)), i.e. 256 times the normalised
// CDF C(k) = S(k)/(p*q). One divider (by the constant frame size) is shared
// by all 256 entries, one entry per clock. The clamp to 255 is this
// implementation's choice: 256*C(255) = 256 does not fit in 8 bits.
// Interface: start begins a pass (256 clocks, cum_bin/cum_val read the
// histogram combinationally), done pulses one clock after the last entry is
// written. Two combinational LUT read ports: a (image builder) and b (display).
module hist_equalizer #(
  parameter int unsigned NPIX = ipu_pkg::IMG_W * ipu_pkg::IMG_H,
  localparam int unsigned CNT_W = $clog2(NPIX + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic [7:0]       cum_bin,
  input  logic [CNT_W-1:0] cum_val,
  output logic             busy,
  output logic             done,
  input  ipu_pkg::pixel_t  lut_addr_a,
  output ipu_pkg::pixel_t  lut_data_a,
  input  ipu_pkg::pixel_t  lut_addr_b,
  output ipu_pkg::pixel_t  lut_data_b
);
  ipu_pkg::pixel_t   lut_q [ipu_pkg::NBINS];
  logic [7:0]        k;
  logic [CNT_W+8-1:0] scaled;      // 256 * S(k) / NPIX, before the clamp

  assign cum_bin = k;
  assign scaled  = ({cum_val, 8'd0}) / (CNT_W+8)'(NPIX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      k    <= '0;
      for (int j = 0; j < ipu_pkg::NBINS; j++) lut_q[j] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          k    <= '0;
        end
      end else begin
        lut_q[k] <= (scaled > 255) ? 8'd255 : scaled[7:0];
        k        <= k + 1'b1;
        if (k == 8'd255) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign lut_data_a = lut_q[lut_addr_a];
  assign lut_data_b = lut_q[lut_addr_b];
endmodule
