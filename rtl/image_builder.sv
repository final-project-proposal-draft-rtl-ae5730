// image_builder: produces the equalised image. Each pixel of the original
// frame is replaced by the LUT entry of its grey level, K_new = 256*C(k)
// (clamped). The pixel's frame address travels with it.
// Interface: in_valid/in_addr/in_pix; lut_addr/lut_data go to a combinational
// LUT read port; out_valid/out_addr/out_pix follow one clock later.
module image_builder #(
  parameter int unsigned AW = $clog2(ipu_pkg::IMG_W * ipu_pkg::IMG_H)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [AW-1:0]   in_addr,
  input  ipu_pkg::pixel_t in_pix,
  output ipu_pkg::pixel_t lut_addr,
  input  ipu_pkg::pixel_t lut_data,
  output logic            out_valid,
  output logic [AW-1:0]   out_addr,
  output ipu_pkg::pixel_t out_pix
);
  assign lut_addr = in_pix;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_addr  <= '0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_addr <= in_addr;
        out_pix  <= lut_data;
      end
    end
  end
endmodule
