// Testbench for hist_builder with four lanes: random pixels (with a bias
// towards a few grey levels and the extremes 0 and 255) are counted into a
// plain histogram in the bench; after the pass, counter k must equal
// n(0) + ... + n(k) for every bin. A clear must restart the counts.
`include "tb/tb_common.svh"
module tb_hist_builder;
  int checks = 0, failures = 0;
  localparam int NPIX = 1000, LANES = 4;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  ipu_pkg::pixel_t in_pix [LANES];
  logic [7:0] rd_bin = 0;
  logic [9:0] rd_cum;
  int n [256];

  always #5 clk = ~clk;
  hist_builder #(.NPIX(NPIX), .LANES(LANES)) dut (.clk, .rst_n, .clear, .in_valid, .in_pix, .rd_bin, .rd_cum);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  task automatic pass(int npix, bit biased);
    for (int k = 0; k < 256; k++) n[k] = 0;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int i = 0; i < npix / LANES; i++) begin
      while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      for (int l = 0; l < LANES; l++) begin
        in_pix[l] = biased ? ((i % 5 == 0) ? 8'd0 : (i % 7 == 0) ? 8'd255 : 8'(80 + $urandom_range(0, 9)))
                           : 8'($urandom);
        n[in_pix[l]]++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk);
    begin
      int s = 0;
      for (int k = 0; k < 256; k++) begin
        s += n[k];
        rd_bin = 8'(k);
        #1;
        `TB_CHECK(int'(rd_cum) == s, $sformatf("bin %0d: %0d exp %0d", k, rd_cum, s))
      end
    end
  endtask

  initial begin
    in_pix = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    pass(NPIX, 0);
    pass(NPIX, 1);
    pass(400, 0);
    `TB_FINISH
  end
endmodule
