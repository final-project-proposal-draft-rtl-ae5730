// Testbench for hist_eq_unit on a 12 x 8 frame held in a bench memory with
// one clock of read latency. The frame uses a narrow band of grey levels
// (low contrast). The memory model returns four-pixel groups for the
// histogram pass (LANES = 4). After start, every buffer-memory address must be written
// once with min(255, floor(256 * #(pixels <= p) / 96)) for the pixel p at
// that address; the run must take N/4 + N + 256 + a few clocks; the display
// lookup must give the same mapping. Two different frames are processed.
`include "tb/tb_common.svh"
module tb_hist_eq_unit;
  int checks = 0, failures = 0;
  localparam int W = 12, H = 8, N = W * H, LANES = 4;
  logic clk = 0, rst_n = 0, start = 0, mem_re, buf_we, busy, done;
  logic [6:0] mem_raddr, buf_waddr;
  ipu_pkg::pixel_t mem_rdata, buf_wdata, disp_pix = 0, disp_eq;
  ipu_pkg::pixel_t mem_rdata_wide [LANES];
  ipu_pkg::pixel_t frame [N];
  ipu_pkg::pixel_t outbuf [N];
  int writes [N];

  always #5 clk = ~clk;
  hist_eq_unit #(.W(W), .H(H), .LANES(LANES)) dut (.clk, .rst_n, .start, .mem_re, .mem_raddr, .mem_rdata, .mem_rdata_wide,
                                    .buf_we, .buf_waddr, .buf_wdata, .disp_pix, .disp_eq, .busy, .done);

  always @(posedge clk) begin
    if (mem_re) begin
      mem_rdata <= frame[mem_raddr];
      for (int l = 0; l < LANES; l++) mem_rdata_wide[l] <= frame[(int'(mem_raddr) / LANES) * LANES + l];
    end
    if (buf_we) begin
      outbuf[buf_waddr] <= buf_wdata;
      writes[buf_waddr] <= writes[buf_waddr] + 1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  function automatic int expect_of(ipu_pkg::pixel_t p);
    int cnt = 0;
    for (int i = 0; i < N; i++) if (frame[i] <= p) cnt++;
    return ((256 * cnt) / N > 255) ? 255 : (256 * cnt) / N;
  endfunction

  task automatic run(int base, int spread);
    int cycles = 1;
    for (int i = 0; i < N; i++) begin
      frame[i] = 8'(base + $urandom_range(0, spread));
      writes[i] = 0;
    end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin @(negedge clk); cycles++; end
    `TB_CHECK(cycles >= N/LANES + N + 256 && cycles <= N/LANES + N + 256 + 8, $sformatf("took %0d clocks", cycles))
    for (int i = 0; i < N; i++) begin
      `TB_CHECK(writes[i] == 1, "each address written once")
      `TB_CHECK(int'(outbuf[i]) == expect_of(frame[i]),
                $sformatf("pixel %0d: %0d -> %0d exp %0d", i, frame[i], outbuf[i], expect_of(frame[i])))
    end
    for (int i = 0; i < N; i += 7) begin
      disp_pix = frame[i];
      #1;
      `TB_CHECK(int'(disp_eq) == expect_of(frame[i]), "display lookup")
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(100, 20);
    run(0, 255);
    `TB_FINISH
  end
endmodule
