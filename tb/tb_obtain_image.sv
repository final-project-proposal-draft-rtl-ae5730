// Testbench for obtain_image: a camera model sends 10 x 6 frames
// continuously, with random idle clocks and also back to back, and marks the
// first pixel with cam_sof. After a snapshot request, the stage must write
// exactly the next complete frame to memory, each address once, and then
// pulse done; both line buffers must be used.
`include "tb/tb_common.svh"
module tb_obtain_image;
  int checks = 0, failures = 0;
  localparam int W = 10, H = 6;
  logic clk = 0, rst_n = 0, snap = 0, cam_valid = 0, cam_sof = 0;
  ipu_pkg::pixel_t cam_pix = 0;
  logic mem_we, busy, done;
  logic [5:0] mem_waddr;
  ipu_pkg::pixel_t mem_wdata;
  ipu_pkg::pixel_t mem [W*H];
  int writes [W*H];
  int frame_no = 0, n_done = 0, gap_pct = 50;
  bit used_buf [2];

  always #5 clk = ~clk;
  obtain_image #(.W(W), .H(H)) dut (.clk, .rst_n, .snap, .cam_valid, .cam_sof, .cam_pix,
                                    .mem_we, .mem_waddr, .mem_wdata, .busy, .done);

  function automatic ipu_pkg::pixel_t f(int fr, int i); return 8'(fr * 61 + i * 3); endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  // camera: endless frames
  initial begin
    @(posedge rst_n);
    forever begin
      for (int i = 0; i < W*H; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 99) < gap_pct) begin cam_valid = 0; cam_sof = 0; @(negedge clk); end
        cam_valid = 1; cam_sof = (i == 0); cam_pix = f(frame_no, i);
      end
      frame_no++;
    end
  end

  always @(posedge clk) begin
    if (mem_we) begin
      mem[mem_waddr] <= mem_wdata;
      writes[mem_waddr] <= writes[mem_waddr] + 1;
    end
    if (done) n_done <= n_done + 1;
    if (dut.take) used_buf[dut.fill_sel] <= 1'b1;
  end

  task automatic one_snapshot();
    int fr;
    for (int i = 0; i < W*H; i++) writes[i] = 0;
    @(negedge clk) snap = 1;
    @(negedge clk) snap = 0;
    // the captured frame is the first one starting after the request
    while (!(cam_valid && cam_sof)) @(negedge clk);
    fr = frame_no;
    while (!done) @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < W*H; i++) begin
      `TB_CHECK(writes[i] == 1, $sformatf("address %0d written %0d times", i, writes[i]))
      `TB_CHECK(mem[i] == f(fr, i), $sformatf("pixel %0d = %0d exp %0d", i, mem[i], f(fr, i)))
    end
    `TB_CHECK(!busy, "idle after done")
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (17) @(negedge clk);
    one_snapshot();
    gap_pct = 0;                 // camera at full rate
    repeat (23) @(negedge clk);
    one_snapshot();
    `TB_CHECK(n_done == 2, "one done per snapshot")
    `TB_CHECK(used_buf[0] && used_buf[1], "both line buffers used")
    `TB_FINISH
  end
endmodule
