// Testbench for sobel_edge: random and extreme 3x3 blocks, one per clock;
// each edge value must appear two clocks after its block (one result per
// clock) and equal min(255, |Gx| + |Gy|) from the two masks.
`include "tb/tb_common.svh"
module tb_sobel_edge;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  ipu_pkg::pixel_t win [3][3];
  ipu_pkg::pixel_t edge_val;
  int exp_q [$];
  int due_q [$];
  int cyc = 0, sat = 0;

  always #5 clk = ~clk;
  sobel_edge dut (.clk, .rst_n, .in_valid, .win, .out_valid, .edge_val);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  function automatic int model();
    int gx, gy, m;
    gx = int'(win[0][2]) - int'(win[0][0]) + 2*(int'(win[1][2]) - int'(win[1][0])) + int'(win[2][2]) - int'(win[2][0]);
    gy = int'(win[0][0]) - int'(win[2][0]) + 2*(int'(win[0][1]) - int'(win[2][1])) + int'(win[0][2]) - int'(win[2][2]);
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return m > 255 ? 255 : m;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      `TB_CHECK(exp_q.size() > 0, "unexpected result")
      if (exp_q.size() > 0) begin
        `TB_CHECK(due_q[0] == cyc, $sformatf("latency: at %0d due %0d", cyc, due_q[0]))
        `TB_CHECK(int'(edge_val) == exp_q[0], $sformatf("edge %0d exp %0d", edge_val, exp_q[0]))
        if (exp_q[0] == 255) sat++;
        void'(exp_q.pop_front());
        void'(due_q.pop_front());
      end
    end
    if (rst_n && in_valid) begin
      exp_q.push_back(model());
      due_q.push_back(cyc + 2);
    end
  end

  initial begin
    win = '{default: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = (t < 100) || ($urandom_range(0, 3) != 0);   // a burst, then gaps
      for (int r = 0; r < 3; r++)
        for (int cc = 0; cc < 3; cc++)
          // small-contrast blocks keep the sum below 255
          win[r][cc] = (t % 3 == 0) ? 8'(100 + $urandom_range(0, 20)) : 8'($urandom);
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(negedge clk);
    `TB_CHECK(exp_q.size() == 0, "all results delivered")
    `TB_CHECK(sat > 0, "saturation exercised")
    `TB_FINISH
  end
endmodule
