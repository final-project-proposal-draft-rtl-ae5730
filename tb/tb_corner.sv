// Testbench for corner: random sums, one per clock, with gaps. Each result
// must appear exactly three clocks after its input and equal
// sxx*syy - sxy^2 - floor(3*(sxx+syy)^2 / 64) computed in the bench.
`include "tb/tb_common.svh"
module tb_corner;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [24:0] sxx = 0, syy = 0, sxy = 0;
  logic signed [51:0] c;
  longint exp_q [$];
  int     due_q [$];
  int     cyc = 0;

  always #5 clk = ~clk;
  corner dut (.clk, .rst_n, .in_valid, .sxx, .syy, .sxy, .out_valid, .c);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  function automatic longint model(longint a, longint b, longint x);
    longint t = a + b;
    longint kt = (t * t * 3);
    kt = kt >>> 6;
    return a * b - x * x - kt;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      `TB_CHECK(exp_q.size() > 0, "unexpected result")
      if (exp_q.size() > 0) begin
        `TB_CHECK(due_q[0] == cyc, $sformatf("latency: result at %0d, due %0d", cyc, due_q[0]))
        `TB_CHECK(longint'(c) == exp_q[0], $sformatf("c %0d exp %0d", c, exp_q[0]))
        void'(exp_q.pop_front());
        void'(due_q.pop_front());
      end
    end
    if (rst_n && in_valid) begin
      exp_q.push_back(model(longint'(sxx), longint'(syy), longint'(sxy)));
      due_q.push_back(cyc + 3);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      if (t == 0) begin
        sxx = 25'sd9363600; syy = 25'sd9363600; sxy = -25'sd9363600;
      end else begin
        sxx = 25'($urandom_range(0, 9363600));
        syy = 25'($urandom_range(0, 9363600));
        sxy = 25'($signed($urandom_range(0, 2*9363600)) - 9363600);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(negedge clk);
    `TB_CHECK(exp_q.size() == 0, "all results delivered")
    `TB_FINISH
  end
endmodule
