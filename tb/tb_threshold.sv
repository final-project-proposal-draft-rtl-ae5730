// Testbench for threshold: values just below, at and just above a
// threshold, large negative values and random values, for two thresholds.
`include "tb/tb_common.svh"
module tb_threshold;
  int checks = 0, failures = 0;
  logic signed [51:0] c;
  logic hi, lo;
  localparam longint TH = 64'sd1_000_000_000_000;

  threshold #(.C_W(52), .THRESH(TH)) dut_hi (.c, .is_corner(hi));
  threshold #(.C_W(52), .THRESH(-64'sd5)) dut_lo (.c, .is_corner(lo));

  initial begin
    #100000 failures++; $display("watchdog"); `TB_FINISH
  end

  initial begin
    longint v;
    for (int t = 0; t < 1000; t++) begin
      case (t)
        0: v = TH - 1;
        1: v = TH;
        2: v = TH + 1;
        3: v = -64'sd5;
        4: v = -64'sd4;
        5: v = -(64'sd1 <<< 50);
        default: v = longint'({$urandom, $urandom}) >>> $urandom_range(12, 40);
      endcase
      c = 52'(v);
      #1;
      `TB_CHECK(hi == (v > TH), $sformatf("c=%0d above %0d", v, TH))
      `TB_CHECK(lo == (v > -5), $sformatf("c=%0d above -5", v))
    end
    `TB_FINISH
  end
endmodule
