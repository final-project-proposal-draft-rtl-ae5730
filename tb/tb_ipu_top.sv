// End-to-end test of ipu_top on a 16 x 12 frame with an irregular camera
// (20 % idle clocks); see ipu_tb_core for what is checked.
module tb_ipu_top;
  ipu_tb_core #(.W(16), .H(12), .FULL(0), .GAP_PCT(20)) core ();
endmodule
