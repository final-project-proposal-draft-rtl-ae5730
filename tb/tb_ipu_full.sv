// End-to-end test of ipu_top at its default 640 x 480 frame size, camera at
// full rate; see ipu_tb_core for what is checked.
module tb_ipu_full;
  ipu_tb_core #(.W(640), .H(480), .FULL(1), .GAP_PCT(0)) core ();
endmodule
