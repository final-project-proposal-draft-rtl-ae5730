// corner: Harris cornerness c = sxx*syy - sxy^2 - k*(sxx+syy)^2, i.e.
// Det(G) - k*trace(G)^2, as a three-register pipeline:
//   stage 1: sxy^2, sxx*syy and sxx+syy;
//   stage 2: (sxx+syy)^2, the two products carried along;
//   stage 3: k*(sxx+syy)^2, the two products carried along;
// then one combinational three-input add/subtract gives c. out_valid and c
// follow in_valid by three clocks, one result per clock.
// k is the fixed-point fraction K_NUM / 2^K_FRAC (default 3/64 = 0.047, in
// the usual Harris range 0.04 to 0.06); the product is truncated towards
// minus infinity by an arithmetic shift.
module corner #(
  parameter int unsigned SUM_W  = 25,
  parameter int unsigned K_NUM  = 3,
  parameter int unsigned K_FRAC = 6,
  localparam int unsigned C_W   = 2*SUM_W + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [SUM_W-1:0] sxx,
  input  logic signed [SUM_W-1:0] syy,
  input  logic signed [SUM_W-1:0] sxy,
  output logic                    out_valid,
  output logic signed [C_W-1:0]   c
);
  typedef logic signed [C_W-1:0]       wide_t;
  typedef logic signed [C_W+16-1:0]    kprod_t;

  logic [2:0] v_q;
  wide_t xy2_1, det_1, xy2_2, det_2, xy2_3, det_3;
  wide_t tr_1, tr2_2, ktr2_3;
  kprod_t kp;

  assign kp = kprod_t'(tr2_2) * kprod_t'(K_NUM);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
      {xy2_1, det_1, tr_1, xy2_2, det_2, tr2_2, xy2_3, det_3, ktr2_3} <= '0;
    end else begin
      v_q <= {v_q[1:0], in_valid};
      // stage 1
      xy2_1 <= wide_t'(sxy) * wide_t'(sxy);
      det_1 <= wide_t'(sxx) * wide_t'(syy);
      tr_1  <= wide_t'(sxx) + wide_t'(syy);
      // stage 2
      xy2_2 <= xy2_1;
      det_2 <= det_1;
      tr2_2 <= tr_1 * tr_1;
      // stage 3
      xy2_3  <= xy2_2;
      det_3  <= det_2;
      ktr2_3 <= wide_t'(kp >>> K_FRAC);
    end
  end

  assign out_valid = v_q[2];
  assign c = det_3 - xy2_3 - ktr2_3;
endmodule
