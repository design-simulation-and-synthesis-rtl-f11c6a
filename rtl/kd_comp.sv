// kd_comp: K_d computation module (E) of the fractal encoder.
//
// The grey-level offset that minimises the matching error is the same for
// all eight transforms: K_o = (sum r_i - sum d_i) / N. The module forms
// T = sum r - sum d, divides by N = R_SIZE^2 with an arithmetic right shift
// (the block diagram's ">>"), and quantizes K_o by dividing by STEP_SIZE, again
// a shift, giving K_d; K = K_d * STEP_SIZE is the offset actually coded.
// Purely combinational. Both shifts round towards minus infinity; the
// document does not say how they round, nor what STEP_SIZE is (4 here, a
// power of two so the division is a shift).
module kd_comp
  import fic_pkg::*;
#(
  parameter int R_SIZE    = 4,
  parameter int STEP_SIZE = 4
) (
  input  logic [SUM_W-1:0]          sum_r,
  input  logic [SUM_W-1:0]          sum_d,
  output logic signed [SUM_W:0]     t_diff,
  output logic signed [KD_W-1:0]    kd,
  output logic signed [KD_W-1:0]    k
);
  localparam int LOG_N    = $clog2(R_SIZE * R_SIZE);
  localparam int LOG_STEP = $clog2(STEP_SIZE);

  logic signed [SUM_W:0] k_o;

  always_comb begin
    t_diff = $signed({1'b0, sum_r}) - $signed({1'b0, sum_d});
    k_o    = t_diff >>> LOG_N;
    kd     = KD_W'(k_o >>> LOG_STEP);
    k      = KD_W'((k_o >>> LOG_STEP) <<< LOG_STEP);
  end
endmodule
