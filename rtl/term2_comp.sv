// term2_comp: Term2 computation module (F) of the fractal encoder.
//
// Term2 = K * (K*N - 2*T), with T = sum r - sum d and K the quantized offset,
// so that sum (r_i - d_i - K)^2 = Term1 + Term2 exactly. It is computed once
// per domain and shared by the eight transforms. First the factor
// I = K*N - 2T (a shift and a subtraction), then one multiplication.
// Combinational. The block diagram draws the same two steps with the factor
// scaled by 1/N (I = K - 2T/N); this design keeps the unscaled integer form
// of the document's equation so that no bits are lost to the division.
module term2_comp
  import fic_pkg::*;
#(
  parameter int R_SIZE = 4
) (
  input  logic signed [KD_W-1:0]    k,
  input  logic signed [SUM_W:0]     t_diff,
  output logic signed [TERM2_W-1:0] i_fac,
  output logic signed [TERM2_W-1:0] term2
);
  localparam int LOG_N = $clog2(R_SIZE * R_SIZE);

  always_comb begin
    i_fac = (TERM2_W'(k) <<< LOG_N) - (TERM2_W'(t_diff) <<< 1);
    term2 = TERM2_W'(k) * i_fac;
  end
endmodule
