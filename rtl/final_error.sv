// final_error: final error computation module (I) of the fractal encoder.
//
// E_min = (Min_Term1 + Term2) / N, the mean squared error of the best
// transform of this domain with the quantized offset K. The sum is never
// negative, since it equals sum (r_i - d_i - K)^2; the division by N is a
// right shift (truncating). A negative sum, impossible for consistent inputs,
// is clamped to zero. Registered: out_valid follows in_valid by one cycle,
// carrying the transform number and the domain tag. flush drops a result.
module final_error
  import fic_pkg::*;
#(
  parameter int R_SIZE = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               flush,
  input  logic               in_valid,
  input  logic [TERM1_W-1:0] min_term1,
  input  logic [TIDX_W-1:0]  in_tidx,
  input  dom_tag_t           in_tag,
  output logic               out_valid,
  output logic [ERR_W-1:0]   err,
  output logic [TIDX_W-1:0]  out_tidx,
  output dom_tag_t           out_tag
);
  localparam int LOG_N = $clog2(R_SIZE * R_SIZE);

  logic signed [TERM2_W:0] total;

  always_comb total = $signed({1'b0, (TERM2_W)'(min_term1)}) + (TERM2_W+1)'(in_tag.term2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      err <= '0;
      out_tidx <= '0;
      out_tag <= '0;
    end else begin
      out_valid <= in_valid && !flush;
      if (in_valid) begin
        err      <= (total < 0) ? '0 : ERR_W'(total >>> LOG_N);
        out_tidx <= in_tidx;
        out_tag  <= in_tag;
      end
    end
  end
endmodule
