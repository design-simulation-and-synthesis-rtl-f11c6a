// min_term1: Min_Term1 computation module (H) of the fractal encoder.
//
// Picks the smallest of the eight Term1 values and the number of the
// transformation that produced it. Since Term2 is common to all eight
// transforms, the transform with the smallest Term1 also has the smallest
// error. A compare tree of three levels; on a tie the lower transform number
// wins. The result is registered: out_valid follows in_valid by one cycle,
// and the domain's tag is carried along. flush drops a result in flight.
module min_term1
  import fic_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               flush,
  input  logic               in_valid,
  input  logic [TERM1_W-1:0] term1 [NTRANS],
  input  dom_tag_t           in_tag,
  output logic               out_valid,
  output logic [TERM1_W-1:0] min_val,
  output logic [TIDX_W-1:0]  min_idx,
  output dom_tag_t           out_tag
);
  logic [TERM1_W-1:0] v1 [4], v2 [2], v3;
  logic [TIDX_W-1:0]  i1 [4], i2 [2], i3;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      if (term1[2*k+1] < term1[2*k]) begin
        v1[k] = term1[2*k+1]; i1[k] = TIDX_W'(2*k+1);
      end else begin
        v1[k] = term1[2*k];   i1[k] = TIDX_W'(2*k);
      end
    end
    for (int k = 0; k < 2; k++) begin
      if (v1[2*k+1] < v1[2*k]) begin
        v2[k] = v1[2*k+1]; i2[k] = i1[2*k+1];
      end else begin
        v2[k] = v1[2*k];   i2[k] = i1[2*k];
      end
    end
    if (v2[1] < v2[0]) begin
      v3 = v2[1]; i3 = i2[1];
    end else begin
      v3 = v2[0]; i3 = i2[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      min_val <= '0;
      min_idx <= '0;
      out_tag <= '0;
    end else begin
      out_valid <= in_valid && !flush;
      if (in_valid) begin
        min_val <= v3;
        min_idx <= i3;
        out_tag <= in_tag;
      end
    end
  end
endmodule
