// term1_comp: eight Term1 computation units (G) of the fractal encoder.
//
// Each unit t accumulates Term1_t = sum_i (r_i - T_t,i)^2 over the N pixels of
// the range, where T_t,i is pixel i of the shrunk domain under spatial
// transformation t: a subtractor, a squarer (array multiplier) and an
// accumulator per unit, the eight units working in parallel on the same
// pixel index. A start pulse clears the accumulators; then idx walks
// 0..N-1, one pixel per cycle, and the caller returns r_pix and t_pix for
// that index combinationally. After N cycles busy falls and done pulses with
// the eight results in term1. flush stops a running accumulation.
// Timing: start in cycle c, pixels in cycles c+1..c+N, done in cycle c+N+1.
// The one-pixel-per-cycle schedule is this design's choice.
module term1_comp
  import fic_pkg::*;
#(
  parameter int R_SIZE = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                flush,
  input  logic                start,
  input  logic [PIX_W-1:0]    r_pix,
  input  logic [PIX_W-1:0]    t_pix [NTRANS],
  output logic [7:0]          idx,
  output logic                busy,
  output logic                done,
  output logic [TERM1_W-1:0]  term1 [NTRANS]
);
  localparam int N = R_SIZE * R_SIZE;

  logic [TERM1_W-1:0] sq [NTRANS];

  always_comb begin
    for (int t = 0; t < NTRANS; t++) begin
      logic signed [PIX_W:0] diff;
      diff  = $signed({1'b0, r_pix}) - $signed({1'b0, t_pix[t]});
      sq[t] = TERM1_W'(diff * diff);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      for (int t = 0; t < NTRANS; t++) term1[t] <= '0;
    end else begin
      done <= 1'b0;
      if (flush) begin
        busy <= 1'b0;
      end else if (start) begin
        busy <= 1'b1;
        idx  <= '0;
        for (int t = 0; t < NTRANS; t++) term1[t] <= '0;
      end else if (busy) begin
        for (int t = 0; t < NTRANS; t++) term1[t] <= term1[t] + sq[t];
        if (idx == 8'(N-1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          idx  <= '0;
        end else begin
          idx <= idx + 8'd1;
        end
      end
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
