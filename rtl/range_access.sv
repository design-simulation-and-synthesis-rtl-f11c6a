// range_access: range access module (C) of the fractal encoder.
//
// Holds the N = R_SIZE^2 pixels of the current range block in registers and
// sums them. Pixels arrive with wr_en and their raster index wr_idx; index 0
// restarts the sum, so after the range's last pixel sum_r holds sum r_i
// (16 bits, as printed in the block diagram). rd_idx reads a stored pixel
// combinationally, which is how the Term1 units receive r_i, one index per
// cycle. Both tasks are those the document gives the module; the write
// interface is this design's choice.
module range_access
  import fic_pkg::*;
#(
  parameter int R_SIZE = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [7:0]         wr_idx,
  input  logic [PIX_W-1:0]   wr_pix,
  input  logic [7:0]         rd_idx,
  output logic [PIX_W-1:0]   r_pix,
  output logic [SUM_W-1:0]   sum_r
);
  localparam int N = R_SIZE * R_SIZE;

  logic [PIX_W-1:0] r [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) r[i] <= '0;
      sum_r <= '0;
    end else if (wr_en) begin
      r[wr_idx[$clog2(N)-1:0]] <= wr_pix;
      sum_r <= (wr_idx == 8'd0) ? SUM_W'(wr_pix) : sum_r + SUM_W'(wr_pix);
    end
  end

  assign r_pix = r[rd_idx[$clog2(N)-1:0]];
endmodule
