// domain_avg_transform: domain average and transformation module (D).
//
// Three parts, as the document divides the module:
//  1. A 2*R_SIZE x 2*R_SIZE domain window. Pixels arrive one column at a
//     time, top to bottom, through a column shift register; when a column's
//     last pixel (pix_col_end) arrives the whole window shifts one column to
//     the left and takes the new column on the right. Because neighbouring
//     domains on a lattice row overlap, only the columns that are new need to
//     be fetched: the old ones are already in the window. pix_last marks the
//     last pixel of a fetch and sets win_full.
//  2. On load the window is shrunk to R_SIZE x R_SIZE by averaging every 2x2
//     subsquare (4-input add, shift right by 2, truncating) into the
//     stage-2 register, together with sum d_i of the shrunk pixels. Stage 2
//     lets the next domain be fetched while the Term1 units work on this one.
//  3. Eight spatial transformation units: for the pixel index sel_idx chosen
//     by the Term1 units, t_pix[t] is pixel sel_idx of the stage-2 block
//     under transformation t (fic_pkg::trans_src). They are pure wiring and
//     multiplexers; sum d_i is the same for all eight.
// load is a one-cycle pulse and clears win_full; flush clears win_full and
// s2_valid. The window/stage-2 split and the column order are this design's.
module domain_avg_transform
  import fic_pkg::*;
#(
  parameter int R_SIZE = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               flush,
  input  logic               pix_valid,
  input  logic [PIX_W-1:0]   pix,
  input  logic               pix_col_end,
  input  logic               pix_last,
  input  logic               load,
  input  logic [7:0]         sel_idx,
  output logic               win_full,
  output logic               s2_valid,
  output logic [SUM_W-1:0]   sum_d,
  output logic [PIX_W-1:0]   t_pix [NTRANS]
);
  localparam int D_SIZE = 2 * R_SIZE;
  localparam int N      = R_SIZE * R_SIZE;

  logic [PIX_W-1:0] win [D_SIZE][D_SIZE];   // [row][col]
  logic [PIX_W-1:0] col_buf [D_SIZE-1];     // rows 0..D_SIZE-2 of the incoming column
  logic [PIX_W-1:0] shrunk [N];
  logic [SUM_W-1:0] shrunk_sum;
  logic [PIX_W-1:0] s2 [N];

  // 2x2 subsquare averages of the window and their sum
  always_comb begin
    shrunk_sum = '0;
    for (int y = 0; y < R_SIZE; y++) begin
      for (int x = 0; x < R_SIZE; x++) begin
        logic [PIX_W+1:0] s4;
        s4 = (PIX_W+2)'(win[2*y][2*x]) + (PIX_W+2)'(win[2*y][2*x+1])
           + (PIX_W+2)'(win[2*y+1][2*x]) + (PIX_W+2)'(win[2*y+1][2*x+1]);
        shrunk[y*R_SIZE+x] = PIX_W'(s4 >> 2);
        shrunk_sum = shrunk_sum + SUM_W'(shrunk[y*R_SIZE+x]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < D_SIZE; r++)
        for (int c = 0; c < D_SIZE; c++) win[r][c] <= '0;
      for (int r = 0; r < D_SIZE-1; r++) col_buf[r] <= '0;
      for (int i = 0; i < N; i++) s2[i] <= '0;
      sum_d <= '0;
      win_full <= 1'b0;
      s2_valid <= 1'b0;
    end else begin
      if (pix_valid) begin
        if (pix_col_end) begin
          for (int r = 0; r < D_SIZE; r++)
            for (int c = 0; c < D_SIZE-1; c++) win[r][c] <= win[r][c+1];
          for (int r = 0; r < D_SIZE-1; r++) win[r][D_SIZE-1] <= col_buf[r];
          win[D_SIZE-1][D_SIZE-1] <= pix;
        end else begin
          for (int r = 0; r < D_SIZE-2; r++) col_buf[r] <= col_buf[r+1];
          col_buf[D_SIZE-2] <= pix;
        end
      end
      if (flush) begin
        win_full <= 1'b0;
        s2_valid <= 1'b0;
      end else begin
        if (load) begin
          for (int i = 0; i < N; i++) s2[i] <= shrunk[i];
          sum_d <= shrunk_sum;
          s2_valid <= 1'b1;
          win_full <= 1'b0;
        end
        if (pix_valid && pix_last) win_full <= 1'b1;
      end
    end
  end

  // Eight spatial transformation units
  always_comb begin
    for (int t = 0; t < NTRANS; t++)
      t_pix[t] = s2[trans_src(t, int'(sel_idx) / R_SIZE, int'(sel_idx) % R_SIZE, R_SIZE)];
  end

  // The window must not change while a full domain waits to be loaded.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    win_full && !load && !flush |-> !pix_valid);
endmodule
