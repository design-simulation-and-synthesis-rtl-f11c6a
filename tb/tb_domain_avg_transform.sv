// tb_domain_avg_transform: slides a domain window along an 8-row strip of a
// random image the way the encoder does (first domain: all eight columns;
// later domains: only the four new columns), loads each domain and checks
// the 2x2-averaged pixels under all eight transforms, read through sel_idx,
// and sum d_i, against values computed here from the strip. Also checks
// win_full, and that flush clears win_full and s2_valid.
module tb_domain_avg_transform;
  import fic_pkg::*;
  localparam int W = 40, L = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, flush = 0, pix_valid = 0, pix_col_end = 0, pix_last = 0, load = 0;
  logic [7:0] pix = 0, sel_idx = 0;
  logic win_full, s2_valid;
  logic [SUM_W-1:0] sum_d;
  logic [PIX_W-1:0] t_pix [NTRANS];
  int checks = 0, failures = 0;
  int img[8][W];

  domain_avg_transform dut (.*);

  function automatic int shr(int x0, int y, int x);
    return (img[2*y][x0+2*x] + img[2*y][x0+2*x+1] + img[2*y+1][x0+2*x] + img[2*y+1][x0+2*x+1]) / 4;
  endfunction

  // expected source of output pixel (y, x) under transform t
  function automatic int exp_pix(int x0, int t, int y, int x);
    case (t)
      0: return shr(x0, y, x);
      1: return shr(x0, 3-x, y);
      2: return shr(x0, 3-y, 3-x);
      3: return shr(x0, x, 3-y);
      4: return shr(x0, 3-y, x);
      5: return shr(x0, y, 3-x);
      6: return shr(x0, x, y);
      default: return shr(x0, 3-x, 3-y);
    endcase
  endfunction

  task automatic fetch(int c0, int c1);
    for (int c = c0; c <= c1; c++)
      for (int r = 0; r < 8; r++) begin
        @(posedge clk);
        pix_valid <= 1; pix <= 8'(img[r][c]); pix_col_end <= (r == 7); pix_last <= (c == c1 && r == 7);
      end
    @(posedge clk);
    pix_valid <= 0; pix_col_end <= 0; pix_last <= 0;
    @(posedge clk);
  endtask

  initial begin
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < W; c++) img[r][c] = (c == 5) ? 255 : int'($urandom % 256);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int dx = 0; dx <= (W-8)/L; dx++) begin
      int x0, es;
      x0 = dx*L;
      if (dx == 0) fetch(0, 7); else fetch(x0+8-L, x0+7);
      checks++;
      if (!win_full) begin failures++; $display("FAIL win_full not set"); end
      load <= 1; @(posedge clk); load <= 0;
      @(negedge clk);
      checks++;
      if (win_full || !s2_valid) begin failures++; $display("FAIL load flags"); end
      es = 0;
      for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) es += shr(x0, y, x);
      checks++;
      if (int'(sum_d) != es) begin failures++; $display("FAIL sum_d %0d want %0d", sum_d, es); end
      for (int i = 0; i < 16; i++) begin
        sel_idx = 8'(i);
        #1;
        for (int t = 0; t < 8; t++) begin
          checks++;
          if (int'(t_pix[t]) != exp_pix(x0, t, i/4, i%4)) begin
            failures++;
            if (failures < 10) $display("FAIL dom %0d t %0d i %0d: %0d want %0d", dx, t, i, t_pix[t], exp_pix(x0, t, i/4, i%4));
          end
        end
      end
    end
    // flush clears the flags
    fetch(0, 7);
    flush <= 1; @(posedge clk); flush <= 0;
    @(negedge clk);
    checks++;
    if (win_full || s2_valid) begin failures++; $display("FAIL flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
