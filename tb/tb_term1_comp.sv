// tb_term1_comp: the eight Term1 units against sums computed here. The
// testbench plays the range registers and transform units: it returns r_i
// and eight T_t,i for the index the module asks for. Checks the eight
// results, the N-cycle pass (done exactly 17 cycles after start), busy, and
// that flush abandons a pass without a done pulse.
module tb_term1_comp;
  import fic_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, flush = 0, start = 0;
  logic [PIX_W-1:0] r_pix, t_pix [NTRANS];
  logic [7:0] idx;
  logic busy, done;
  logic [TERM1_W-1:0] term1 [NTRANS];
  int checks = 0, failures = 0;
  int r[16], tv[8][16];

  term1_comp dut (.*);

  always_comb begin
    r_pix = 8'(r[idx[3:0]]);
    for (int t = 0; t < 8; t++) t_pix[t] = 8'(tv[t][idx[3:0]]);
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      r[i] = 0;
      for (int t = 0; t < 8; t++) tv[t][i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      int e[8], cyc;
      for (int i = 0; i < 16; i++) begin
        r[i] = (n == 1) ? 255 : int'($urandom % 256);
        for (int t = 0; t < 8; t++) tv[t][i] = (n == 1) ? 0 : int'($urandom % 256);
      end
      for (int t = 0; t < 8; t++) begin
        e[t] = 0;
        for (int i = 0; i < 16; i++) e[t] += (r[i]-tv[t][i])*(r[i]-tv[t][i]);
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      if (n % 50 == 7) begin
        repeat (5) @(negedge clk);
        flush = 1; @(negedge clk); flush = 0;
        checks++;
        repeat (20) begin
          if (done || busy) begin failures++; $display("FAIL flush"); break; end
          @(negedge clk);
        end
        continue;
      end
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 17) begin failures++; $display("FAIL latency %0d", cyc); end
      for (int t = 0; t < 8; t++) begin
        checks++;
        if (int'(term1[t]) != e[t]) begin failures++; $display("FAIL n %0d t %0d: %0d want %0d", n, t, term1[t], e[t]); end
      end
    end
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
