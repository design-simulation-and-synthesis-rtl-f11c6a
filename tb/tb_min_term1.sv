// tb_min_term1: random sets of eight Term1 values, including ties and equal
// sets, checked against a linear scan (lowest index wins a tie); the tag must
// pass through, out_valid must follow in_valid one cycle later, and flush
// must drop a result.
module tb_min_term1;
  import fic_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, flush = 0, in_valid = 0, out_valid;
  logic [TERM1_W-1:0] term1 [NTRANS];
  logic [TERM1_W-1:0] min_val;
  logic [TIDX_W-1:0] min_idx;
  dom_tag_t in_tag, out_tag;
  int checks = 0, failures = 0;

  min_term1 dut (.*);

  initial begin
    for (int t = 0; t < 8; t++) term1[t] = '0;
    in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      int v[8], mv, mi;
      for (int t = 0; t < 8; t++) begin
        v[t] = (n % 5 == 0) ? int'($urandom % 4) : int'($urandom % (1 << 20));
        if (n == 7) v[t] = 1040400;
      end
      mv = v[0]; mi = 0;
      for (int t = 1; t < 8; t++) if (v[t] < mv) begin mv = v[t]; mi = t; end
      @(negedge clk);
      for (int t = 0; t < 8; t++) term1[t] = 20'(v[t]);
      in_valid = 1;
      in_tag.dom = 12'(n);
      flush = (n % 97 == 5);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (flush) begin
        if (out_valid) begin failures++; $display("FAIL flush ignored"); end
      end else if (!(out_valid && min_val == 20'(mv) && min_idx == 3'(mi) && out_tag.dom == 12'(n))) begin
        failures++;
        $display("FAIL n %0d: %0d/%0d want %0d/%0d", n, min_val, min_idx, mv, mi);
      end
      flush = 0;
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
