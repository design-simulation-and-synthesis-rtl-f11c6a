// tb_final_error: builds random range/domain pairs, computes Term1 and Term2
// here, and checks that the module's error equals floor(sum (r-d-K)^2 / 16)
// computed directly, one cycle after in_valid.
module tb_final_error;
  import fic_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, flush = 0, in_valid = 0, out_valid;
  logic [TERM1_W-1:0] min_term1 = '0;
  logic [TIDX_W-1:0] in_tidx = '0, out_tidx;
  dom_tag_t in_tag, out_tag;
  logic [ERR_W-1:0] err;
  int checks = 0, failures = 0;

  final_error dut (.*);

  initial begin
    in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      int r, d, t1, t, direct, kk;
      t1 = 0; t = 0; direct = 0;
      kk = int'($urandom % 64) - 32;
      for (int i = 0; i < 16; i++) begin
        r = int'($urandom % 256);
        d = (n % 2 == 0) ? r - 20 + int'($urandom % 41) : int'($urandom % 256);
        if (d < 0) d = 0;
        if (d > 255) d = 255;
        t1 += (r-d)*(r-d); t += r-d; direct += (r-d-kk)*(r-d-kk);
      end
      @(negedge clk);
      min_term1 = 20'(t1);
      in_tag.term2 = 24'(kk * (16*kk - 2*t));
      in_tag.dom = 12'(n);
      in_tidx = 3'(n);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!(out_valid && err == 20'(direct / 16) && out_tidx == 3'(n) && out_tag.dom == 12'(n))) begin
        failures++;
        $display("FAIL n %0d: err %0d want %0d", n, err, direct / 16);
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
