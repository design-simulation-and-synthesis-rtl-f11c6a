// tb_kd_comp: checks T, K_d and K for random and extreme range/domain sums
// against floor division computed with integer arithmetic here.
module tb_kd_comp;
  logic [15:0] sum_r, sum_d;
  logic signed [16:0] t_diff;
  logic signed [9:0] kd, k;
  int checks = 0, failures = 0;

  kd_comp dut (.*);

  function automatic int floordiv(int a, int b);
    int q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int sr, sd, t, ko, ekd;
      sr = int'($urandom % 4081);
      sd = int'($urandom % 4081);
      if (n == 0) begin sr = 4080; sd = 0; end
      if (n == 1) begin sr = 0; sd = 4080; end
      if (n == 2) begin sr = 17; sd = 18; end
      sum_r = 16'(sr); sum_d = 16'(sd);
      #1;
      t = sr - sd;
      ko = floordiv(t, 16);
      ekd = floordiv(ko, 4);
      checks++;
      if (int'(t_diff) != t || int'(kd) != ekd || int'(k) != ekd * 4) begin
        failures++;
        $display("FAIL sr %0d sd %0d: t %0d kd %0d k %0d, want %0d %0d %0d", sr, sd, t_diff, kd, k, t, ekd, ekd*4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
