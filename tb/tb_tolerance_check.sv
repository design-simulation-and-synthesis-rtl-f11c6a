// tb_tolerance_check: feeds searches of random length (random errors, some
// below the threshold) and checks the issued code against a software
// version of the search rule: first domain with E < Thresh wins (matched),
// otherwise the smallest E, earliest on a tie, after the last domain. Also
// checks that nothing is issued in between and that clear forgets the best.
module tb_tolerance_check;
  import fic_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, clear = 0, in_valid = 0;
  logic [ERR_W-1:0] thresh = '0, err = '0;
  logic [TIDX_W-1:0] tidx = '0;
  dom_tag_t tag;
  logic code_valid, matched;
  logic [DIDX_W+TIDX_W-1:0] mapping_no;
  logic signed [KD_W-1:0] code_kd;
  logic [ERR_W-1:0] code_err;
  int checks = 0, failures = 0;

  tolerance_check dut (.*);

  initial begin
    tag = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 400; s++) begin
      int nd, th, bm, be, bk, got;
      bit hit, have;
      nd = 1 + int'($urandom % 12);
      th = (s % 4 == 0) ? 0 : int'($urandom % 200);
      hit = 0; have = 0; bm = 0; be = 0; bk = 0;
      @(negedge clk);
      thresh = 20'(th);
      if (s % 5 == 0) begin
        // stale best from an abandoned search must be forgotten
        in_valid = 1; err = 20'd0; tag.last = 0; tag.dom = 12'd99; tidx = 0;
        thresh = 20'd0;
        @(negedge clk);
        in_valid = 0; clear = 1;
        @(negedge clk);
        clear = 0; thresh = 20'(th);
      end
      got = 0;
      for (int d = 0; d < nd && !hit; d++) begin
        int e, t, kd;
        e = int'($urandom % 1000);
        if (d == 3 && s % 3 == 1) e = 5;
        t = int'($urandom % 8); kd = int'($urandom % 128) - 64;
        in_valid = 1; err = 20'(e); tidx = 3'(t);
        tag.dom = 12'(d); tag.last = (d == nd-1); tag.kd = 10'(kd);
        if (e < th) begin
          hit = 1; bm = d*8+t; be = e; bk = kd;
        end else if (!have || e < be) begin
          have = 1; bm = d*8+t; be = e; bk = kd;
        end
        @(negedge clk);
        in_valid = 0;
        if (code_valid) got++;
        if (!hit && d != nd-1) begin
          checks++;
          if (code_valid) begin failures++; $display("FAIL early code"); end
        end
      end
      checks++;
      if (!(got == 1 && code_valid && matched == hit && int'(mapping_no) == bm &&
            int'(code_err) == be && int'(code_kd) == bk)) begin
        failures++;
        $display("FAIL search %0d: valid %0d m %0d map %0d/%0d err %0d/%0d", s, code_valid, matched,
                 mapping_no, bm, code_err, be);
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
