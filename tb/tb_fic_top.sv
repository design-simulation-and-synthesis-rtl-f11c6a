// tb_fic_top: end-to-end test of the encoder on 16 x 16 images.
//
// Two encoders: lattice spacing 4 (the default), where fetching a domain
// takes longer than its Term1 pass, and spacing 1, where the Term1 units are
// the bottleneck and the sequencer must stall. Each encodes a test image
// three times (mixed, exhaustive, immediate-accept thresholds) and every
// average, code and output byte is checked against the reference model.
// Every mechanism must be seen at least once. The exhaustive run's cycle
// count is checked against the schedule: a range costs one 16-read range
// fetch and, per domain, max(fetch, Term1 pass) plus a few cycles.
module tb_fic_top;
  logic clk = 0;
  always #5 clk = ~clk;

  logic go = 0;
  logic fin_a, fin_b;
  int ca, fa, cb, fb;
  int fa_full, fa_part, fa_ovl, fa_stall, fa_match, fa_fb, fa_ff;
  int fb_full, fb_part, fb_ovl, fb_stall, fb_match, fb_fb, fb_ff;
  longint cyc_a, cyc_b;
  int checks, failures;

  fic_harness #(.IMG_SIZE(16), .L_SPACING(4), .MID_THRESH(0)) ha (
    .clk, .go, .finished(fin_a), .checks(ca), .failures(fa),
    .n_full(fa_full), .n_part(fa_part), .n_overlap(fa_ovl), .n_stall(fa_stall),
    .n_match(fa_match), .n_fallback(fa_fb), .n_flush_fetch(fa_ff), .cycles_exh(cyc_a)
  );
  fic_harness #(.IMG_SIZE(16), .L_SPACING(1), .MID_THRESH(0)) hb (
    .clk, .go, .finished(fin_b), .checks(cb), .failures(fb),
    .n_full(fb_full), .n_part(fb_part), .n_overlap(fb_ovl), .n_stall(fb_stall),
    .n_match(fb_match), .n_fallback(fb_fb), .n_flush_fetch(fb_ff), .cycles_exh(cyc_b)
  );

  task automatic mech(int n, string what);
    checks++;
    $display("mechanism %-32s seen %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    checks = 0; failures = 0;
    repeat (2) @(posedge clk);
    go = 1;
    wait (fin_a && fin_b);
    checks += ca + cb;
    failures += fa + fb;
    mech(fa_full + fb_full, "full domain fetch (row start)");
    mech(fa_part + fb_part, "partial fetch (overlap reuse)");
    mech(fa_ovl + fb_ovl, "fetch during Term1 (pipelining)");
    mech(fb_stall, "stall on busy Term1 units");
    mech(fa_match + fb_match, "early match below threshold");
    mech(fa_fb + fb_fb, "exhaustive search fallback");
    mech(fa_ff + fb_ff, "flush of a fetch in flight");
    // Exhaustive-search cycle bound: 16 ranges, 9 (L=4) or 81 (L=1) domains.
    // L=4: per domain at most 8*4 reads + 4, row starts 8*8 reads + 4.
    checks++;
    if (cyc_a > 16*(3*(64+4) + 6*(32+4) + 24) + 16*16 + 400) begin
      failures++; $display("FAIL L=4 exhaustive run too slow: %0d", cyc_a);
    end
    // L=1: Term1 bound, at most 16 + 4 cycles per domain.
    checks++;
    if (cyc_b > 16*(9*(64+4) + 72*(16+4) + 24) + 16*16 + 400) begin
      failures++; $display("FAIL L=1 exhaustive run too slow: %0d", cyc_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
