// tb_fic_top_full: the encoder at its default size (64 x 64 image, lattice
// spacing 4, 225 domains per range) coding one whole image.
//
// Loads a test image, encodes it with a threshold at the median of the best
// errors (so ranges both stop early and search exhaustively), then once more
// with threshold 0 (every range searched exhaustively, the worst case), and
// checks all averages, codes and packed bytes against the reference model.
// Prints the cycle counts and the encoding time at a 50 MHz clock.
module tb_fic_top_full;
  import fic_pkg::*;
  import fic_ref_pkg::*;

  localparam int IMG = 64, RS = 4, LSP = 4, STEP = 4, AVS = 4, AVQ = 5;
  localparam int NRANGE = (IMG/RS)*(IMG/RS);
  localparam int NAVB   = (IMG/AVS)*(IMG/AVS);

  logic clk = 0;
  always #10 clk = ~clk;   // 50 MHz

  logic rst_n, start;
  logic [ERR_W-1:0] thresh;
  logic mem_rd, we;
  logic [15:0] mem_addr, waddr;
  logic [7:0] mem_data, wdata;
  logic avg_valid, code_valid, code_matched, out_valid, done, stall;
  logic [AVQ-1:0] avg_q;
  logic [DIDX_W+TIDX_W-1:0] code_mapping;
  logic signed [KD_W-1:0] code_kd;
  logic [ERR_W-1:0] code_err;
  logic [7:0] out_byte;
  int checks, failures, n_match, n_fallback;

  fic_top dut (
    .clk, .rst_n, .start, .thresh, .mem_rd, .mem_addr, .mem_data,
    .avg_valid, .avg_q, .code_valid, .code_matched, .code_mapping, .code_kd,
    .code_err, .out_valid, .out_byte, .stall, .done
  );

  interleaved_memory #(.DEPTH(IMG*IMG)) mem (
    .clk, .rd(mem_rd), .addr(mem_addr), .data(mem_data), .we, .waddr, .wdata
  );

  int avgs[$], bytes_q[$];
  code_t codes[$];

  always @(posedge clk) if (rst_n) begin
    if (avg_valid) avgs.push_back(int'(avg_q));
    if (out_valid) bytes_q.push_back(int'(out_byte));
    if (code_valid) begin
      code_t c;
      c.dom = int'(code_mapping) / 8; c.tidx = int'(code_mapping) % 8;
      c.kd = int'(code_kd); c.err = int'(code_err); c.matched = code_matched;
      codes.push_back(c);
      if (code_matched) n_match++; else n_fallback++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run(fic_model m, int th);
    int exp_bytes[$];
    code_t e;
    longint t0;
    avgs.delete(); bytes_q.delete(); codes.delete();
    thresh = ERR_W'(th);
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    t0 = 1;
    while (!done) begin @(posedge clk); t0++; end
    $display("thresh=%0d: %0d cycles = %0.4f s at 50 MHz, %0d bytes",
             th, t0, real'(t0) / 50.0e6, bytes_q.size());
    check(avgs.size() == NAVB, "average count");
    for (int b = 0; b < NAVB && b < avgs.size(); b++)
      check(avgs[b] == m.avg_q(b), $sformatf("avg %0d", b));
    check(codes.size() == NRANGE, "code count");
    for (int r = 0; r < NRANGE; r++) begin
      e = m.encode_range(r, th);
      m.pack(e);
      if (r < codes.size())
        check(codes[r].dom == e.dom && codes[r].tidx == e.tidx && codes[r].kd == e.kd &&
              codes[r].err == e.err && codes[r].matched == e.matched,
              $sformatf("range %0d code", r));
    end
    m.bytes(exp_bytes);
    check(bytes_q.size() == exp_bytes.size(), "byte count");
    for (int i = 0; i < exp_bytes.size() && i < bytes_q.size(); i++)
      check(bytes_q[i] == exp_bytes[i], $sformatf("byte %0d", i));
  endtask

  initial begin
    fic_model m;
    int errs[$];
    checks = 0; failures = 0; n_match = 0; n_fallback = 0;
    rst_n = 0; start = 0; we = 0; waddr = '0; wdata = '0; thresh = '0;
    m = new(IMG, RS, LSP, STEP, AVS, AVQ);
    m.make_image(11);
    for (int a = 0; a < IMG*IMG; a++) begin
      @(posedge clk);
      we <= 1'b1; waddr <= 16'(a); wdata <= 8'(m.img[a]);
    end
    @(posedge clk);
    we <= 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int r = 0; r < NRANGE; r++) begin
      code_t c;
      c = m.encode_range(r, 0);
      errs.push_back(c.err);
    end
    errs.sort();
    run(m, errs[NRANGE/2] + 1);
    run(m, 0);
    checks++;
    if (n_match == 0 || n_fallback == 0) begin
      failures++;
      $display("FAIL expected both early matches and exhaustive searches");
    end
    $display("early matches %0d, exhaustive searches %0d", n_match, n_fallback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
