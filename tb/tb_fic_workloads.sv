// tb_fic_workloads: encodes six 64 x 64 test images of different character
// (mixed, smooth, flat regions with edges, noise, rings, stripes) at the
// default size with one fixed tolerance, checks every average, code and byte
// against the reference model, and prints per image the cycle count, the
// encoding time at 50 MHz, how many ranges stopped early and the size of the
// packed output, and the PSNR of the image rebuilt from the codes by a
// software decoder (two iterations from the average image). Image content decides how early searches stop, so the
// times spread between the early-match and the exhaustive extremes.
module tb_fic_workloads;
  import fic_pkg::*;
  import fic_ref_pkg::*;

  localparam int IMG = 64, RS = 4, LSP = 4, STEP = 4, AVS = 4, AVQ = 5;
  localparam int NRANGE = (IMG/RS)*(IMG/RS);
  localparam int NAVB   = (IMG/AVS)*(IMG/AVS);
  localparam int THRESH = 12;   // mean squared error per pixel

  logic clk = 0;
  always #10 clk = ~clk;

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
  int checks, failures, n_match;

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
      if (code_matched) n_match++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic encode(int kind);
    fic_model m;
    int exp_bytes[$];
    code_t e;
    longint t0;
    real psnr;
    string names[6] = '{"mixed", "smooth", "edges", "noise", "rings", "stripes"};
    m = new(IMG, RS, LSP, STEP, AVS, AVQ);
    m.make_kind(kind, 100 + kind);
    for (int a = 0; a < IMG*IMG; a++) begin
      @(posedge clk);
      we <= 1'b1; waddr <= 16'(a); wdata <= 8'(m.img[a]);
    end
    @(posedge clk);
    we <= 1'b0;
    avgs.delete(); bytes_q.delete(); codes.delete();
    n_match = 0;
    thresh = ERR_W'(THRESH);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    t0 = 1;
    while (!done) begin @(posedge clk); t0++; end
    psnr = m.decode_psnr(codes, avgs, 2);
    $display("%-8s %9d cycles  %0.4f s  early %3d of %0d ranges  %0d bytes  PSNR %0.2f dB",
             names[kind], t0, real'(t0) / 50.0e6, n_match, NRANGE, bytes_q.size(), psnr);
    // Decoded quality: the smooth and flat images must come back well.
    if (kind == 1 || kind == 2) check(psnr > 25.0, $sformatf("%s PSNR %0.2f", names[kind], psnr));
    check(avgs.size() == NAVB, "average count");
    for (int b = 0; b < NAVB && b < avgs.size(); b++)
      check(avgs[b] == m.avg_q(b), $sformatf("%s avg %0d", names[kind], b));
    check(codes.size() == NRANGE, "code count");
    for (int r = 0; r < NRANGE; r++) begin
      e = m.encode_range(r, THRESH);
      m.pack(e);
      if (r < codes.size())
        check(codes[r].dom == e.dom && codes[r].tidx == e.tidx && codes[r].kd == e.kd &&
              codes[r].err == e.err && codes[r].matched == e.matched,
              $sformatf("%s range %0d code", names[kind], r));
    end
    m.bytes(exp_bytes);
    check(bytes_q.size() == exp_bytes.size(), "byte count");
    for (int i = 0; i < exp_bytes.size() && i < bytes_q.size(); i++)
      check(bytes_q[i] == exp_bytes[i], $sformatf("%s byte %0d", names[kind], i));
    // never slower than an exhaustive search: 4096 + 256 * (15*68 + 210*36 + 40)
    check(t0 <= 4096 + 256*(15*68 + 210*36 + 40), $sformatf("%s cycle bound", names[kind]));
  endtask

  initial begin
    checks = 0; failures = 0; n_match = 0;
    rst_n = 0; start = 0; we = 0; waddr = '0; wdata = '0; thresh = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int k = 0; k < 6; k++) encode(k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
