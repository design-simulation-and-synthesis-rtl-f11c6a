// postcoder: postcoder / datapacker of the fractal encoder.
//
// Packs each range block's code into the 8-bit output stream (the width
// printed on the block diagram). A code is MAP_BITS bits of mapping number
// (domain number and transformation) followed by KD_BITS bits of the
// two's-complement K_d, CODE_W = MAP_BITS + KD_BITS bits in all. Codes are
// appended, most significant bit first, to a bit buffer; whenever the buffer
// holds eight bits or more, its first byte leaves with out_valid, one byte
// per cycle. finish pads the last partial byte with zeros and sends it; done
// then rises and stays high until restart (the start of the next image). Codes must be at least
// ceil(CODE_W/8) cycles apart, which the encoder always satisfies since
// every range costs far more cycles than that.
// The document names this block only; the code layout is this design's.
module postcoder
  import fic_pkg::*;
#(
  parameter int MAP_BITS = 11,
  parameter int KD_BITS  = 7
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       code_valid,
  input  logic [DIDX_W+TIDX_W-1:0]   mapping_no,
  input  logic signed [KD_W-1:0]     kd,
  input  logic                       restart,
  input  logic                       finish,
  output logic                       out_valid,
  output logic [7:0]                 out_byte,
  output logic                       done
);
  localparam int CODE_W = MAP_BITS + KD_BITS;
  localparam int BUF_W  = CODE_W + 16;

  logic [BUF_W-1:0] bits;     // left aligned: next byte in the top eight bits
  logic [7:0]       cnt;      // number of valid bits
  logic             fin_req;

  logic [CODE_W-1:0] code;
  logic [BUF_W-1:0]  bits_n;
  logic [7:0]        cnt_n;
  logic              emit;

  always_comb begin
    code   = {mapping_no[MAP_BITS-1:0], kd[KD_BITS-1:0]};
    bits_n = bits;
    cnt_n  = cnt;
    emit   = (cnt >= 8'd8) || (fin_req && !code_valid && cnt != 8'd0);
    if (emit) begin
      bits_n = bits << 8;
      cnt_n  = (cnt >= 8'd8) ? cnt - 8'd8 : 8'd0;
    end
    if (code_valid) begin
      bits_n = bits_n | ((BUF_W'(code) << (BUF_W - CODE_W)) >> cnt_n);
      cnt_n  = cnt_n + 8'(CODE_W);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits <= '0;
      cnt <= '0;
      fin_req <= 1'b0;
      out_valid <= 1'b0;
      out_byte <= '0;
      done <= 1'b0;
    end else begin
      bits <= bits_n;
      cnt  <= cnt_n;
      out_valid <= emit;
      out_byte  <= bits[BUF_W-1 -: 8];
      if (restart) begin
        fin_req <= 1'b0;
        done <= 1'b0;
      end else begin
        if (finish) fin_req <= 1'b1;
        if ((finish || fin_req) && !code_valid && cnt_n == 8'd0) done <= 1'b1;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    code_valid |-> cnt <= 8'(BUF_W - CODE_W));
endmodule
