// init_avg: initial image computation module (B) of the fractal encoder.
//
// Computes the quantized mean of each AV_SIZE x AV_SIZE block of the image in
// the three sequential steps the chip uses: an adder sums the block's pixels,
// the sum is shifted right by log2(AV_SIZE^2) to give the average, and the
// average is shifted right again, keeping AVQ_W (5) bits, to quantize it.
// Pixels arrive one per cycle with pix_valid; pix_last marks a block's last
// pixel. One cycle after that pixel, out_valid pulses with avg (8 bits) and
// avg_q (AVQ_W bits). The sum restarts after each block.
// The 5-bit output width is printed in the block diagram; the block size and
// the truncating shifts (no rounding) are this design's choice.
module init_avg
  import fic_pkg::*;
#(
  parameter int AV_SIZE = 4,
  parameter int AVQ_W   = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pix_valid,
  input  logic [PIX_W-1:0] pix,
  input  logic             pix_last,
  output logic             out_valid,
  output logic [PIX_W-1:0] avg,
  output logic [AVQ_W-1:0] avg_q
);
  localparam int SHIFT = $clog2(AV_SIZE * AV_SIZE);

  logic [SUM_W-1:0] acc, sum;
  logic [PIX_W-1:0] avg_c;

  always_comb begin
    sum   = acc + SUM_W'(pix);
    avg_c = PIX_W'(sum >> SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      out_valid <= 1'b0;
      avg <= '0;
      avg_q <= '0;
    end else begin
      out_valid <= 1'b0;
      if (pix_valid) begin
        if (pix_last) begin
          acc <= '0;
          out_valid <= 1'b1;
          avg <= avg_c;
          avg_q <= AVQ_W'(avg_c >> (PIX_W - AVQ_W));
        end else begin
          acc <= sum;
        end
      end
    end
  end
endmodule
