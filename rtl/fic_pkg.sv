// fic_pkg: widths, types and helper functions shared by the fractal image
// coding (FIC) encoder blocks.
//
// The encoder works on 8-bit grey pixels in an external image memory with a
// 16-bit address, as in the chip's block diagram. Range blocks are R_SIZE x
// R_SIZE pixels (N = R_SIZE^2), domain blocks twice that size. With the
// default R_SIZE = 4 the error term Term1 = sum (r - d)^2 fits the 20 bits
// the block diagram prints for it (16 * 255^2 < 2^20).
//
// The per-domain tag (dom_tag_t) travels with a candidate domain down the
// error pipeline so every stage knows which domain its numbers belong to.
package fic_pkg;

  localparam int PIX_W   = 8;    // pixel width, printed on the memory data bus
  localparam int ADDR_W  = 16;   // memory address width, printed on the Addr-Mux
  localparam int SUM_W   = 16;   // width of sum r_i and sum d_i, printed
  localparam int TERM1_W = 20;   // width of Term1 / Min_Term1, printed
  localparam int TERM2_W = 24;   // signed Term2 = K*(K*N - 2T) (own choice, see README)
  localparam int KD_W    = 10;   // signed offset K_d / K (own choice)
  localparam int ERR_W   = 20;   // width of E_min, printed
  localparam int DIDX_W  = 12;   // domain index width (up to 4096 domains)
  localparam int NTRANS  = 8;    // eight spatial transformations
  localparam int TIDX_W  = 3;

  // Source of a memory read, selected by the Addr-Mux.
  typedef enum logic [1:0] {
    SRC_NONE = 2'd0,
    SRC_AV   = 2'd1,   // initial image averages (Av-Addr)
    SRC_R    = 2'd2,   // range pixels (R-Addr)
    SRC_D    = 2'd3    // domain pixels (D-Addr)
  } src_e;

  // Tag that follows one candidate domain through the error pipeline.
  typedef struct packed {
    logic [DIDX_W-1:0]        dom;    // domain number (raster order of lattice)
    logic                     last;   // last domain of the search for this range
    logic signed [KD_W-1:0]   kd;     // quantized offset K_d
    logic signed [TERM2_W-1:0] term2; // Term2, shared by all eight transforms
  } dom_tag_t;

  // Spatial transformation t of an S x S block: output pixel (y, x) is taken
  // from source pixel (sy, sx). The function returns the raster index of the
  // source pixel.
  //   0 identity          4 flip about the horizontal axis
  //   1 rotate  90 deg    5 flip about the vertical axis
  //   2 rotate 180 deg    6 flip about the main diagonal
  //   3 rotate 270 deg    7 flip about the anti-diagonal
  function automatic int trans_src(input int t, input int y, input int x, input int s);
    int sy, sx;
    case (t)
      0: begin sy = y;       sx = x;       end
      1: begin sy = s-1-x;   sx = y;       end
      2: begin sy = s-1-y;   sx = s-1-x;   end
      3: begin sy = x;       sx = s-1-y;   end
      4: begin sy = s-1-y;   sx = x;       end
      5: begin sy = y;       sx = s-1-x;   end
      6: begin sy = x;       sx = y;       end
      default: begin sy = s-1-x; sx = s-1-y; end
    endcase
    return sy*s + sx;
  endfunction

endpackage
