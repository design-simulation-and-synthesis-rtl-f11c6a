// fic_ref_pkg: reference model of the fractal encoder for the testbenches.
//
// Computes, directly from the image and without the hardware's Term1/Term2
// split, what the encoder must produce: the quantized block averages, the
// code of every range block (first domain with error below the threshold,
// else the best one) and the packed output bytes. It also makes test images.
package fic_ref_pkg;

  typedef struct {
    int dom;
    int tidx;
    int kd;
    int err;
    bit matched;
  } code_t;

  class fic_model;
    int img_size, r_size, lsp, step, av_size, avq_w;
    int nd1, map_bits, kd_bits;
    int img[];
    bit bitq[$];

    function new(int img_size_, int r_size_, int lsp_, int step_, int av_size_, int avq_w_);
      img_size = img_size_; r_size = r_size_; lsp = lsp_; step = step_;
      av_size = av_size_; avq_w = avq_w_;
      nd1 = (img_size - 2*r_size) / lsp + 1;
      map_bits = $clog2(nd1*nd1) + 3;
      kd_bits = 9 - $clog2(step);
      img = new[img_size*img_size];
    endfunction

    function int pix(int x, int y);
      return img[y*img_size + x];
    endfunction

    // Test image: smooth shading plus a repeated texture (so that good
    // matches exist) plus noise in part of the image (so that some ranges
    // find none).
    function void make_image(int seed);
      int s;
      s = seed;
      for (int y = 0; y < img_size; y++)
        for (int x = 0; x < img_size; x++) begin
          int v;
          s = s * 1103515245 + 12345;
          v = 3*x + 2*y + (((x/2) % 4 == 0) ? 40 : 0) + (((y/2) % 4 == 1) ? 30 : 0);
          if (x >= img_size/2 && y >= img_size/2) v += (s >>> 16) & 127;
          img[y*img_size + x] = v & 255;
        end
    endfunction

    // Further test images of different character, kind 0..5:
    // 0 the mixed image above, 1 smooth shading, 2 flat regions with sharp
    // edges, 3 noise everywhere, 4 concentric rings, 5 diagonal stripes.
    function void make_kind(int kind, int seed);
      int s;
      if (kind == 0) begin make_image(seed); return; end
      s = seed;
      for (int y = 0; y < img_size; y++)
        for (int x = 0; x < img_size; x++) begin
          int v, c;
          s = s * 1103515245 + 12345;
          case (kind)
            1: v = 40 + x + 2*y + ((s >>> 16) & 3);
            2: v = ((x < img_size/3) ? 30 : 0) + ((y > x) ? 120 : 60) + ((x+y > img_size) ? 50 : 0);
            3: v = (s >>> 16) & 255;
            4: begin
                 c = (x - img_size/2)*(x - img_size/2) + (y - img_size/2)*(y - img_size/2);
                 v = ((c / 24) % 2 == 0) ? 60 + x : 180 - y;
               end
            default: v = (((x + y) / 5) % 3) * 70 + ((s >>> 16) & 7);
          endcase
          img[y*img_size + x] = v & 255;
        end
    endfunction

    function int avg_q(int b);
      int nb, bx, by, sum;
      nb = img_size / av_size;
      bx = (b % nb) * av_size;
      by = (b / nb) * av_size;
      sum = 0;
      for (int y = 0; y < av_size; y++)
        for (int x = 0; x < av_size; x++) sum += pix(bx+x, by+y);
      return (sum / (av_size*av_size)) >> (8 - avq_w);
    endfunction

    // Source pixel (sy, sx) of output pixel (y, x) under transform t.
    function void tsrc(int t, int y, int x, output int sy, output int sx);
      int s;
      s = r_size;
      case (t)
        0: begin sy = y;     sx = x;     end  // identity
        1: begin sy = s-1-x; sx = y;     end  // rotate 90
        2: begin sy = s-1-y; sx = s-1-x; end  // rotate 180
        3: begin sy = x;     sx = s-1-y; end  // rotate 270
        4: begin sy = s-1-y; sx = x;     end  // flip, horizontal axis
        5: begin sy = y;     sx = s-1-x; end  // flip, vertical axis
        6: begin sy = x;     sx = y;     end  // main diagonal
        default: begin sy = s-1-x; sx = s-1-y; end  // anti-diagonal
      endcase
    endfunction

    function code_t encode_range(int ri, int thresh);
      code_t best, c;
      bit have;
      int n, nrx, rx0, ry0, sum_r;
      int r[];
      int d[];
      n = r_size*r_size;
      nrx = img_size / r_size;
      rx0 = (ri % nrx) * r_size;
      ry0 = (ri / nrx) * r_size;
      r = new[n];
      d = new[n];
      sum_r = 0;
      for (int y = 0; y < r_size; y++)
        for (int x = 0; x < r_size; x++) begin
          r[y*r_size+x] = pix(rx0+x, ry0+y);
          sum_r += r[y*r_size+x];
        end
      have = 0;
      best = '{default: 0};
      for (int dy = 0; dy < nd1; dy++)
        for (int dx = 0; dx < nd1; dx++) begin
          int x0, y0, sum_d, tdiff, ko, kd, k, emin, tmin;
          x0 = dx*lsp; y0 = dy*lsp;
          sum_d = 0;
          for (int y = 0; y < r_size; y++)
            for (int x = 0; x < r_size; x++) begin
              d[y*r_size+x] = (pix(x0+2*x, y0+2*y) + pix(x0+2*x+1, y0+2*y) +
                               pix(x0+2*x, y0+2*y+1) + pix(x0+2*x+1, y0+2*y+1)) / 4;
              sum_d += d[y*r_size+x];
            end
          tdiff = sum_r - sum_d;
          ko = tdiff >>> $clog2(n);          // floor division
          kd = ko >>> $clog2(step);
          k  = kd * step;
          emin = -1; tmin = 0;
          for (int t = 0; t < 8; t++) begin
            int e;
            e = 0;
            for (int y = 0; y < r_size; y++)
              for (int x = 0; x < r_size; x++) begin
                int sy, sx, diff;
                tsrc(t, y, x, sy, sx);
                diff = r[y*r_size+x] - d[sy*r_size+sx] - k;
                e += diff*diff;
              end
            if (emin < 0 || e < emin) begin emin = e; tmin = t; end
          end
          c.dom = dy*nd1 + dx; c.tidx = tmin; c.kd = kd; c.err = emin / n;
          if (c.err < thresh) begin
            c.matched = 1;
            return c;
          end
          c.matched = 0;
          if (!have || c.err < best.err) begin best = c; have = 1; end
        end
      return best;
    endfunction

    // Decoder, for measuring quality: starts from the average image
    // (each 5-bit average scaled back to 8 bits), applies every range's map
    // (shrink the domain, transform, add K = K_d * step, clamp) for iters
    // rounds, and returns the PSNR in dB against the original image.
    function real decode_psnr(code_t codes[$], int avgs[$], int iters);
      int cur[], nxt[];
      int nb, nrx;
      real mse;
      cur = new[img_size*img_size];
      nxt = new[img_size*img_size];
      nb = img_size / av_size;
      nrx = img_size / r_size;
      for (int y = 0; y < img_size; y++)
        for (int x = 0; x < img_size; x++)
          cur[y*img_size+x] = avgs[(y/av_size)*nb + x/av_size] << (8 - avq_w);
      for (int it = 0; it < iters; it++) begin
        for (int ri = 0; ri < codes.size(); ri++) begin
          int x0, y0, rx0, ry0;
          x0 = (codes[ri].dom % nd1) * lsp;
          y0 = (codes[ri].dom / nd1) * lsp;
          rx0 = (ri % nrx) * r_size;
          ry0 = (ri / nrx) * r_size;
          for (int y = 0; y < r_size; y++)
            for (int x = 0; x < r_size; x++) begin
              int sy, sx, v;
              tsrc(codes[ri].tidx, y, x, sy, sx);
              v = (cur[(y0+2*sy)*img_size + x0+2*sx] + cur[(y0+2*sy)*img_size + x0+2*sx+1] +
                   cur[(y0+2*sy+1)*img_size + x0+2*sx] + cur[(y0+2*sy+1)*img_size + x0+2*sx+1]) / 4
                  + codes[ri].kd * step;
              if (v < 0) v = 0;
              if (v > 255) v = 255;
              nxt[(ry0+y)*img_size + rx0+x] = v;
            end
        end
        cur = nxt;
      end
      mse = 0.0;
      for (int i = 0; i < img_size*img_size; i++)
        mse += real'((cur[i] - img[i]) * (cur[i] - img[i]));
      mse = mse / real'(img_size*img_size);
      if (mse < 1.0e-9) return 99.0;
      return 10.0 * $log10(255.0 * 255.0 / mse);
    endfunction

    function void pack(code_t c);
      int m;
      m = c.dom*8 + c.tidx;
      for (int b = map_bits-1; b >= 0; b--) bitq.push_back(m[b]);
      for (int b = kd_bits-1; b >= 0; b--) bitq.push_back(c.kd[b]);
    endfunction

    function void bytes(ref int q[$]);
      q.delete();
      while (bitq.size() % 8 != 0) bitq.push_back(1'b0);
      for (int i = 0; i < bitq.size(); i += 8) begin
        int v;
        v = 0;
        for (int b = 0; b < 8; b++) v = (v << 1) | int'(bitq[i+b]);
        q.push_back(v);
      end
      bitq.delete();
    endfunction
  endclass

endpackage
