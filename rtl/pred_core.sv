// pred_core: the shared intra prediction core. It produces all 16 samples of
// one 4x4 block in one clock cycle, for every intra mode of High Profile:
// the nine Intra4x4/Intra8x8 directions, V/H/DC/plane of 16x16 luma and
// chroma, and it also runs the Intra8x8 reference prefilter.
//
// Every output lane is built from the two filter types the standard uses:
//   two-tap   (p1 + p2 + 1) >> 1
//   three-tap (p1 + 2*p2 + p3 + 2) >> 2
// taken over neighbouring entries of the edge array (layout in intra_pkg,
// p[x,-1] at 17+x, p[-1,-1] at 16, p[-1,y] at 15-y). Along that array every
// directional formula of the standard is a tap window whose centre moves
// with (x,y); the ends of the neighbour range are replicated, which yields
// the special end cases (p[6]+3*p[7] in diagonal-down-left, the tail of
// horizontal-up). DC lanes copy the DC value from dc_unit. Plane lanes add
// 0..3 times b and c to the block seed from plane_gen, shift by 5 and clip.
// In the M_FILT mode lane l computes the prefiltered sample at edge index
// 8+16*filt_pass+l, so two cycles filter all 25 Intra8x8 neighbours, with
// the availability rules of the standard for the ends.
//
// The original architecture builds the core from a pool of 15 shared two/three-tap
// results and an output multiplexer; here each lane selects its own taps,
// which gives the same samples with a simpler structure (this design's
// choice). Purely combinational; the caller registers the result.
//
// Interface: mode/kind select the formula, n8 selects the 8x8 block size,
// (ox,oy) is the position of the 4x4 block inside its 8x8 or 16x16 block.
module pred_core
  import intra_pkg::*;
(
  input  mode_e               mode,
  input  logic                n8,          // 1: Intra8x8 block geometry
  input  logic [3:0]          ox,          // x of the 4x4 block inside the block
  input  logic [3:0]          oy,
  input  edge_t               edge_s,      // neighbour samples
  input  pix_t                dc,          // DC value
  input  logic signed [19:0]  seed,        // plane seed of this 4x4 block
  input  logic signed [15:0]  pb,          // plane b
  input  logic signed [15:0]  pc,          // plane c
  input  logic                filt_pass,   // M_FILT: 0 -> indices 8..23, 1 -> 24..32
  input  logic                av_left,     // M_FILT availability
  input  logic                av_top,
  input  logic                av_corner,
  output blk16_t              pred
);

  // two-tap and three-tap filters of the standard
  function automatic pix_t f2(input pix_t a, input pix_t b);
    return pix_t'((10'(a) + 10'(b) + 10'd1) >> 1);
  endfunction

  function automatic pix_t f3(input pix_t a, input pix_t b, input pix_t c);
    return pix_t'((10'(a) + {1'b0, b, 1'b0} + 10'(c) + 10'd2) >> 2);
  endfunction

  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : ((v > hi) ? hi : v);
  endfunction

  always_comb begin
    int n, lo, hi;
    n  = n8 ? 8 : 4;
    lo = 16 - n;          // p[-1,N-1]
    hi = 16 + 2 * n;      // p[2N-1,-1]
    pred = '0;
    for (int l = 0; l < 16; l++) begin
      int x, y, zc, i0, i1, k, flo, fhi;
      logic signed [19:0] pv;
      zc = 0; i0 = 0; i1 = 0; k = 0; flo = 0; fhi = 0; pv = '0;
      x = int'(ox) + (l % 4);
      y = int'(oy) + (l / 4);
      case (mode)
        M_V:  pred[l] = edge_s[17 + x];
        M_H:  pred[l] = edge_s[15 - y];
        M_DC: pred[l] = dc;
        M_DDL: begin
          zc = 17 + x + y + 1;
          pred[l] = f3(edge_s[clampi(zc - 1, lo, hi)], edge_s[zc], edge_s[clampi(zc + 1, lo, hi)]);
        end
        M_DDR: begin
          zc = 17 + x - y - 1;
          pred[l] = f3(edge_s[zc - 1], edge_s[zc], edge_s[zc + 1]);
        end
        M_VR: begin
          k = 2 * x - y;
          if (k >= 0 && (k % 2) == 0) begin
            i0 = 17 + x - (y / 2) - 1;
            pred[l] = f2(edge_s[i0], edge_s[i0 + 1]);
          end else begin
            zc = (k >= 0) ? 17 + x - (y / 2) - 1 : 17 + k;
            pred[l] = f3(edge_s[zc - 1], edge_s[zc], edge_s[zc + 1]);
          end
        end
        M_HD: begin
          k = 2 * y - x;
          if (k >= 0 && (k % 2) == 0) begin
            i0 = 17 - 1 - y + (x / 2);      // p[-1, y-(x>>1)-1]
            pred[l] = f2(edge_s[i0], edge_s[i0 - 1]);
          end else begin
            zc = (k >= 0) ? 17 - 1 - y + (x / 2) : 17 - k - 2;
            pred[l] = f3(edge_s[zc - 1], edge_s[zc], edge_s[zc + 1]);
          end
        end
        M_VL: begin
          if ((y % 2) == 0) begin
            i0 = 17 + x + (y / 2);
            pred[l] = f2(edge_s[i0], edge_s[i0 + 1]);
          end else begin
            zc = 17 + x + (y / 2) + 1;
            pred[l] = f3(edge_s[zc - 1], edge_s[zc], edge_s[zc + 1]);
          end
        end
        M_HU: begin
          k = x + 2 * y;
          if (k > 2 * n - 3) begin
            pred[l] = edge_s[lo];
          end else if ((k % 2) == 0) begin
            i0 = 15 - (y + (x / 2));
            pred[l] = f2(edge_s[i0], edge_s[i0 - 1]);
          end else begin
            zc = 14 - y - (x / 2);
            pred[l] = f3(edge_s[clampi(zc - 1, lo, hi)], edge_s[zc], edge_s[clampi(zc + 1, lo, hi)]);
          end
        end
        M_PLANE: begin
          pv = seed + 20'(pb) * 20'(l % 4) + 20'(pc) * 20'(l / 4);
          pred[l] = clip1(pv >>> 5);
        end
        M_FILT: begin
          zc = 8 + (filt_pass ? 16 : 0) + l;
          if (zc <= 32) begin
            if (zc >= 17) begin
              flo = av_corner ? 16 : 17;
              fhi = 32;
            end else if (zc == 16) begin
              flo = av_left ? 15 : 16;
              fhi = av_top ? 17 : 16;
            end else begin
              flo = 8;
              fhi = av_corner ? 16 : 15;
            end
            i0 = clampi(zc - 1, flo, fhi);
            i1 = clampi(zc + 1, flo, fhi);
            pred[l] = f3(edge_s[i0], edge_s[zc], edge_s[i1]);
          end
        end
        default: pred[l] = '0;
      endcase
    end
  end

endmodule
