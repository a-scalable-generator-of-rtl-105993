// mimo_pkg: constants and constant functions shared by the Spine datapath.
//
// The Spine is the per-panel part of a distributed massive-MIMO uplink
// receiver: it corrects the front-end impairments of M antenna channels,
// estimates a frequency-flat channel matrix from Golay pilots, aligns the
// channels in time and forms K maximum-ratio-combined user streams that are
// summed along a daisy chain of panels.
//
// Default sizes follow the FPGA instance of the design (4 channels, 2 users,
// 8-bit datapath, 8 samples per clock, oversampling 2, Golay length 64,
// 65-tap root-raised-cosine filter). The Lagrange half-order (l = 1), the
// fine-delay resolution (1/8 sample) and the peak-detector window (8) are
// this implementation's choices.
//
// Arithmetic helpers work on 64-bit integers and are only used where the
// operand widths are far below 64 bits.
package mimo_pkg;

  localparam int unsigned DEF_M  = 4;   // channels per Spine
  localparam int unsigned DEF_K  = 2;   // users
  localparam int unsigned DEF_B  = 8;   // datapath bit width
  localparam int unsigned DEF_P  = 8;   // samples per clock (parallelism)
  localparam int unsigned DEF_OS = 2;   // oversampling rate
  localparam int unsigned DEF_L  = 64;  // Golay sequence length
  localparam int unsigned DEF_NT = 65;  // RRC taps
  localparam int unsigned DEF_LL = 1;   // Lagrange half-order l (2l+1 points)
  localparam int unsigned DEF_QD = 8;   // 1/r, fine-delay steps per sample
  localparam int unsigned DEF_WS = 8;   // peak detector window size

  // Arithmetic shift right by s with round-half-up.
  function automatic longint rnd_shift(longint v, int s);
    if (s <= 0) return v;
    return (v + (64'sd1 <<< (s - 1))) >>> s;
  endfunction

  // Clamp v to the range of a w-bit two's complement number.
  function automatic longint sat(longint v, int w);
    longint mx, mn;
    mx = (64'sd1 <<< (w - 1)) - 1;
    mn = -(64'sd1 <<< (w - 1));
    if (v > mx) return mx;
    if (v < mn) return mn;
    return v;
  endfunction

  // Integer division rounded to nearest, halves away from zero.
  function automatic longint div_round(longint num, longint den);
    longint an, ad, q;
    an = (num < 0) ? -num : num;
    ad = (den < 0) ? -den : den;
    q  = (2 * an + ad) / (2 * ad);
    return ((num < 0) != (den < 0)) ? -q : q;
  endfunction

  // Lagrange basis weight of point i (i in -ll..ll) evaluated at x = q/qd,
  // scaled by 2^frac:  prod_{j != i} (x - j) / (i - j).
  function automatic longint lagrange_coef(int q, int i, int ll, int qd, int frac);
    longint num, den;
    num = 1;
    den = 1;
    for (int j = -ll; j <= ll; j++) begin
      if (j != i) begin
        num = num * (longint'(q) - longint'(j) * longint'(qd));
        den = den * (longint'(i) - longint'(j)) * longint'(qd);
      end
    end
    return div_round(num * (64'sd1 <<< frac), den);
  endfunction

endpackage
