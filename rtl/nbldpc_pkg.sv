// nbldpc_pkg: types and arithmetic shared by the non-binary LDPC FFT-SPA decoder.
//
// Messages (pmf entries, in the probability or the Walsh-Hadamard domain) are stored as
// signed Q8.7 words (8 bits: sign plus 7 fraction bits, range [-1, 127/128]); products and
// sums inside the kernels are formed in signed Q16.13 (16 bits, 13 fraction bits, range
// [-4, 4)). Conversions round half away from zero and saturate, as the fixed-point types of
// the original C model did. These two formats are the design's stated number formats; the
// rounding of the halving steps of the inverse transform and the guard against division by
// zero are this design's own choices.
//
// GF(2^m) elements are held in the polynomial basis (bit i = coefficient of alpha^i), so
// that the XOR structure used by the Walsh-Hadamard transform lines up with the element
// index. Multiplication reduces by a fixed primitive polynomial per field size; the choice of
// polynomial is this design's own.
//
// The package also holds the phase encoding of the decoder controller.
package nbldpc_pkg;

  localparam int MSG_W    = 8;   // Q8.7 message word
  localparam int MSG_FRAC = 7;
  localparam int ACC_W    = 16;  // Q16.13 intermediate word
  localparam int ACC_FRAC = 13;

  typedef logic signed [MSG_W-1:0] msg_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  localparam msg_t MSG_MAX = msg_t'(8'sh7f);
  localparam msg_t MSG_MIN = msg_t'(8'sh80);
  localparam int   ACC_MAXI = 32767;
  localparam int   ACC_MINI = -32768;

  // Parity-check matrix used by a decoder instance.
  //   CODE_GEN : regular (d_v, d_c) code whose edge interleaver and coefficients are generated
  //   CODE_EQ1 : the 3 x 6 example matrix over GF(4) with d_v = 2, d_c = 4
  typedef enum logic {CODE_GEN = 1'b0, CODE_EQ1 = 1'b1} code_e;

  // Decoder phases, in the order the controller runs them.
  typedef enum logic [3:0] {
    PH_IDLE     = 4'd0,
    PH_PROLOGUE = 4'd1,  // burst read of m_cv, m_vc, m_v from DRAM
    PH_VN       = 4'd2,  // vn_proc
    PH_PERM     = 4'd3,  // permute
    PH_FWHT_VC  = 4'd4,  // forward transform of m_vc
    PH_CN       = 4'd5,  // cn_proc
    PH_FWHT_CV  = 4'd6,  // inverse transform of m_cv
    PH_DEPERM   = 4'd7,  // depermute
    PH_APP      = 4'd8,  // a-posteriori pmfs m_v*
    PH_EPILOGUE = 4'd9   // burst write of m_v* to DRAM
  } phase_e;

  // ---------------------------------------------------------------- GF(2^m)

  // Primitive polynomial of GF(2^m), including the x^m term.
  function automatic int unsigned gf_poly(int unsigned m);
    case (m)
      1:       return 32'h3;
      2:       return 32'h7;    // x^2 + x + 1
      3:       return 32'hb;    // x^3 + x + 1
      4:       return 32'h13;   // x^4 + x + 1
      5:       return 32'h25;   // x^5 + x^2 + 1
      6:       return 32'h43;   // x^6 + x + 1
      7:       return 32'h89;   // x^7 + x^3 + 1
      default: return 32'h11d;  // x^8 + x^4 + x^3 + x^2 + 1
    endcase
  endfunction

  // Product of two field elements (polynomial basis), shift-and-add with reduction.
  function automatic int unsigned gf_mul(int unsigned a, int unsigned b, int unsigned m);
    int unsigned acc;
    int unsigned aa;
    acc = 0;
    aa  = a;
    for (int i = 0; i < 8; i++) begin
      if (i < int'(m)) begin
        if (b[i]) acc = acc ^ aa;
        aa = aa << 1;
        if (aa[m]) aa = aa ^ gf_poly(m);
      end
    end
    return acc;
  endfunction

  // alpha^e in the polynomial basis.
  function automatic int unsigned gf_alpha_pow(int unsigned e, int unsigned m);
    int unsigned r;
    r = 1;
    for (int unsigned i = 0; i < e; i++) r = gf_mul(r, 2, m);
    return r;
  endfunction

  // ---------------------------------------------------------------- fixed point

  function automatic msg_t sat_msg(int v);
    if (v > 127)  return MSG_MAX;
    if (v < -128) return MSG_MIN;
    return msg_t'(v);
  endfunction

  function automatic acc_t sat_acc(int v);
    if (v > ACC_MAXI) return acc_t'(ACC_MAXI);
    if (v < ACC_MINI) return acc_t'(ACC_MINI);
    return acc_t'(v);
  endfunction

  // v / 2^sh rounded half away from zero (sh >= 1).
  function automatic int rnd_shift(int v, int sh);
    int mag;
    mag = (v < 0) ? -v : v;
    mag = (mag + (1 <<< (sh - 1))) >>> sh;
    return (v < 0) ? -mag : mag;
  endfunction

  function automatic acc_t msg_to_acc(msg_t a);
    return acc_t'(int'(a) <<< (ACC_FRAC - MSG_FRAC));
  endfunction

  function automatic msg_t acc_to_msg(acc_t a);
    return sat_msg(rnd_shift(int'(a), ACC_FRAC - MSG_FRAC));
  endfunction

  // Q16.13 product, rounded and saturated.
  function automatic acc_t acc_mul(acc_t a, acc_t b);
    return sat_acc(rnd_shift(int'(a) * int'(b), ACC_FRAC));
  endfunction

  // num / den as a Q8.7 word, rounded half away from zero and saturated; den > 0.
  // num and den are in the same (any) fixed-point unit.
  function automatic msg_t fx_ratio(int num, int den);
    int mag;
    int q;
    mag = (num < 0) ? -num : num;
    q   = ((mag <<< MSG_FRAC) + (den >>> 1)) / den;
    return sat_msg((num < 0) ? -q : q);
  endfunction

endpackage
