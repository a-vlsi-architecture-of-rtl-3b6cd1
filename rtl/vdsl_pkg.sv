// vdsl_pkg: types and arithmetic shared by the DMT VDSL transceiver datapath.
//
// Every complex sample in the design is a pair of DW-bit two's complement
// numbers (cplx_t). Twiddle factors and adaptive coefficients use a Q2.14
// format in which 1.0 is 16384. The helpers below round to nearest (half
// up) and saturate, so that a datapath never wraps around on overflow.
// The word widths are this design's choice; the document gives none.
package vdsl_pkg;

  localparam int DW  = 16;   // sample width (real and imaginary part each)
  localparam int TWW = 16;   // twiddle / coefficient width, Q2.14
  localparam int TWF = 14;   // fractional bits of a Q2.14 number

  typedef logic signed [DW-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef struct packed {
    logic signed [TWW-1:0] re;
    logic signed [TWW-1:0] im;
  } tw_t;

  // FFT lengths selected by the five modes (mode 1 = 512 ... mode 5 = 8192).
  typedef enum logic [2:0] {
    MODE_512  = 3'd1,
    MODE_1K   = 3'd2,
    MODE_2K   = 3'd3,
    MODE_4K   = 3'd4,
    MODE_8K   = 3'd5
  } fft_mode_e;

  // Rotation applied after an SDF butterfly stage (see fft_sdf_stage).
  typedef enum int {
    TW_NONE = 0,   // no rotation (last butterfly of the transform)
    TW_R2   = 1,   // radix-2 stage: W_M^n on the lower half
    TW_NJ   = 2,   // first butterfly of a radix-2/4/8 element: -j
    TW_W8   = 3,   // second butterfly of a radix-2/4/8 element: W_8^m
    TW_PE   = 4    // third butterfly of a radix-2/4/8 element: W_M^(n*k)
  } tw_kind_e;

  // Saturate a wide signed value to DW bits.
  function automatic sample_t sat(input logic signed [47:0] v);
    if (v > 48'sd32767)       return sample_t'(16'sh7fff);
    else if (v < -48'sd32768) return sample_t'(16'sh8000);
    else                      return sample_t'(v[DW-1:0]);
  endfunction

  // Optional halving with rounding, then saturation.
  function automatic sample_t scale_sat(input logic signed [47:0] v, input logic half);
    logic signed [47:0] r;
    r = half ? ((v + 48'sd1) >>> 1) : v;
    return sat(r);
  endfunction

  // Complex sample times Q2.14 twiddle, rounded and saturated.
  function automatic cplx_t cmul_tw(input cplx_t a, input tw_t w);
    logic signed [47:0] pr, pi;
    cplx_t r;
    pr = 48'(a.re) * 48'(w.re) - 48'(a.im) * 48'(w.im);
    pi = 48'(a.re) * 48'(w.im) + 48'(a.im) * 48'(w.re);
    r.re = sat((pr + 48'sd8192) >>> TWF);
    r.im = sat((pi + 48'sd8192) >>> TWF);
    return r;
  endfunction

  // Multiply by -j: (a + jb)(-j) = b - ja.
  function automatic cplx_t mul_mj(input cplx_t a);
    cplx_t r;
    r.re = a.im;
    r.im = sat(-48'(a.re));
    return r;
  endfunction

  // Exchange real and imaginary parts; FFT(swap(x)) swapped is N*IDFT(x).
  function automatic cplx_t swap_ri(input cplx_t a);
    cplx_t r;
    r.re = a.im;
    r.im = a.re;
    return r;
  endfunction

  function automatic cplx_t conj(input cplx_t a);
    cplx_t r;
    r.re = a.re;
    r.im = sat(-48'(a.im));
    return r;
  endfunction

endpackage
