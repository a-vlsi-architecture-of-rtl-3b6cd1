// qam_slicer: decision device for the QAM constellation of one tone.
//
// A tone carrying `bits` bits uses ceil(bits/2) bits on the real axis and
// floor(bits/2) on the imaginary axis. An axis with m bits has the 2^m
// points +-1, +-3, ... +-(2^m - 1) times the grid step D = 2^DSH; the
// slicer rounds each axis to the nearest odd multiple of D and clips to
// the outermost point, or to the largest odd level whose point still fits
// in a sample when the constellation is too large for the grid step
// (D = 512 fits 63 levels per side, enough for 1024-QAM). An axis with
// no bits decides 0, and bits = 0 (an
// unused tone) decides 0 + 0j. Purely combinational.
// The document shows a decision device after each FEQ tap and 512- and
// 1024-point constellations; the rectangular layout for odd bit counts
// and the grid step are this design's choice.
module qam_slicer
  import vdsl_pkg::*;
#(
  parameter int DSH = 9
) (
  input  cplx_t      in,
  input  logic [3:0] bits,
  output cplx_t      dec
);
  // largest odd level whose point fits in a sample
  localparam int TOPL = ((32767 >> DSH) % 2 == 1) ? (32767 >> DSH) : (32767 >> DSH) - 1;

  function automatic sample_t slice_axis(input sample_t v, input logic [4:0] m);
    logic signed [DW:0] q, lim;
    if (m == 0) return '0;
    q   = (DW + 1)'(v >>> (DSH + 1)) * 2 + 1;      // nearest odd level
    lim = (m > 5'd15) ? (DW + 1)'(TOPL) : (DW + 1)'((1 << m) - 1);
    if (lim > (DW + 1)'(TOPL)) lim = (DW + 1)'(TOPL);
    if (q > lim)  q = lim;
    if (q < -lim) q = -lim;
    return sat(48'(q) <<< DSH);
  endfunction

  logic [4:0] mre, mim;
  assign mre = ({1'b0, bits} + 5'd1) >> 1;
  assign mim = {1'b0, bits} >> 1;
  assign dec.re = slice_axis(in.re, mre);
  assign dec.im = slice_axis(in.im, mim);
endmodule
