// fft_r248_pe: radix-2/4/8 process element of the pipelined FFT.
//
// Three cascaded SDF butterflies with delay lines M/2, M/4 and M/8 (448,
// 56 and 7 words for M = 512, 64 and 8) compute the first three radix-2
// steps of an M-point decimation-in-frequency transform. The radix-2^3
// factorisation leaves only trivial rotations between them: -j after the
// first butterfly and a power of W_8 after the second; a single general
// twiddle multiplier W_M^(n4*(k1+2k2+4k3)) follows the third (none when
// M = 8). The output, like that of radix-2 stages, is in bit-reversed
// order, so elements and radix-2 stages can be chained freely.
// Interface: en advances the element; in_sof/out_sof mark frame starts;
// scale[2:0] halves the sums of the first, second and third butterfly.
// Latency: 7*M/8 + 3 enabled cycles.
module fft_r248_pe
  import vdsl_pkg::*;
#(
  parameter int M = 512
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [2:0] scale,
  input  cplx_t      in,
  input  logic       in_sof,
  output cplx_t      out,
  output logic       out_sof
);
  cplx_t d1, d2;
  logic  s1, s2;

  fft_sdf_stage #(.L(M / 2), .CM(M), .KIND(TW_NJ)) u_bf1 (
    .clk, .rst_n, .en, .scale(scale[0]), .in, .in_sof, .out(d1), .out_sof(s1));
  fft_sdf_stage #(.L(M / 4), .CM(M), .KIND(TW_W8)) u_bf2 (
    .clk, .rst_n, .en, .scale(scale[1]), .in(d1), .in_sof(s1), .out(d2), .out_sof(s2));
  fft_sdf_stage #(.L(M / 8), .CM(M), .KIND(TW_PE)) u_bf3 (
    .clk, .rst_n, .en, .scale(scale[2]), .in(d2), .in_sof(s2), .out, .out_sof);
endmodule
