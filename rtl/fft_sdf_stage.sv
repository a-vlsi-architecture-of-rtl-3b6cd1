// fft_sdf_stage: one single-path delay feedback (SDF) radix-2 butterfly.
//
// A frame of CM samples streams in, one per enabled cycle. While the
// counter's phase bit (weight L) is 0 the input is written into an L-deep
// delay line and the stage outputs what the line returns: the difference
// terms of the previous half block. While it is 1 the stage outputs
// head + in and feeds head - in back into the line. The output is then
// rotated by the factor selected by KIND (see vdsl_pkg::tw_kind_e) from the
// output position within the CM-sample block:
//   TW_R2 : position k*L + n, multiply by W_(2L)^n when k = 1
//   TW_NJ : bits k1 n2 of the position, multiply by -j when both are 1
//   TW_W8 : bits k1 k2 n3, multiply by W_8^(k1+2*k2) when n3 = 1
//   TW_PE : bits k1 k2 k3 n4, multiply by W_CM^(n4*(k1+2*k2+4*k3))
// Interface: en advances the whole stage (data, counter, output register);
// in_sof marks the first sample of a frame (a frame is a whole number of
// CM-sample blocks), out_sof the first output of that frame. Latency: L + 1 enabled cycles. scale halves the butterfly sums
// with rounding. The butterfly, the delay feedback and the split of the
// radix-2/4/8 twiddles follow the document's architecture; the enable
// handshake, the rounding and the frame markers are this design's choice.
module fft_sdf_stage
  import vdsl_pkg::*;
#(
  parameter int       L    = 4,       // delay line depth
  parameter int       CM   = 8,       // counter modulus: 2L, or the element size
  parameter tw_kind_e KIND = TW_R2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  scale,
  input  cplx_t in,
  input  logic  in_sof,
  output cplx_t out,
  output logic  out_sof
);
  localparam int CW = $clog2(CM);
  localparam int LB = $clog2(L);          // bit that selects the half
  localparam int AW = (L > 1) ? LB : 1;

  logic [CW-1:0] cnt, idx, opos;
  logic          phase;
  logic          pend;                    // a frame start is on its way through
  logic [AW-1:0] addr;
  cplx_t         mem [L];
  cplx_t         head, bf_out, bf_fb, rot;

  assign idx   = in_sof ? '0 : cnt;
  assign phase = idx[LB];
  assign opos  = idx - CW'(L);
  if (L > 1) begin : g_addr
    assign addr = idx[AW-1:0];
  end else begin : g_addr1
    assign addr = '0;
  end
  assign head = mem[addr];

  always_comb begin
    if (phase) begin
      bf_out.re = scale_sat(48'(head.re) + 48'(in.re), scale);
      bf_out.im = scale_sat(48'(head.im) + 48'(in.im), scale);
      bf_fb.re  = scale_sat(48'(head.re) - 48'(in.re), scale);
      bf_fb.im  = scale_sat(48'(head.im) - 48'(in.im), scale);
    end else begin
      bf_out = head;
      bf_fb  = in;
    end
  end

  // Rotation of the butterfly output by its position in the block.
  if (KIND == TW_R2) begin : g_r2
    tw_t w;
    fft_twiddle_rom #(.N(2 * L)) u_rom (.e(opos[LB:0] & {1'b0, {LB{1'b1}}}), .w(w));
    assign rot = opos[LB] ? cmul_tw(bf_out, w) : bf_out;
  end else if (KIND == TW_NJ) begin : g_nj
    assign rot = (opos[CW-1] && opos[CW-2]) ? mul_mj(bf_out) : bf_out;
  end else if (KIND == TW_W8) begin : g_w8
    localparam tw_t W8_1 = '{re: 16'sd11585, im: -16'sd11585};
    localparam tw_t W8_3 = '{re: -16'sd11585, im: -16'sd11585};
    logic [1:0] m;
    assign m = {opos[CW-2], opos[CW-1]};   // k1 + 2*k2
    always_comb begin
      if (!opos[CW-3]) rot = bf_out;
      else begin
        unique case (m)
          2'd0: rot = bf_out;
          2'd1: rot = cmul_tw(bf_out, W8_1);
          2'd2: rot = mul_mj(bf_out);
          default: rot = cmul_tw(bf_out, W8_3);
        endcase
      end
    end
  end else if (KIND == TW_PE && CW > 3) begin : g_pe
    tw_t           w;
    logic [2:0]    kk;
    logic [CW-1:0] e;
    assign kk = {opos[CW-3], opos[CW-2], opos[CW-1]};  // k1 + 2*k2 + 4*k3
    assign e  = CW'(opos[CW-4:0] * kk);                // modulo CM
    fft_twiddle_rom #(.N(CM)) u_rom (.e(e), .w(w));
    assign rot = cmul_tw(bf_out, w);
  end else begin : g_none
    assign rot = bf_out;
  end

  always_ff @(posedge clk) begin
    if (en) mem[addr] <= bf_fb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      pend    <= 1'b0;
      out     <= '0;
      out_sof <= 1'b0;
    end else if (en) begin
      cnt     <= idx + 1'b1;
      out     <= rot;
      out_sof <= pend && (opos == '0);
      if (in_sof)                    pend <= 1'b1;
      else if (pend && opos == '0)   pend <= 1'b0;
    end
  end
endmodule
