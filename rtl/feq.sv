// feq: per-tone one-tap complex frequency domain equalizer with LMS.
//
// Every tone k has its own complex coefficient C_k. An FFT output X for
// tone k gives the equalised value Y = C_k * X and a decision: the nearest
// point of the tone's constellation (qam_slicer, bits from the bit-loading
// table) or, while training, the known reference symbol. With
// e = decision - Y the coefficient is updated as
// C_k += mu * e * conj(X), mu = 2^-(16 + mu_shift) with e and X in LSBs.
// Coefficients are stored with 24 fractional bits (range +-128); a tone
// not yet updated since reset reads as C = 1. Tones with 0 bits are
// neither decided nor updated.
// Interface: one sample per in_valid with its tone number; results leave
// one cycle later with out_valid. The bit-loading table is written through
// bt_we/bt_addr/bt_bits. Read, update and write-back of C_k happen in the
// sample's cycle, so consecutive samples may belong to the same tone.
// The one-tap structure per tone, the decision device and the LMS update
// follow the document; the conjugate of X in the update, the number
// formats, the table and the untrained default are this design's choice.
module feq
  import vdsl_pkg::*;
#(
  parameter int NTONES = 4096,
  parameter int DSH    = 9
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [$clog2(NTONES)-1:0]  in_tone,
  input  cplx_t                      in,
  input  logic                       train,
  input  cplx_t                      ref_sym,
  input  logic                       adapt,
  input  logic [3:0]                 mu_shift,
  input  logic                       bt_we,
  input  logic [$clog2(NTONES)-1:0]  bt_addr,
  input  logic [3:0]                 bt_bits,
  output logic                       out_valid,
  output logic [$clog2(NTONES)-1:0]  out_tone,
  output cplx_t                      out_y,
  output cplx_t                      out_dec,
  output cplx_t                      out_err,
  output logic [3:0]                 out_bits
);
  localparam int CF = 24;                         // fractional bits of C

  typedef struct packed {
    logic signed [31:0] re;
    logic signed [31:0] im;
  } coef_t;

  coef_t      cmem  [NTONES];
  logic [3:0] btab  [NTONES];
  logic       tvalid [NTONES];

  coef_t      c, c_new;
  cplx_t      y, dec, sl, err;
  logic [3:0] bits;
  logic signed [63:0] pr, pi, ur, ui;

  assign bits = btab[in_tone];

  always_comb begin
    c = tvalid[in_tone] ? cmem[in_tone] : '{re: 32'sd1 <<< CF, im: '0};
    pr = 64'(c.re) * 64'(in.re) - 64'(c.im) * 64'(in.im);
    pi = 64'(c.re) * 64'(in.im) + 64'(c.im) * 64'(in.re);
    y.re = sat(48'((pr + (64'sd1 <<< (CF - 1))) >>> CF));
    y.im = sat(48'((pi + (64'sd1 <<< (CF - 1))) >>> CF));
  end

  qam_slicer #(.DSH(DSH)) u_slicer (.in(y), .bits(bits), .dec(sl));

  always_comb begin
    dec    = train ? ref_sym : sl;
    err.re = sat(48'(dec.re) - 48'(y.re));
    err.im = sat(48'(dec.im) - 48'(y.im));
    // e * conj(X)
    ur = 64'(err.re) * 64'(in.re) + 64'(err.im) * 64'(in.im);
    ui = 64'(err.im) * 64'(in.re) - 64'(err.re) * 64'(in.im);
    c_new.re = c.re + 32'((ur <<< 8) >>> mu_shift);
    c_new.im = c.im + 32'((ui <<< 8) >>> mu_shift);
  end

  always_ff @(posedge clk) begin
    if (bt_we) btab[bt_addr] <= bt_bits;
    if (in_valid && adapt && bits != 0) cmem[in_tone] <= c_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTONES; k++) tvalid[k] <= 1'b0;
      out_valid <= 1'b0;
      out_tone  <= '0;
      out_y     <= '0;
      out_dec   <= '0;
      out_err   <= '0;
      out_bits  <= '0;
    end else begin
      if (in_valid && adapt && bits != 0) tvalid[in_tone] <= 1'b1;
      out_valid <= in_valid;
      if (in_valid) begin
        out_tone <= in_tone;
        out_y    <= y;
        out_dec  <= (bits != 0) ? dec : '0;
        out_err  <= (bits != 0) ? err : '0;
        out_bits <= bits;
      end
    end
  end
endmodule
