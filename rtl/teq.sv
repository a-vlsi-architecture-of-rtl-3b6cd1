// teq: adaptive time domain equalizer trained with LMS.
//
// The received real samples y pass through an NT-tap FIR filter w, whose
// output z = w * y is the equalised signal. During training the known
// transmitted samples x, delayed by delta, pass through the NB-tap target
// response b; the error e = b * x(k - delta) - w * y drives the update
// w_i += mu * e * y(k - i), with e and y in sample LSBs, w as a real
// number and mu = 2^-(30 + mu_shift). The trained w shortens the channel so that channel followed by
// TEQ approximates the short target b.
// Coefficients are Q2.14 (1.0 = 16384); each is kept with 16 further
// fractional bits so small updates accumulate. w starts as a unit impulse
// (w_0 = 1.0) at reset.
// Interface: one sample per in_valid; z and e are combinational for the
// current sample (the filter's delay line holds the past NT-1 samples);
// adapt enables the update; b, delta and mu_shift are configuration;
// w_out shows the coefficients.
// The filter, the target, the delay and the LMS update follow the
// document's equations (1)-(3); tap counts, word widths, the maximum delay
// and the initial value are this design's choice.
module teq
  import vdsl_pkg::*;
#(
  parameter int NT   = 16,   // TEQ taps
  parameter int NB   = 8,    // target response taps
  parameter int DMAX = 32    // largest training delay delta
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  sample_t                       y,
  input  sample_t                       x,
  input  logic                          adapt,
  input  logic signed [TWW-1:0]         b [NB],
  input  logic [$clog2(DMAX + 1)-1:0]   delta,
  input  logic [3:0]                    mu_shift,
  output sample_t                       z,
  output sample_t                       e,
  output logic signed [TWW-1:0]         w_out [NT]
);
  localparam int XL = DMAX + NB;

  sample_t            yh [NT-1];    // yh[i] = y(k-1-i)
  sample_t            xh [XL-1];    // xh[i] = x(k-1-i)
  sample_t            yl [NT];      // yl[i] = y(k-i), current sample first
  sample_t            xl [XL];      // xl[i] = x(k-i)
  logic signed [31:0] wacc [NT];    // Q2.30 coefficients
  logic signed [47:0] zsum, dsum;
  sample_t            d;

  always_comb begin
    yl[0] = y;
    xl[0] = x;
    for (int i = 1; i < NT; i++) yl[i] = yh[i-1];
    for (int i = 1; i < XL; i++) xl[i] = xh[i-1];
  end

  for (genvar i = 0; i < NT; i++) begin : g_w
    assign w_out[i] = wacc[i][31:16];
  end

  always_comb begin
    zsum = '0;
    for (int i = 0; i < NT; i++) zsum += 48'(yl[i]) * 48'(w_out[i]);
    dsum = '0;
    for (int j = 0; j < NB; j++) dsum += 48'(xl[int'(delta) + j]) * 48'(b[j]);
    z = sat((zsum + 48'sd8192) >>> TWF);
    d = sat((dsum + 48'sd8192) >>> TWF);
    e = sat(48'(d) - 48'(z));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NT - 1; i++) yh[i] <= '0;
      for (int i = 0; i < XL - 1; i++) xh[i] <= '0;
      for (int i = 0; i < NT; i++) wacc[i] <= (i == 0) ? 32'sh4000_0000 : '0;
    end else if (in_valid) begin
      for (int i = 0; i < NT - 1; i++) yh[i] <= yl[i];
      for (int i = 0; i < XL - 1; i++) xh[i] <= xl[i];
      if (adapt)
        for (int i = 0; i < NT; i++)
          wacc[i] <= wacc[i] + 32'((48'(e) * 48'(yl[i])) >>> mu_shift);
    end
  end
endmodule
