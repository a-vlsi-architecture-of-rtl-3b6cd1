// fft_twiddle_rom: twiddle factor table W_N^e = exp(-j*2*pi*e/N).
//
// Only a quarter period (e = 0 .. N/4-1) is stored; the table is computed
// at elaboration from cos/sin and rounded to Q2.14. The full circle is
// rebuilt from the quarter using W^(q*N/4 + i) = (-j)^q * W^i, so the two
// top bits of the exponent only select a swap and sign change.
// Interface: e is the exponent modulo N, w the factor, combinational (read
// as an asynchronous ROM). N is a power of two, at least 4.
// The document names the twiddle factors of the radix-2/4/8 transform; the
// table layout and its Q2.14 format are this design's choice.
module fft_twiddle_rom
  import vdsl_pkg::*;
#(
  parameter int N = 8192
) (
  input  logic [$clog2(N)-1:0] e,
  output tw_t                  w
);
  localparam int EW = $clog2(N);
  localparam int Q  = N / 4;

  typedef logic signed [TWW-1:0] coef_t;

  function automatic coef_t [Q-1:0] make_table(input bit use_sin);
    coef_t [Q-1:0] t;
    real ang;
    for (int i = 0; i < Q; i++) begin
      ang  = 2.0 * 3.14159265358979323846 * real'(i) / real'(N);
      t[i] = coef_t'($rtoi($floor((use_sin ? $sin(ang) : $cos(ang)) * 16384.0 + 0.5)));
    end
    return t;
  endfunction

  localparam coef_t [Q-1:0] COS_T = make_table(1'b0);
  localparam coef_t [Q-1:0] SIN_T = make_table(1'b1);

  logic [1:0]    quad;
  logic [EW-3:0] idx;
  coef_t         c, s;

  assign quad = e[EW-1:EW-2];
  assign idx  = e[EW-3:0];
  assign c    = COS_T[idx];
  assign s    = SIN_T[idx];

  // W^i = c - js; each quarter turn multiplies by -j.
  always_comb begin
    unique case (quad)
      2'd0: begin w.re =  c; w.im = -s; end
      2'd1: begin w.re = -s; w.im = -c; end
      2'd2: begin w.re = -c; w.im =  s; end
      default: begin w.re =  s; w.im =  c; end
    endcase
  end
endmodule
