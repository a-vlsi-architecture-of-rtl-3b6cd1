// sym_sync: correlation estimator that finds the DMT symbol boundary.
//
// A DMT symbol is NFFT samples preceded by a cyclic prefix of CP_LEN
// samples copied from its last CP_LEN samples, so the received signal is
// correlated with itself NFFT samples earlier exactly over the prefix.
// Datapath: an NFFT-deep delay line, the conjugate of the delayed sample
// times the current one, a running sum of the last CP_LEN products, its
// magnitude |re| + |im|, and a search for the maximum over each symbol
// period of NFFT + CP_LEN samples. The sum peaks when its window covers the
// prefix and its copy, that is on the last sample of a symbol.
// Interface: one sample per in_valid. A free-running counter numbers the
// samples modulo NFFT + CP_LEN (pos). At the end of each period, once the
// delay line has filled, boundary_valid pulses and boundary gives the pos
// of the largest correlation in that period: the last sample of a
// symbol, so the next symbol's prefix starts at boundary + 1.
// The delay line, conjugate, multiplier, accumulator, magnitude and
// maximum search follow the document's correlation estimator; the running
// window, the magnitude measure and the prefix length are this design's
// choices.
module sym_sync
  import vdsl_pkg::*;
#(
  parameter int NFFT   = 8192,
  parameter int CP_LEN = 640
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                in_valid,
  input  cplx_t                               in,
  output logic [$clog2(NFFT + CP_LEN)-1:0]    pos,
  output logic                                boundary_valid,
  output logic [$clog2(NFFT + CP_LEN)-1:0]    boundary,
  output logic [47:0]                         peak_metric
);
  localparam int SYM = NFFT + CP_LEN;
  localparam int PW  = $clog2(SYM);
  localparam int DAW = $clog2(NFFT);
  localparam int CAW = $clog2(CP_LEN);

  typedef struct packed {
    logic signed [32:0] re;
    logic signed [32:0] im;
  } prod_t;

  cplx_t             dline [NFFT];
  prod_t             pline [CP_LEN];
  logic [DAW-1:0]    da;
  logic [CAW-1:0]    ca;
  cplx_t             old;
  prod_t             p, p_old;
  logic signed [47:0] acc_re, acc_im, nacc_re, nacc_im;
  logic [47:0]       mag, best;
  logic [PW-1:0]     best_pos;
  logic [1:0]        filled;                 // periods seen since reset
  logic              dl_full, pl_full;       // delay lines hold real history

  // Until a line has been filled once its contents count as zero.
  assign old   = dl_full ? dline[da] : '0;
  assign p_old = pl_full ? pline[ca] : '0;

  // conj(old) * in
  always_comb begin
    p.re = 33'(in.re) * 33'(old.re) + 33'(in.im) * 33'(old.im);
    p.im = 33'(in.im) * 33'(old.re) - 33'(in.re) * 33'(old.im);
    nacc_re = acc_re + 48'(p.re) - 48'(p_old.re);
    nacc_im = acc_im + 48'(p.im) - 48'(p_old.im);
    mag = 48'(nacc_re < 0 ? -nacc_re : nacc_re) + 48'(nacc_im < 0 ? -nacc_im : nacc_im);
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      dline[da] <= in;
      pline[ca] <= p;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      da             <= '0;
      ca             <= '0;
      pos            <= '0;
      acc_re         <= '0;
      acc_im         <= '0;
      best           <= '0;
      best_pos       <= '0;
      filled         <= '0;
      dl_full        <= 1'b0;
      pl_full        <= 1'b0;
      boundary_valid <= 1'b0;
      boundary       <= '0;
      peak_metric    <= '0;
    end else begin
      boundary_valid <= 1'b0;
      if (in_valid) begin
        da     <= (da == DAW'(NFFT - 1))  ? '0 : da + 1'b1;
        ca     <= (ca == CAW'(CP_LEN - 1)) ? '0 : ca + 1'b1;
        if (da == DAW'(NFFT - 1))  dl_full <= 1'b1;
        if (ca == CAW'(CP_LEN - 1)) pl_full <= 1'b1;
        acc_re <= nacc_re;
        acc_im <= nacc_im;
        if (pos == PW'(SYM - 1)) begin
          pos <= '0;
          // report this period's maximum, then start a new search
          if (filled == 2'd2) begin
            boundary_valid <= 1'b1;
            boundary       <= (mag > best) ? pos : best_pos;
            peak_metric    <= (mag > best) ? mag : best;
          end else begin
            filled <= filled + 1'b1;
          end
          best     <= '0;
          best_pos <= '0;
        end else begin
          pos <= pos + 1'b1;
          if (mag > best) begin
            best     <= mag;
            best_pos <= pos;
          end
        end
      end
    end
  end
endmodule
