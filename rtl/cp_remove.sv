// cp_remove: drops the cyclic prefix and frames each symbol for the FFT.
//
// The module counts received samples modulo NFFT + CP_LEN, with the same
// numbering as sym_sync (both count the same in_valid from reset). Once a
// boundary has been given (boundary_valid), the NFFT samples that follow
// the CP_LEN prefix samples after each boundary, moved BACKOFF samples
// earlier, are passed on with
// out_valid, the first of them flagged with out_sof; prefix samples are
// dropped. Starting a little inside the prefix keeps the window clear of
// the next symbol when the boundary estimate is a sample late; the early
// start only rotates each tone's phase, which the FEQ removes. A later
// boundary replaces the earlier one, so the window follows a moving
// symbol timing, except that moves of up to TOL samples are ignored: the
// estimator's peak can alternate between two neighbouring samples, and
// each such jump would turn the FEQ's per-tone phases.
// Interface: combinational from in to out (same cycle); locked reports
// that a boundary has been received.
// The document names this block (removing the cyclic prefix, serial to
// parallel); with a streaming FFT the data stay serial, and the framing
// is this design's choice.
module cp_remove
  import vdsl_pkg::*;
#(
  parameter int NFFT   = 8192,
  parameter int CP_LEN = 640,
  parameter int BACKOFF = 4,    // window starts this many samples early
  parameter int TOL     = 1     // boundary moves up to this size are ignored
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_valid,
  input  cplx_t                            in,
  input  logic                             boundary_valid,
  input  logic [$clog2(NFFT + CP_LEN)-1:0] boundary,
  output logic                             locked,
  output logic                             out_valid,
  output logic                             out_sof,
  output cplx_t                            out
);
  localparam int SYM = NFFT + CP_LEN;
  localparam int PW  = $clog2(SYM);

  logic [PW-1:0] pos, start, rel, cand, mv;
  logic          jump;

  // Window start implied by the reported boundary, and how far it lies
  // from the current start (cyclically). Once locked, a move of at most
  // TOL samples either way is treated as estimator jitter and ignored.
  always_comb begin
    logic [PW:0] m;
    cand = PW'(({1'b0, boundary} + (PW + 1)'(CP_LEN + 1 - BACKOFF)) % (PW + 1)'(SYM));
    m    = {1'b0, cand} + (PW + 1)'(SYM) - {1'b0, start};
    if (m >= (PW + 1)'(SYM)) m = m - (PW + 1)'(SYM);
    mv   = m[PW-1:0];
    jump = !locked || (mv > PW'(TOL) && mv < PW'(SYM - TOL));
  end

  // Offset of the current sample from the first data sample of a symbol.
  always_comb begin
    logic [PW:0] d;
    d   = {1'b0, pos} + (PW + 1)'(SYM) - {1'b0, start};
    if (d >= (PW + 1)'(SYM)) d = d - (PW + 1)'(SYM);
    rel = d[PW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos    <= '0;
      start  <= '0;
      locked <= 1'b0;
    end else begin
      if (in_valid) pos <= (pos == PW'(SYM - 1)) ? '0 : pos + 1'b1;
      if (boundary_valid) begin
        locked <= 1'b1;
        // first data sample: boundary + 1 + CP_LEN - BACKOFF, modulo the period
        if (jump) start <= cand;
      end
    end
  end

  assign out_valid = in_valid && locked && (rel < PW'(NFFT));
  assign out_sof   = out_valid && (rel == '0);
  assign out       = in;
endmodule
