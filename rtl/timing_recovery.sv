// timing_recovery: digital part of the pilot-tone timing recovery PLL.
//
// The pilot tone (PILOT = 64) is sent as a known constant point P. A
// sampling-clock offset rotates the received pilot X by an angle
// proportional to the timing error, so the phase detector forms
// pd = Im(X * conj(P)) >> PD_SH, which for small errors is proportional to
// the phase. A first-order prefilter pf += (pd - pf) >> PF_SH smooths it
// with a bandwidth several times that of the loop; the loop filter is
// proportional plus integral: integ += pf >> KI_SH, ctrl = integ +
// (pf >> KP_SH). Prefilter and loop filter together form a second-order
// loop. ctrl is the code for the DAC that steers the VCO of the ADC clock.
// Interface: the FFT output stream (in_valid, in_bin, in); one update per
// symbol, when the pilot bin passes; ctrl and pd_out change one cycle
// later, with ctrl_valid. The shifts are configuration inputs.
// Phase detector, prefilter, loop filter and the pilot tone follow the
// document; the detector formula, filter forms and widths are this
// design's choice.
module timing_recovery
  import vdsl_pkg::*;
#(
  parameter int PILOT = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [12:0]        in_bin,
  input  cplx_t              in,
  input  cplx_t              pilot_ref,
  input  logic [4:0]         pd_sh,
  input  logic [3:0]         pf_sh,
  input  logic [4:0]         kp_sh,
  input  logic [4:0]         ki_sh,
  output logic               ctrl_valid,
  output logic signed [15:0] ctrl,
  output logic signed [31:0] pd_out,
  output logic signed [31:0] pf_out
);
  logic signed [47:0] xprod;
  logic signed [31:0] pd, pf, pf_n, integ, integ_n;
  logic signed [47:0] c_n;

  always_comb begin
    xprod   = 48'(in.im) * 48'(pilot_ref.re) - 48'(in.re) * 48'(pilot_ref.im);
    pd      = 32'(xprod >>> pd_sh);
    pf_n    = pf + ((pd - pf) >>> pf_sh);
    integ_n = integ + (pf_n >>> ki_sh);
    c_n     = 48'(integ_n) + 48'(pf_n >>> kp_sh);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pf         <= '0;
      integ      <= '0;
      ctrl       <= '0;
      ctrl_valid <= 1'b0;
      pd_out     <= '0;
    end else begin
      ctrl_valid <= 1'b0;
      if (in_valid && in_bin == 13'(PILOT)) begin
        pf         <= pf_n;
        integ      <= integ_n;
        ctrl       <= sat(c_n);
        ctrl_valid <= 1'b1;
        pd_out     <= pd;
      end
    end
  end
  assign pf_out = pf;
endmodule
