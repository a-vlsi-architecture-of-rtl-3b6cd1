// vdsl_transceiver: digital core of a DMT VDSL transceiver.
//
// Transmit path: frequency-domain symbols (one complex value per bin,
// Hermitian symmetric so the line signal is real) enter the shared-design
// variable-length FFT run as an IFFT; cp_insert puts the time samples in
// order and prepends the cyclic prefix; the real part goes to the DAC.
// Receive path: ADC samples pass through the TEQ (trainable LMS FIR), the
// correlation symbol synchroniser finds the symbol boundary, cp_remove
// strips the prefix and frames each symbol (following new boundaries
// only while sync_track is high, so the window can be frozen once
// training has settled), a second FFT instance
// demodulates it, and the FEQ equalises every tone and decides its QAM
// point. The timing recovery loop watches the pilot tone at the FFT
// output and produces the control word for the DAC/VCO that set the ADC
// sampling instant.
// Not included, and therefore brought out as ports: the transmit data
// interface, Reed-Solomon coding and interleaving (tx_bin_* carries
// their mapped output), the analog front ends (DAC, filter, line driver,
// transformer, AGC, ADC, VCO), the RFI canceller, the deinterleaver and
// the decoder (rx_* carries the FEQ output to them).
// The prefix and synchronisation blocks are sized for the NFFT-point mode;
// the FFTs accept all five modes. Timing: see each block; the transmit
// input may deliver at most NFFT bins per NFFT + CP_LEN output cycles.
// Some block outputs are deliberately left unread here: the imaginary
// part of the transmit samples (zero for Hermitian input), the TEQ
// coefficients, the receive FFT's frame marker, the synchroniser's sample
// position and the timing loop's internal detector and prefilter values;
// they serve the block testbenches and debugging.
module vdsl_transceiver
  import vdsl_pkg::*;
#(
  parameter int NFFT   = 8192,
  parameter int CP_LEN = 640,
  parameter int TEQ_NT = 16,
  parameter int TEQ_NB = 8,
  parameter int DMAX   = 32,
  parameter int PILOT  = 64
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // configuration
  input  fft_mode_e                      mode,
  input  logic [12:0]                    tx_scale,
  input  logic [12:0]                    rx_scale,
  // transmit: mapped QAM symbols per bin, towards the DAC
  input  logic                           tx_bin_valid,
  input  logic                           tx_bin_sof,
  input  cplx_t                          tx_bin,
  input  logic                           dac_ready,
  output logic                           dac_valid,
  output logic                           dac_sos,
  output sample_t                        dac_sample,
  output logic                           tx_overrun,
  // receive: from the ADC
  input  logic                           adc_valid,
  input  sample_t                        adc_sample,
  // TEQ training
  input  sample_t                        teq_ref,
  input  logic                           teq_adapt,
  input  logic signed [TWW-1:0]          teq_b [TEQ_NB],
  input  logic [$clog2(DMAX + 1)-1:0]    teq_delta,
  input  logic [3:0]                     teq_mu_shift,
  output sample_t                        teq_err,
  // symbol synchronisation
  input  logic                           sync_track,    // let the window follow new boundaries
  output logic                           sync_locked,
  output logic [47:0]                    sync_peak,
  output logic [$clog2(NFFT + CP_LEN)-1:0] sync_boundary,
  // FEQ
  input  logic                           feq_train,
  input  cplx_t                          feq_ref,
  input  logic                           feq_adapt,
  input  logic [3:0]                     feq_mu_shift,
  input  logic                           bt_we,
  input  logic [$clog2(NFFT / 2)-1:0]    bt_addr,
  input  logic [3:0]                     bt_bits,
  output logic                           fft_out_valid,
  output logic [12:0]                    fft_out_bin,
  output logic                           rx_valid,
  output logic [$clog2(NFFT / 2)-1:0]    rx_tone,
  output logic [3:0]                     rx_bits,
  output cplx_t                          rx_y,
  output cplx_t                          rx_dec,
  output cplx_t                          rx_err,
  // timing recovery, towards the VCO DAC
  input  cplx_t                          pilot_ref,
  input  logic [4:0]                     tr_pd_sh,
  input  logic [3:0]                     tr_pf_sh,
  input  logic [4:0]                     tr_kp_sh,
  input  logic [4:0]                     tr_ki_sh,
  output logic                           vco_ctrl_valid,
  output logic signed [15:0]             vco_ctrl
);
  localparam int TW = $clog2(NFFT / 2);
  localparam int PW = $clog2(NFFT + CP_LEN);

  // ---------------- transmitter ----------------
  logic        ifft_v, ifft_sof;
  logic [12:0] ifft_bin;
  cplx_t       ifft_out, dac_c;

  vdsl_fft #(.NMAX(NFFT)) u_ifft (
    .clk, .rst_n, .mode, .inverse(1'b1), .scale(tx_scale),
    .in_valid(tx_bin_valid), .in_sof(tx_bin_sof), .in(tx_bin),
    .out_valid(ifft_v), .out_sof(ifft_sof), .out_bin(ifft_bin), .out(ifft_out));

  cp_insert #(.NFFT(NFFT), .CP_LEN(CP_LEN)) u_cp_ins (
    .clk, .rst_n, .in_valid(ifft_v), .in_sof(ifft_sof),
    .in_idx(ifft_bin[$clog2(NFFT)-1:0]), .in(ifft_out),
    .out_ready(dac_ready), .out_valid(dac_valid), .out_sos(dac_sos), .out(dac_c),
    .overrun(tx_overrun));
  assign dac_sample = dac_c.re;

  // ---------------- receiver ----------------
  sample_t                   teq_z;
  logic signed [TWW-1:0]     teq_w [TEQ_NT];
  cplx_t                     teq_c, fft_in, fft_out;
  logic                      bnd_v, fft_in_v, fft_in_sof, fft_sof;
  logic [PW-1:0]             bnd, sync_pos;
  logic [47:0]               sync_metric;

  teq #(.NT(TEQ_NT), .NB(TEQ_NB), .DMAX(DMAX)) u_teq (
    .clk, .rst_n, .in_valid(adc_valid), .y(adc_sample), .x(teq_ref), .adapt(teq_adapt),
    .b(teq_b), .delta(teq_delta), .mu_shift(teq_mu_shift), .z(teq_z), .e(teq_err),
    .w_out(teq_w));

  assign teq_c = '{re: teq_z, im: '0};

  sym_sync #(.NFFT(NFFT), .CP_LEN(CP_LEN)) u_sync (
    .clk, .rst_n, .in_valid(adc_valid), .in(teq_c), .pos(sync_pos),
    .boundary_valid(bnd_v), .boundary(bnd), .peak_metric(sync_metric));
  assign sync_boundary = bnd;
  assign sync_peak     = sync_metric;

  cp_remove #(.NFFT(NFFT), .CP_LEN(CP_LEN)) u_cp_rem (
    .clk, .rst_n, .in_valid(adc_valid), .in(teq_c), .boundary_valid(bnd_v && sync_track), .boundary(bnd),
    .locked(sync_locked), .out_valid(fft_in_v), .out_sof(fft_in_sof), .out(fft_in));

  vdsl_fft #(.NMAX(NFFT)) u_fft (
    .clk, .rst_n, .mode, .inverse(1'b0), .scale(rx_scale),
    .in_valid(fft_in_v), .in_sof(fft_in_sof), .in(fft_in),
    .out_valid(fft_out_valid), .out_sof(fft_sof), .out_bin(fft_out_bin), .out(fft_out));

  // Bins 0 .. NFFT/2-1 carry the tones; the upper half mirrors them.
  feq #(.NTONES(NFFT / 2)) u_feq (
    .clk, .rst_n,
    .in_valid(fft_out_valid && fft_out_bin < 13'(NFFT / 2)),
    .in_tone(fft_out_bin[TW-1:0]), .in(fft_out),
    .train(feq_train), .ref_sym(feq_ref), .adapt(feq_adapt), .mu_shift(feq_mu_shift),
    .bt_we, .bt_addr, .bt_bits,
    .out_valid(rx_valid), .out_tone(rx_tone), .out_y(rx_y), .out_dec(rx_dec),
    .out_err(rx_err), .out_bits(rx_bits));

  logic signed [31:0] tr_pd, tr_pf;
  timing_recovery #(.PILOT(PILOT)) u_tr (
    .clk, .rst_n, .in_valid(fft_out_valid), .in_bin(fft_out_bin), .in(fft_out),
    .pilot_ref, .pd_sh(tr_pd_sh), .pf_sh(tr_pf_sh), .kp_sh(tr_kp_sh), .ki_sh(tr_ki_sh),
    .ctrl_valid(vco_ctrl_valid), .ctrl(vco_ctrl), .pd_out(tr_pd), .pf_out(tr_pf));
endmodule
