// tb_vdsl_transceiver: end-to-end run of the transceiver at full size
// (8192-point mode, 640-sample prefix, all parameters at their defaults).
//
// The transmitter is fed 4-QAM symbols on tones 1..4095 (Hermitian, so
// the line signal is real), first training symbols known to the receiver,
// then data symbols; all are random except the pilot tone 64, which stays
// fixed. (Identical repeated symbols would make the delay-N correlation
// flat over the whole symbol and leave the boundary undetermined.) Its DAC output is sent through a two-tap channel
// y = x + 0.3 x(k-1) (plus +-1 LSB noise) back into the receiver. The
// TEQ trains towards the unit target with the transmitted samples as
// reference; the synchroniser must find the symbol boundary, the FFT
// frames follow, the FEQ trains on the training symbols and then decides
// the data symbols, which must all equal what was sent.
// Mechanisms counted (each must occur): prefix insertion, boundary
// reports, receive FFT frames, TEQ updates, FEQ training samples, FEQ
// decisions, timing recovery updates. The transmit buffer must never
// overrun, and the TEQ error must fall below 1 % of the signal.
module tb_vdsl_transceiver;
  import vdsl_pkg::*;

  localparam int NFFT   = 8192;
  localparam int CP     = 640;
  localparam int SYM    = NFFT + CP;
  localparam int NTONE  = NFFT / 2;
  localparam int NTRAIN = 10;      // training symbols sent
  localparam int NDATA  = 6;       // data symbols sent
  localparam int A      = 48;      // tone amplitude at the IFFT input
  localparam int GAP    = 700;     // idle cycles between IFFT input symbols

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  fft_mode_e   mode = MODE_8K;
  logic [12:0] tx_scale = 13'd0;
  logic [12:0] rx_scale = 13'b0001111111111;
  logic        tx_bin_valid = 1'b0, tx_bin_sof = 1'b0;
  cplx_t       tx_bin = '0;
  logic        dac_ready = 1'b1;
  logic        dac_valid, dac_sos, tx_overrun;
  sample_t     dac_sample;
  logic        adc_valid = 1'b0;
  sample_t     adc_sample = '0;
  sample_t     teq_ref = '0;
  logic        teq_adapt = 1'b1;
  logic signed [TWW-1:0] teq_b [8];
  logic [5:0]  teq_delta = '0;
  logic [3:0]  teq_mu_shift = 4'd1;
  sample_t     teq_err;
  logic        sync_locked;
  logic        sync_track = 1'b1;
  logic [47:0] sync_peak;
  logic [$clog2(SYM)-1:0] sync_boundary;
  logic        feq_train = 1'b1;
  cplx_t       feq_ref;
  logic        feq_adapt = 1'b1;
  logic [3:0]  feq_mu_shift = 4'd3;
  logic        bt_we = 1'b0;
  logic [11:0] bt_addr = '0;
  logic [3:0]  bt_bits = '0;
  logic        fft_out_valid;
  logic [12:0] fft_out_bin;
  logic        rx_valid;
  logic [11:0] rx_tone;
  logic [3:0]  rx_bits;
  cplx_t       rx_y, rx_dec, rx_err;
  cplx_t       pilot_ref;
  logic [4:0]  tr_pd_sh = 5'd12, tr_kp_sh = 5'd3, tr_ki_sh = 5'd5;
  logic [3:0]  tr_pf_sh = 4'd2;
  logic        vco_ctrl_valid;
  logic signed [15:0] vco_ctrl;

  vdsl_transceiver dut (.*);

  int checks = 0, failures = 0;
  int n_cp = 0, n_bnd = 0, n_frames = 0, n_teq = 0, n_train = 0, n_dec = 0, n_tr = 0;

  initial begin
    repeat ((NTRAIN + NDATA + 6) * (SYM + GAP) + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // symbol content: 2 bits per tone, +-1 +-j; symbol 0 is the training one
  bit  tr_re [NTONE], tr_im [NTONE];
  bit  dre [NTRAIN + NDATA][NTONE], dim [NTRAIN + NDATA][NTONE];

  function automatic cplx_t point(input bit r, input bit i, input int amp);
    cplx_t c;
    c.re = sample_t'(r ? amp : -amp);
    c.im = sample_t'(i ? amp : -amp);
    return c;
  endfunction

  // ---------------- transmit side ----------------
  initial begin
    for (int k = 0; k < NTONE; k++) begin
      tr_re[k] = 1'($urandom_range(0, 1));
      tr_im[k] = 1'($urandom_range(0, 1));
    end
    for (int s = 0; s < NTRAIN + NDATA; s++)
      for (int k = 0; k < NTONE; k++) begin
        // tone 64 carries the pilot and stays fixed
        dre[s][k] = (k == 64) ? tr_re[k] : 1'($urandom_range(0, 1));
        dim[s][k] = (k == 64) ? tr_im[k] : 1'($urandom_range(0, 1));
      end
    pilot_ref = point(tr_re[64], tr_im[64], 512);
    for (int j = 0; j < 8; j++) teq_b[j] = '0;
    teq_b[0] = 16'sd16384;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // bit-loading table: 2 bits on tones 1..4095
    for (int k = 0; k < NTONE; k++) begin
      @(negedge clk);
      bt_we = 1'b1; bt_addr = 12'(k); bt_bits = (k == 0) ? 4'd0 : 4'd2;
    end
    @(negedge clk);
    bt_we = 1'b0;
    // symbols, plus two more to flush the IFFT
    for (int s = 0; s < NTRAIN + NDATA + 2; s++) begin
      for (int n = 0; n < NFFT; n++) begin
        cplx_t c;
        int ss;
        ss = (s < NTRAIN + NDATA) ? s : NTRAIN + NDATA - 1;
        if (n == 0 || n == NTONE) c = '0;
        else if (n < NTONE) c = point(dre[ss][n], dim[ss][n], A);
        else begin
          c = point(dre[ss][NFFT - n], dim[ss][NFFT - n], A);
          c.im = -c.im;
        end
        @(negedge clk);
        tx_bin_valid = 1'b1;
        tx_bin_sof   = (n == 0);
        tx_bin       = c;
      end
      @(negedge clk);
      tx_bin_valid = 1'b0;
      repeat (GAP - 1) @(negedge clk);
    end
  end

  // ---------------- channel ----------------
  int xprev = 0;
  always @(posedge clk) begin
    adc_valid <= 1'b0;
    if (rst_n && dac_valid && dac_ready) begin
      int y;
      y = int'(dac_sample) + (3 * xprev + (xprev >= 0 ? 5 : -5)) / 10 + int'($urandom_range(0, 2)) - 1;
      if (y > 32767) y = 32767;
      if (y < -32768) y = -32768;
      adc_valid  <= 1'b1;
      adc_sample <= sample_t'(y);
      teq_ref    <= dac_sample;
      xprev = int'(dac_sample);
      if (dac_sos) n_cp++;
    end
  end

  // ---------------- receive side ----------------
  real sig_e = 0.0, err_e = 0.0;
  int  nrx = 0;
  always @(posedge clk) begin
    if (rst_n && adc_valid) begin
      nrx++;
      n_teq++;
      if (nrx > 4 * SYM) begin
        sig_e += real'(teq_ref) * real'(teq_ref);
        err_e += real'(teq_err) * real'(teq_err);
      end
    end
    if (rst_n && dut.u_sync.boundary_valid) n_bnd++;
    if (rst_n && fft_out_valid && dut.fft_sof) n_frames++;
    if (rst_n && vco_ctrl_valid) n_tr++;
  end

  int fsym = -1;   // symbol number of the frame now at the FFT output
  // FEQ reference during training: the symbol that was sent, on the grid
  always_comb feq_ref = (fft_out_bin < 13'(NTONE) && fsym >= 0 && fsym < NTRAIN) ?
                        point(dre[fsym][fft_out_bin[11:0]], dim[fsym][fft_out_bin[11:0]], 512) : '0;

  // Frame bookkeeping, evaluated between clock edges. The receive sample
  // numbered r belongs to transmitted symbol r / SYM (the channel adds no
  // delay), so each FFT input frame is tagged with its symbol number; the
  // tag follows the frame to the FFT output and, one cycle later, to the
  // FEQ output, where decisions are compared with what was sent.
  int q [$];
  int fsym_prev = -1;
  always @(negedge clk) begin
    if (rst_n) begin
      if (rx_valid && rx_bits != 0) begin
        if (fsym_prev >= 0 && fsym_prev < NTRAIN) n_train++;
        else if (fsym_prev >= NTRAIN && fsym_prev < NTRAIN + NDATA) begin
          cplx_t e;
          e = point(dre[fsym_prev][rx_tone], dim[fsym_prev][rx_tone], 512);
          n_dec++;
          checks++;
          if (rx_dec != e) begin
            failures++;
            if (failures < 10) $display("symbol %0d tone %0d: decided (%0d,%0d) sent (%0d,%0d)",
                                        fsym_prev, rx_tone, rx_dec.re, rx_dec.im, e.re, e.im);
          end
        end
      end
      fsym_prev = fsym;
      if (dut.fft_in_v && dut.fft_in_sof) q.push_back(nrx / SYM);
      if (fft_out_valid && dut.fft_sof && q.size() > 0) fsym = q.pop_front();
      feq_train = (fsym < NTRAIN);
      // the window follows the synchroniser for the first frames, then stays
      sync_track = (fsym < 5);
      feq_mu_shift = feq_train ? 4'd3 : 4'd12;   // smaller step once decision-directed
    end
  end

  initial begin
    wait (rst_n);
    repeat ((NTRAIN + NDATA + 2) * (SYM + GAP) + 2 * SYM) @(posedge clk);
    checks += 9;
    if (tx_overrun) begin failures++; $display("transmit buffer overrun"); end
    if (n_cp == 0)     begin failures++; $display("no prefix inserted"); end
    if (n_bnd == 0)    begin failures++; $display("no symbol boundary found"); end
    if (n_frames == 0) begin failures++; $display("no receive FFT frame"); end
    if (n_teq == 0)    begin failures++; $display("no TEQ update"); end
    if (n_train == 0)  begin failures++; $display("no FEQ training"); end
    if (n_dec < NTONE) begin failures++; $display("too few FEQ decisions: %0d", n_dec); end
    if (n_tr == 0)     begin failures++; $display("no timing recovery update"); end
    if (err_e > 1e-4 * sig_e) begin
      failures++;
      $display("TEQ error energy %e vs signal %e", err_e, sig_e);
    end
    $display("prefixes %0d, boundaries %0d (last %0d), FFT frames %0d, TEQ updates %0d",
             n_cp, n_bnd, sync_boundary, n_frames, n_teq);
    $display("FEQ training samples %0d, decisions %0d, timing updates %0d (ctrl %0d)",
             n_train, n_dec, n_tr, vco_ctrl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
