// tb_vdsl_fft: self-checking test of the variable-length FFT/IFFT.
//
// For several modes, forward and inverse, one frame of pseudo-random data
// (two strong tones plus noise) is streamed in with random input stalls,
// followed by a frame of zeros and a few more samples that flush it. Each output is compared
// with a double-precision DFT (or IDFT with its 1/N) of the same
// quantised input, to within TOL LSBs; the bin numbers must cover every
// bin exactly once, and the first output must appear N - 1 + (number of
// butterflies) valid cycles after the frame's first input.
module tb_vdsl_fft;
  import vdsl_pkg::*;

  localparam int NMAX = 8192;
  localparam int TOL  = 4;
  localparam real PI  = 3.14159265358979323846;

  logic        clk = 1'b0;
  logic        rst_n;
  fft_mode_e   mode;
  logic        inverse;
  logic [12:0] scale;
  logic        in_valid, in_sof;
  cplx_t       in;
  logic        out_valid, out_sof;
  logic [12:0] out_bin;
  cplx_t       out;

  vdsl_fft #(.NMAX(NMAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   xr [NMAX], xi [NMAX];
  real  er [NMAX], ei [NMAX];
  real  ct [NMAX], st [NMAX];
  bit   seen [NMAX];
  int   n_valid_in, sof_at, first_out_at;
  int   got;

  task automatic make_frame(input int n, input bit inv);
    int k1, k2;
    k1 = $urandom_range(1, n - 1);
    k2 = $urandom_range(1, n - 1);
    for (int i = 0; i < n; i++) begin
      real a;
      if (inv) begin
        // frequency-domain input: a few large bins plus noise
        xr[i] = $urandom_range(0, 200) - 100;
        xi[i] = $urandom_range(0, 200) - 100;
        if (i == k1) begin xr[i] = 20000; xi[i] = -9000; end
        if (i == k2) begin xr[i] = -12000; xi[i] = 15000; end
      end else begin
        a = 2.0 * PI * real'(i) / real'(n);
        xr[i] = $rtoi(9000.0 * $cos(a * k1) + 6000.0 * $cos(a * k2)) + $urandom_range(0, 2000) - 1000;
        xi[i] = $rtoi(9000.0 * $sin(a * k1) - 6000.0 * $sin(a * k2)) + $urandom_range(0, 2000) - 1000;
      end
    end
  endtask

  task automatic ref_dft(input int n, input bit inv);
    real sgn;
    sgn = inv ? 1.0 : -1.0;
    for (int i = 0; i < n; i++) begin
      ct[i] = $cos(2.0 * PI * real'(i) / real'(n));
      st[i] = sgn * $sin(2.0 * PI * real'(i) / real'(n));
    end
    for (int k = 0; k < n; k++) begin
      real ar, ai;
      ar = 0.0; ai = 0.0;
      for (int i = 0; i < n; i++) begin
        int m;
        m = (i * k) % n;
        ar += xr[i] * ct[m] - xi[i] * st[m];
        ai += xr[i] * st[m] + xi[i] * ct[m];
      end
      er[k] = ar / real'(n);
      ei[k] = ai / real'(n);
    end
  endtask

  // Count valid input cycles so latency is measured in samples.
  // Latency: the first output appears right after the (N-1+S)-th valid
  // cycle, counting the frame's first input cycle as the first.
  always @(posedge clk) begin
    if (out_valid && out_sof && first_out_at < 0) first_out_at = n_valid_in;
    if (in_valid && in_sof && sof_at < 0) sof_at = n_valid_in;
    if (in_valid) n_valid_in++;
  end

  // Compare outputs of the first frame.
  always @(posedge clk) begin
    if (out_valid && got >= 0 && got < (1 << (8 + int'(mode)))) begin
      real dr, di;
      if (out_sof && got != 0) begin failures++; $display("unexpected sof"); end
      checks++;
      dr = real'(out.re) - er[out_bin];
      di = real'(out.im) - ei[out_bin];
      if (dr > TOL || dr < -TOL || di > TOL || di < -TOL || seen[out_bin]) begin
        failures++;
        if (failures < 10)
          $display("mode %0d inv %0d bin %0d: got (%0d,%0d) expected (%f,%f)",
                   mode, inverse, out_bin, out.re, out.im, er[out_bin], ei[out_bin]);
      end
      seen[out_bin] = 1'b1;
      got++;
    end else if (out_valid && got < 0 && out_sof) begin
      got = 0;
      // re-evaluate this first sample
      begin
        real dr, di;
        checks++;
        dr = real'(out.re) - er[out_bin];
        di = real'(out.im) - ei[out_bin];
        if (dr > TOL || dr < -TOL || di > TOL || di < -TOL) begin
          failures++;
          $display("mode %0d bin %0d first sample mismatch", mode, out_bin);
        end
        seen[out_bin] = 1'b1;
        got = 1;
      end
    end
  end

  task automatic run(input fft_mode_e m, input bit inv);
    int n, nbf;
    n   = 1 << (8 + int'(m));
    nbf = 8 + int'(m);
    mode = m; inverse = inv; scale = '1;
    in_valid = 0; in_sof = 0; in = '0;
    rst_n = 0;
    make_frame(n, inv);
    ref_dft(n, inv);
    for (int i = 0; i < NMAX; i++) seen[i] = 0;
    got = -1; first_out_at = -1; sof_at = -1; n_valid_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < n; i++) begin
        // random stalls
        while ($urandom_range(0, 9) == 0) begin
          in_valid <= 0; @(posedge clk);
        end
        in_valid <= 1;
        in_sof   <= (i == 0);
        in.re    <= (f == 0) ? sample_t'(xr[i]) : '0;
        in.im    <= (f == 0) ? sample_t'(xi[i]) : '0;
        @(posedge clk);
      end
    end
    // a few more zeros push the tail of the first frame out
    for (int i = 0; i < 32; i++) begin
      in_valid <= 1; in_sof <= (i == 0); in <= '0;
      @(posedge clk);
    end
    in_valid <= 0; in_sof <= 0;
    repeat (5) @(posedge clk);
    // every bin seen exactly once
    checks++;
    if (got != n) begin
      failures++;
      $display("mode %0d inv %0d: %0d outputs instead of %0d", m, inv, got, n);
    end
    // latency in valid input samples
    checks++;
    if (first_out_at - sof_at != n - 1 + nbf) begin
      failures++;
      $display("mode %0d: latency %0d expected %0d", m, first_out_at - sof_at, n - 1 + nbf);
    end
    $display("mode %0d (N=%0d) inverse=%0d done, latency %0d", m, n, inv, first_out_at - sof_at);
  endtask

  initial begin
    run(MODE_512, 1'b0);
    run(MODE_1K,  1'b1);
    run(MODE_2K,  1'b0);
    run(MODE_4K,  1'b1);
    run(MODE_8K,  1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
