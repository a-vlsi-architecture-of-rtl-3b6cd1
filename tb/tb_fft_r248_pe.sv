// tb_fft_r248_pe: a 64-point radix-2/4/8 element followed by an 8-point
// one forms a complete 64-point FFT. Random frames are streamed through
// with random stalls and every output, in bit-reversed order, is compared
// with a double-precision DFT divided by 64 (all butterflies halve), to
// within 3 LSBs. The first output must appear 7*64/8 + 3 + 7 + 3 = 69
// valid cycles after the frame's first input.
module tb_fft_r248_pe;
  import vdsl_pkg::*;
  localparam int  N  = 64;
  localparam real PI = 3.14159265358979323846;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  en = 1'b0;
  cplx_t in, mid, out;
  logic  in_sof = 1'b0, mid_sof, out_sof;

  fft_r248_pe #(.M(64)) dut (.clk, .rst_n, .en, .scale(3'b111), .in, .in_sof,
                             .out(mid), .out_sof(mid_sof));
  fft_r248_pe #(.M(8)) u_last (.clk, .rst_n, .en, .scale(3'b111), .in(mid), .in_sof(mid_sof),
                               .out, .out_sof);

  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  int  xr [8][N], xi [8][N];
  int  ofr = -1, opos = 0, ncyc = 0, sof_cyc = -1, first_out = -1;
  logic en_q = 1'b0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    en_q <= en;
    if (en) ncyc++;
  end

  function automatic int bitrev6(input int a);
    int r = 0;
    for (int b = 0; b < 6; b++) if (a & (1 << b)) r |= 1 << (5 - b);
    return r;
  endfunction

  always @(negedge clk) begin
    if (rst_n && en_q) begin
      if (out_sof) begin
        ofr++; opos = 0;
        if (first_out < 0) first_out = ncyc;
      end
      if (ofr >= 0 && ofr < 7) begin
        int  k;
        real er, ei;
        k = bitrev6(opos);
        er = 0.0; ei = 0.0;
        for (int n = 0; n < N; n++) begin
          er += xr[ofr][n] * $cos(2.0 * PI * n * k / N) + xi[ofr][n] * $sin(2.0 * PI * n * k / N);
          ei += xi[ofr][n] * $cos(2.0 * PI * n * k / N) - xr[ofr][n] * $sin(2.0 * PI * n * k / N);
        end
        er /= N; ei /= N;
        checks++;
        if (real'(out.re) - er > 3.0 || er - real'(out.re) > 3.0 ||
            real'(out.im) - ei > 3.0 || ei - real'(out.im) > 3.0) begin
          failures++;
          if (failures < 10) $display("frame %0d bin %0d got (%0d,%0d) expected (%f,%f)", ofr, k,
                                      out.re, out.im, er, ei);
        end
        opos++;
      end
    end
  end

  initial begin
    in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 8; f++) begin
      int k0;
      k0 = $urandom_range(0, N - 1);
      for (int i = 0; i < N; i++) begin
        xr[f][i] = $rtoi(12000.0 * $cos(2.0 * PI * k0 * i / N)) + $urandom_range(0, 4000) - 2000;
        xi[f][i] = $rtoi(12000.0 * $sin(2.0 * PI * k0 * i / N)) + $urandom_range(0, 4000) - 2000;
        while ($urandom_range(0, 4) == 0) begin @(negedge clk); en = 1'b0; end
        @(negedge clk);
        en = 1'b1;
        in_sof = (i == 0);
        if (f == 0 && i == 0) sof_cyc = ncyc;
        in.re = sample_t'(xr[f][i]);
        in.im = sample_t'(xi[f][i]);
      end
    end
    @(negedge clk);
    en = 1'b0;
    repeat (3) @(negedge clk);
    checks += 2;
    if (ofr < 6) begin failures++; $display("only %0d frames out", ofr); end
    if (first_out - sof_cyc != 69) begin
      failures++;
      $display("latency %0d expected 69", first_out - sof_cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
