// tb_fft_sdf_stage: one radix-2 SDF stage with L = 4 (8-sample blocks).
// For random frames it checks a[n] = x[n] + x[n+4] on the first four
// outputs and b[n] = (x[n] - x[n+4]) * W_8^n on the next four, both
// unscaled and halved, and that out_sof marks the first output of a
// frame L + 1 cycles after its first input.
module tb_fft_sdf_stage;
  import vdsl_pkg::*;
  localparam int  L  = 4;
  localparam real PI = 3.14159265358979323846;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  en = 1'b0;
  logic  scale;
  cplx_t in, out;
  logic  in_sof = 1'b0, out_sof;

  fft_sdf_stage #(.L(L), .CM(2 * L), .KIND(TW_R2)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [64][8], xi [64][8];
  int ofr = -1, opos = 0, ncyc = 0, sof_cyc = -1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && en) begin
      ncyc++;
    end
    if (rst_n && out_sof && ofr < 0) begin
      checks++;
      if (ncyc - sof_cyc != L + 1) begin
        failures++;
        $display("latency %0d expected %0d", ncyc - sof_cyc, L + 1);
      end
    end
  end

  // compare the registered output after each enabled cycle
  always @(negedge clk) begin
    if (rst_n && en_q) begin
      if (out_sof) begin ofr++; opos = 0; end
      if (ofr >= 0 && ofr + opos / (2 * L) < 63) begin
        real er, ei, ar, ai, ang;
        int n, fr, p;
        fr = ofr + opos / (2 * L);   // frames follow each other without markers
        p  = opos % (2 * L);
        n  = p % L;
        if (p < L) begin
          er = xr[fr][n] + xr[fr][n + L];
          ei = xi[fr][n] + xi[fr][n + L];
          if (fr >= 32) begin er = $floor((er + 1.0) / 2.0); ei = $floor((ei + 1.0) / 2.0); end
        end else begin
          ar = xr[fr][n] - xr[fr][n + L];
          ai = xi[fr][n] - xi[fr][n + L];
          if (fr >= 32) begin ar = $floor((ar + 1.0) / 2.0); ai = $floor((ai + 1.0) / 2.0); end
          ang = -2.0 * PI * n / (2 * L);
          er = ar * $cos(ang) - ai * $sin(ang);
          ei = ar * $sin(ang) + ai * $cos(ang);
        end
        checks++;
        if (real'(out.re) - er > 1.5 || er - real'(out.re) > 1.5 ||
            real'(out.im) - ei > 1.5 || ei - real'(out.im) > 1.5) begin
          failures++;
          if (failures < 10) $display("frame %0d pos %0d got (%0d,%0d) expected (%f,%f)", fr, p,
                                      out.re, out.im, er, ei);
        end
        opos++;
      end
    end
  end

  logic en_q = 1'b0;
  always @(posedge clk) en_q <= en;

  initial begin
    in = '0;
    scale = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 64; f++) begin
      for (int i = 0; i < 2 * L; i++) begin
        xr[f][i] = $urandom_range(0, 20000) - 10000;
        xi[f][i] = $urandom_range(0, 20000) - 10000;
        while ($urandom_range(0, 3) == 0) begin @(negedge clk); en = 1'b0; end
        @(negedge clk);
        en = 1'b1;
        if (f == 32 && i == 0) scale = 1'b1;   // frames 32 and later are halved
        in_sof = (f == 0 && i == 0);
        if (f == 0 && i == 0) sof_cyc = ncyc;
        in.re = sample_t'(xr[f][i]);
        in.im = sample_t'(xi[f][i]);
      end
    end
    @(negedge clk);
    en = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (ofr + opos / (2 * L) < 60) begin failures++; $display("only %0d frames out", ofr + opos / (2 * L)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
