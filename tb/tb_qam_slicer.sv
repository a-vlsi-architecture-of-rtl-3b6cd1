// tb_qam_slicer: sweeps random inputs over every bit count 0..15 and
// compares the decision with a brute-force nearest-point search over the
// constellation's levels on each axis (levels whose point does not fit in
// a 16-bit sample are left out).
module tb_qam_slicer;
  import vdsl_pkg::*;

  localparam int DSH = 9;
  localparam int D   = 1 << DSH;

  cplx_t      in, dec;
  logic [3:0] bits;

  qam_slicer #(.DSH(DSH)) dut (.*);

  int checks = 0, failures = 0;

  function automatic int nearest(input int v, input int m);
    int best, bd;
    if (m == 0) return 0;
    best = 0; bd = 1 << 30;
    for (int l = -((1 << m) - 1); l <= (1 << m) - 1; l += 2) begin
      int p, d;
      p = l * D;
      if (p > 32767 || p < -32767) continue;   // point does not fit a sample
      d = (v - p) < 0 ? p - v : v - p;
      // ties go to the upper point
      if (d < bd || (d == bd && p > best)) begin bd = d; best = p; end
    end
    return best;
  endfunction

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int mr, mi;
      bits  = 4'($urandom_range(0, 15));
      in.re = sample_t'($urandom_range(0, 65535));
      in.im = sample_t'($urandom_range(0, 65535));
      if (t % 3 == 0) begin
        in.re = sample_t'($urandom_range(0, 8000) - 4000);
        in.im = sample_t'($urandom_range(0, 8000) - 4000);
      end
      #1;
      mr = (int'(bits) + 1) / 2;
      mi = int'(bits) / 2;
      checks++;
      if (int'(dec.re) != nearest(int'(in.re), mr) || int'(dec.im) != nearest(int'(in.im), mi)) begin
        failures++;
        if (failures < 10)
          $display("bits %0d in (%0d,%0d) got (%0d,%0d) expected (%0d,%0d)", bits, in.re, in.im,
                   dec.re, dec.im, nearest(int'(in.re), mr), nearest(int'(in.im), mi));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
