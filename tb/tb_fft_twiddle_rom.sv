// tb_fft_twiddle_rom: reads every exponent of the 8192-entry circle and
// compares with exp(-j*2*pi*e/N) in Q2.14, to within one LSB.
module tb_fft_twiddle_rom;
  import vdsl_pkg::*;
  localparam int  N  = 8192;
  localparam real PI = 3.14159265358979323846;

  logic [$clog2(N)-1:0] e;
  tw_t                  w;

  fft_twiddle_rom #(.N(N)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < N; i++) begin
      real cr, ci;
      e = 13'(i);
      #1;
      cr =  16384.0 * $cos(2.0 * PI * i / N);
      ci = -16384.0 * $sin(2.0 * PI * i / N);
      checks++;
      if (real'(w.re) - cr > 1.0 || cr - real'(w.re) > 1.0 ||
          real'(w.im) - ci > 1.0 || ci - real'(w.im) > 1.0) begin
        failures++;
        if (failures < 10) $display("e=%0d got (%0d,%0d) expected (%f,%f)", i, w.re, w.im, cr, ci);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
