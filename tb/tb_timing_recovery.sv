// tb_timing_recovery: closes the timing loop around a behavioural model of
// the DAC, VCO and sampling clock, and checks that it locks for symbol
// rate offsets of +200 ppm and -200 ppm.
//
// Model: per symbol the sampling instant drifts by offset * (NFFT + CP)
// samples and moves by G * ctrl samples (G = 1/256 sample per code). A
// timing error tau rotates the pilot tone by -2*pi*PILOT*tau/NFFT. Only
// bins 63 to 65 are presented each symbol (bin 64 is the pilot). Checks:
// every ctrl equals the value recomputed here from the detector and filter
// equations; after 800 symbols the residual timing error is under 0.1
// sample and ctrl cancels the drift to within 2 %.
module tb_timing_recovery;
  import vdsl_pkg::*;

  localparam int  NFFT  = 8192;
  localparam int  SYM   = NFFT + 640;
  localparam int  PILOT = 64;
  localparam real PI    = 3.14159265358979323846;
  localparam real G     = 1.0 / 256.0;
  localparam real A     = 8000.0;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               in_valid = 1'b0;
  logic [12:0]        in_bin;
  cplx_t              in, pilot_ref;
  logic [4:0]         pd_sh, kp_sh, ki_sh;
  logic [3:0]         pf_sh;
  logic               ctrl_valid;
  logic signed [15:0] ctrl;
  logic signed [31:0] pd_out, pf_out;

  timing_recovery #(.PILOT(PILOT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real ppm);
    real tau, drift;
    longint pf, integ;
    tau = 0.0;
    drift = ppm * 1.0e-6 * SYM;
    pf = 0; integ = 0;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 800; s++) begin
      real ph;
      int xr, xi;
      longint pd, c;
      ph = -2.0 * PI * PILOT * tau / NFFT;
      xr = $rtoi(A * $cos(ph));
      xi = $rtoi(A * $sin(ph));
      for (int b = 63; b <= 65; b++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_bin   = 13'(b);
        in.re    = (b == PILOT) ? sample_t'(xr) : sample_t'(1000);
        in.im    = (b == PILOT) ? sample_t'(xi) : sample_t'(-3000);
      end
      @(negedge clk);
      in_valid = 1'b0;
      // reference model of detector and filters
      pd    = (longint'(xi) * 8000) >>> pd_sh;
      pf    = pf + ((pd - pf) >>> pf_sh);
      integ = integ + (pf >>> ki_sh);
      c     = integ + (pf >>> kp_sh);
      if (c > 32767) c = 32767;
      if (c < -32768) c = -32768;
      checks++;
      if (longint'(ctrl) != c) begin
        failures++;
        if (failures < 10) $display("symbol %0d: ctrl %0d expected %0d", s, ctrl, c);
      end
      // behavioural DAC + VCO: the next symbol's timing error
      tau = tau + drift + G * real'(ctrl);
    end
    $display("%0.0f ppm: residual timing error %f samples, ctrl %0d (drift needs %f)",
             ppm, tau, ctrl, -drift / G);
    checks += 2;
    if (tau > 0.1 || tau < -0.1) begin failures++; $display("not locked"); end
    if ((real'(ctrl) + drift / G) > 0.02 * drift / G * (drift > 0 ? 1.0 : -1.0) ||
        (real'(ctrl) + drift / G) < -0.02 * drift / G * (drift > 0 ? 1.0 : -1.0)) begin
      failures++;
      $display("ctrl does not cancel the drift");
    end
  endtask

  initial begin
    pilot_ref = '{re: 16'sd8000, im: 16'sd0};
    pd_sh = 5'd12; pf_sh = 4'd2; kp_sh = 5'd3; ki_sh = 5'd5;
    in = '0; in_bin = '0;
    run(200.0);
    run(-200.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
