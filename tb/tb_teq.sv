// tb_teq: trains the TEQ on a three-tap channel towards a two-tap target.
//
// x is white random data, y = h * x rounded plus +-1 LSB noise with
// h = [1, 0.5, 0.2]; the target is b = [1, 0.3] with delta = 2. Checks:
// every filter output z and error e equal the values recomputed here from
// the coefficients the TEQ shows (z = w * y, e = b * x(k-2) - z, both
// rounded to nearest); after training the shortening SNR (target energy
// over error energy, last 2000 samples) exceeds 40 dB; and the cascade
// w * h matches the target within 0.01 at every lag.
module tb_teq;
  import vdsl_pkg::*;

  localparam int NT = 16, NB = 8, DMAX = 32;
  localparam int NS = 8000;

  logic                     clk = 1'b0;
  logic                     rst_n = 1'b0;
  logic                     in_valid = 1'b0;
  sample_t                  y, x, z, e;
  logic                     adapt;
  logic signed [TWW-1:0]    b [NB];
  logic [$clog2(DMAX+1)-1:0] delta;
  logic [3:0]               mu_shift;
  logic signed [TWW-1:0]    w_out [NT];

  teq #(.NT(NT), .NB(NB), .DMAX(DMAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xs [NS], ys [NS];
  real h [3] = '{1.0, 0.5, 0.2};
  real sig = 0.0, err = 0.0;

  initial begin
    repeat (NS * 2 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd14(input longint v);
    return (v + 8192) >>> 14;
  endfunction

  function automatic int clip(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  initial begin
    for (int j = 0; j < NB; j++) b[j] = '0;
    b[0] = 16'sd16384;
    b[1] = 16'sd4915;     // 0.3
    delta = 2;
    mu_shift = 0;
    adapt = 1'b1;
    y = '0; x = '0;
    for (int k = 0; k < NS; k++) begin
      real acc;
      xs[k] = $urandom_range(0, 8000) - 4000;
      acc = 0.0;
      for (int i = 0; i < 3; i++) if (k - i >= 0) acc += h[i] * xs[k - i];
      ys[k] = $rtoi(acc + (acc >= 0 ? 0.5 : -0.5)) + $urandom_range(0, 2) - 1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NS; k++) begin
      @(negedge clk);
      in_valid = 1'b1;
      x = sample_t'(xs[k]);
      y = sample_t'(ys[k]);
      #1;
      begin
        longint zs, ds;
        int ze, de, ee;
        zs = 0; ds = 0;
        for (int i = 0; i < NT; i++) if (k - i >= 0) zs += longint'(w_out[i]) * ys[k - i];
        for (int j = 0; j < NB; j++) if (k - 2 - j >= 0) ds += longint'(b[j]) * xs[k - 2 - j];
        ze = clip(rnd14(zs));
        de = clip(rnd14(ds));
        ee = clip(longint'(de) - ze);
        checks++;
        if (int'(z) != ze || int'(e) != ee) begin
          failures++;
          if (failures < 10) $display("k=%0d z %0d/%0d e %0d/%0d", k, z, ze, e, ee);
        end
        if (k >= NS - 2000) begin
          sig += real'(de) * de;
          err += real'(ee) * ee;
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    begin
      real ssnr;
      ssnr = 10.0 * $log10(sig / (err + 1e-9));
      $display("shortening SNR after training: %0.1f dB", ssnr);
      checks++;
      if (ssnr < 40.0) begin failures++; $display("SSNR below 40 dB"); end
    end
    // cascade of channel and TEQ against the delayed target
    for (int l = 0; l < NT + 2; l++) begin
      real c, t;
      c = 0.0;
      for (int i = 0; i < NT; i++) if (l - i >= 0 && l - i < 3) c += (real'(w_out[i]) / 16384.0) * h[l - i];
      t = (l == 2) ? 1.0 : (l == 3) ? 0.3 : 0.0;
      checks++;
      if (c - t > 0.01 || t - c > 0.01) begin
        failures++;
        $display("lag %0d: cascade %f target %f", l, c, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
