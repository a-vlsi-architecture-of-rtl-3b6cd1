// tb_feq: equalises all 4096 tones of a random channel.
//
// Each tone gets a random bit count (2 to 10 bits: 4- up to 1024-QAM, 0 on
// a few tones) and a random complex channel gain H of magnitude 0.5 to 1.
// The FEQ sees X = H * S plus +-1 LSB noise. Phase 1 trains with known
// QPSK-like references; phase 2 runs decision directed on random points
// of each tone's constellation. Checks: every equalised output equals
// C * X recomputed here from a model of the coefficient update, every
// decision in phase 2 equals the transmitted point, and each trained
// coefficient matches 1/H to within 2^-8 relative.
module tb_feq;
  import vdsl_pkg::*;

  localparam int NT  = 4096;
  localparam int TW  = $clog2(NT);
  localparam int DSH = 9;
  localparam int D   = 1 << DSH;
  localparam int NTRAIN = 60, NDD = 4;
  localparam real PI = 3.14159265358979323846;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          in_valid = 1'b0;
  logic [TW-1:0] in_tone;
  cplx_t         in, ref_sym;
  logic          train, adapt;
  logic [3:0]    mu_shift;
  logic          bt_we = 1'b0;
  logic [TW-1:0] bt_addr;
  logic [3:0]    bt_bits;
  logic          out_valid;
  logic [TW-1:0] out_tone;
  cplx_t         out_y, out_dec, out_err;
  logic [3:0]    out_bits;

  feq #(.NTONES(NT), .DSH(DSH)) dut (.*);

  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  int  nbits [NT];
  real hr [NT], hi [NT];
  longint mcr [NT], mci [NT];    // model of the coefficients, 24 fractional bits

  initial begin
    repeat ((NTRAIN + NDD + 3) * NT + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  function automatic int rpoint(input int m);
    if (m == 0) return 0;
    return (2 * $urandom_range(0, (1 << m) - 1) - ((1 << m) - 1)) * D;
  endfunction

  // expected output of one sample, with the coefficient model updated
  cplx_t exp_y [$];
  cplx_t exp_d [$];

  task automatic send(input int k, input int sr, input int si, input bit tr);
    real xr, xi;
    int  ixr, ixi, yr, yi, er, ei, dr, di;
    longint pr, pi;
    xr  = hr[k] * sr - hi[k] * si;
    xi  = hr[k] * si + hi[k] * sr;
    ixr = $rtoi(xr) + $urandom_range(0, 2) - 1;
    ixi = $rtoi(xi) + $urandom_range(0, 2) - 1;
    pr  = mcr[k] * ixr - mci[k] * ixi;
    pi  = mcr[k] * ixi + mci[k] * ixr;
    yr  = clip((pr + (64'sd1 <<< 23)) >>> 24);
    yi  = clip((pi + (64'sd1 <<< 23)) >>> 24);
    dr  = sr; di = si;        // decisions must match what was sent
    er  = clip(longint'(dr) - yr);
    ei  = clip(longint'(di) - yi);
    if (nbits[k] != 0) begin
      mcr[k] += (longint'(er) * ixr + longint'(ei) * ixi) * 256 >>> mu_shift;
      mci[k] += (longint'(ei) * ixr - longint'(er) * ixi) * 256 >>> mu_shift;
      exp_y.push_back('{re: sample_t'(yr), im: sample_t'(yi)});
      exp_d.push_back('{re: sample_t'(sr), im: sample_t'(si)});
    end
    @(negedge clk);
    in_valid = 1'b1;
    in_tone  = TW'(k);
    in.re    = sample_t'(ixr);
    in.im    = sample_t'(ixi);
    train    = tr;
    ref_sym.re = sample_t'(sr);
    ref_sym.im = sample_t'(si);
  endtask

  bit dd_phase = 1'b0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_bits != 0) begin
      cplx_t ey, ed;
      ey = exp_y.pop_front();
      ed = exp_d.pop_front();
      checks++;
      if (out_y != ey) begin
        failures++;
        if (failures < 10) $display("tone %0d dd %0d: y (%0d,%0d) expected (%0d,%0d)", out_tone, dd_phase,
                                    out_y.re, out_y.im, ey.re, ey.im);
      end
      if (dd_phase) begin
        checks++;
        if (out_dec != ed) begin
          failures++;
          if (failures < 10) $display("tone %0d: decision (%0d,%0d) sent (%0d,%0d)", out_tone,
                                      out_dec.re, out_dec.im, ed.re, ed.im);
        end
      end
    end
  end

  initial begin
    int choice [6] = '{0, 2, 4, 6, 9, 10};
    adapt = 1'b1;
    mu_shift = 4'd9;
    train = 1'b1;
    in = '0; ref_sym = '0; in_tone = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NT; k++) begin
      real mag, ph;
      nbits[k] = choice[$urandom_range(0, 5)];
      mag = 0.5 + 0.5 * real'($urandom_range(0, 1000)) / 1000.0;
      ph  = 2.0 * PI * real'($urandom_range(0, 1000)) / 1000.0;
      hr[k] = mag * $cos(ph);
      hi[k] = mag * $sin(ph);
      mcr[k] = 64'sd1 <<< 24;
      mci[k] = 0;
      @(negedge clk);
      bt_we = 1'b1; bt_addr = TW'(k); bt_bits = 4'(nbits[k]);
    end
    @(negedge clk);
    bt_we = 1'b0;
    for (int s = 0; s < NTRAIN; s++)
      for (int k = 0; k < NT; k++)
        send(k, ($urandom_range(0, 1) ? 4096 : -4096), ($urandom_range(0, 1) ? 4096 : -4096), 1'b1);
    @(negedge clk);
    in_valid = 1'b0;
    @(negedge clk);
    dd_phase = 1'b1;
    mu_shift = 4'd14;     // large constellations need a smaller step
    for (int s = 0; s < NDD; s++)
      for (int k = 0; k < NT; k++)
        send(k, rpoint((nbits[k] + 1) / 2), rpoint(nbits[k] / 2), 1'b0);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    // coefficient against 1/H
    for (int k = 0; k < NT; k++) begin
      if (nbits[k] != 0) begin
        real m2, ir, ii, cr, ci, d;
        m2 = hr[k] * hr[k] + hi[k] * hi[k];
        ir = hr[k] / m2; ii = -hi[k] / m2;
        cr = real'(mcr[k]) / 16777216.0;
        ci = real'(mci[k]) / 16777216.0;
        d  = $sqrt((cr - ir) * (cr - ir) + (ci - ii) * (ci - ii)) / $sqrt(ir * ir + ii * ii);
        checks++;
        if (d > 1.0 / 256.0) begin
          failures++;
          if (failures < 10) $display("tone %0d: C off by %f relative", k, d);
        end
      end
    end
    checks++;
    if (exp_y.size() != 0) begin failures++; $display("%0d outputs missing", exp_y.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
