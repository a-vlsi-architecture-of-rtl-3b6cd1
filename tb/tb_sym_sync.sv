// tb_sym_sync: checks the correlation estimator on a stream of DMT-like
// symbols (random data with a copied cyclic prefix) that starts at a
// random offset. Every reported boundary must lie within one sample of a
// symbol's last sample (one sample later the window has lost one prefix
// term and gained one random term, so the maximum can land there), and
// the reported peak metric must equal |re| + |im| of the correlation sum
// recomputed here from the stored stream at the reported position.
// Random input stalls are used.
module tb_sym_sync;
  import vdsl_pkg::*;

  localparam int NFFT = 8192;
  localparam int CP   = 640;
  localparam int SYM  = NFFT + CP;
  localparam int PW   = $clog2(SYM);
  localparam int NSYM = 7;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          in_valid = 1'b0;
  cplx_t         in;
  logic [PW-1:0] pos, boundary;
  logic          boundary_valid;
  logic [47:0]   peak_metric;

  sym_sync #(.NFFT(NFFT), .CP_LEN(CP)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, reports = 0;
  longint nin = 0;                 // valid samples so far
  int off;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (boundary_valid) begin
      longint g;
      g = nin - 1;       // global index of the last sample of the period
      reports++;
      checks += 2;
      if (int'(boundary) != (off + SYM - 1) % SYM && int'(boundary) != off % SYM) begin
        failures++;
        $display("boundary %0d expected %0d", boundary, (off + SYM - 1) % SYM);
      end
      begin
        longint gb, sr, si, m;
        gb = g - (SYM - 1) + longint'(boundary);   // global index of the peak
        sr = 0; si = 0;
        for (longint i = gb - CP + 1; i <= gb; i++) begin
          sr += longint'(hr[i]) * hr[i - NFFT] + longint'(hi[i]) * hi[i - NFFT];
          si += longint'(hi[i]) * hr[i - NFFT] - longint'(hr[i]) * hi[i - NFFT];
        end
        m = (sr < 0 ? -sr : sr) + (si < 0 ? -si : si);
        if (longint'(peak_metric) != m) begin
          failures++;
          $display("metric %0d expected %0d", peak_metric, m);
        end
      end
    end
    if (in_valid) nin++;
  end

  task automatic send(input int re, input int im);
    hr[sent] = re;
    hi[sent] = im;
    while ($urandom_range(0, 15) == 0) begin
      in_valid <= 1'b0; @(posedge clk);
    end
    in_valid <= 1'b1;
    in.re <= sample_t'(re);
    in.im <= sample_t'(im);
    @(posedge clk);
  endtask

  int dr [NFFT], di [NFFT];
  int hr [SYM * (NSYM + 1)], hi [SYM * (NSYM + 1)];  // stream history
  longint sent;

  initial begin
    off = $urandom_range(1, SYM - 1);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    sent = 0;
    for (int i = 0; i < off; i++) begin send(0, 0); sent++; end
    for (int s = 0; s < NSYM; s++) begin
      for (int i = 0; i < NFFT; i++) begin
        dr[i] = $urandom_range(0, 6000) - 3000;
        di[i] = $urandom_range(0, 6000) - 3000;
      end
      for (int i = NFFT - CP; i < NFFT; i++) begin send(dr[i], di[i]); sent++; end
      for (int i = 0; i < NFFT; i++) begin send(dr[i], di[i]); sent++; end
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (reports < NSYM - 3) begin
      failures++;
      $display("only %0d boundary reports", reports);
    end
    $display("offset %0d, %0d boundary reports", off, reports);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
