// tb_cp_insert: writes symbols in bit-reversed order, as the IFFT delivers
// them, and reads them out with a randomly stalling reader. Each symbol
// must come out as its last CP samples followed by all NFFT samples in
// time order, with out_sos on the first. A second phase writes faster
// than the reader can send and must raise overrun.
module tb_cp_insert;
  import vdsl_pkg::*;

  localparam int NFFT = 64;
  localparam int CP   = 16;
  localparam int AW   = $clog2(NFFT);
  localparam int NSYM = 6;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          in_valid = 1'b0, in_sof = 1'b0;
  logic [AW-1:0] in_idx;
  cplx_t         in;
  logic          out_ready = 1'b0;
  logic          out_valid, out_sos, overrun;
  cplx_t         out;

  cp_insert #(.NFFT(NFFT), .CP_LEN(CP)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int rsym = 0, rpos = 0;

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AW-1:0] bitrev(input logic [AW-1:0] a);
    for (int b = 0; b < AW; b++) bitrev[b] = a[AW-1-b];
  endfunction

  // sample value: symbol number * 256 + time index
  always @(posedge clk) begin
    if (out_valid && out_ready && rsym < NSYM) begin
      int t;
      t = (rpos < CP) ? rpos + NFFT - CP : rpos - CP;
      checks++;
      if (int'(out.re) != rsym * 256 + t || out_sos != (rpos == 0)) begin
        failures++;
        $display("symbol %0d pos %0d: got %0d sos %0d", rsym, rpos, out.re, out_sos);
      end
      rpos++;
      if (rpos == NFFT + CP) begin rpos = 0; rsym++; end
    end
  end

  initial begin
    in = '0;
    in_idx = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      // writer: one symbol per NFFT + CP + a few cycles on average
      for (int s = 0; s < NSYM; s++) begin
        for (int i = 0; i < NFFT; i++) begin
          @(negedge clk);
          in_valid = 1'b1;
          in_sof   = (i == 0);
          in_idx   = bitrev(AW'(i));
          in.re    = sample_t'(s * 256 + int'(bitrev(AW'(i))));
        end
        @(negedge clk);
        in_valid = 1'b0;
        in_sof   = 1'b0;
        repeat (2 * CP + NFFT / 2) @(negedge clk);
      end
      // reader: ready most of the time
      repeat (NSYM * 2 * (NFFT + CP) + 400) begin
        @(negedge clk);
        out_ready = ($urandom_range(0, 7) != 0);
      end
    join
    checks++;
    if (rsym != NSYM || overrun) begin
      failures++;
      $display("symbols read %0d of %0d, overrun %0d", rsym, NSYM, overrun);
    end
    // second phase: reader stopped, writer keeps going
    out_ready = 1'b0;
    for (int s = 0; s < 3; s++)
      for (int i = 0; i < NFFT; i++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_sof   = (i == 0);
        in_idx   = AW'(i);
      end
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!overrun) begin
      failures++;
      $display("overrun not flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
