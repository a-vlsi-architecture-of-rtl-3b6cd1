// tb_cp_remove: feeds a counting sample stream, gives a symbol boundary,
// and checks that exactly the NFFT samples after each prefix come out,
// the first flagged with out_sof (the window starts BO samples early).
// The boundary is then moved: by one sample, which must be ignored, and
// to a random place, which the window must follow.
module tb_cp_remove;
  import vdsl_pkg::*;

  localparam int NFFT = 64;
  localparam int CP   = 16;
  localparam int BO   = 4;
  localparam int SYM  = NFFT + CP;
  localparam int PW   = $clog2(SYM);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          in_valid = 1'b0;
  cplx_t         in;
  logic          boundary_valid = 1'b0;
  logic [PW-1:0] boundary;
  logic          locked, out_valid, out_sof;
  cplx_t         out;

  cp_remove #(.NFFT(NFFT), .CP_LEN(CP), .BACKOFF(BO)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int nin = 0, bnd = -1, outs = 0, sofs = 0;

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: position of each sample relative to the first data sample
  always @(posedge clk) begin
    if (in_valid) begin
      int rel;
      bit exp_v, exp_s;
      rel   = ((nin % SYM) - ((bnd + 1 + CP - BO) % SYM) + 2 * SYM) % SYM;
      exp_v = (bnd >= 0) && (rel < NFFT);
      exp_s = exp_v && (rel == 0);
      checks++;
      if (out_valid != exp_v || out_sof != exp_s || (out_valid && int'(out.re) != nin % 30000)) begin
        failures++;
        $display("sample %0d: valid %0d sof %0d, expected %0d %0d", nin, out_valid, out_sof, exp_v, exp_s);
      end
      outs += out_valid;
      sofs += out_sof;
      nin++;
    end
    // a move of one sample either way is ignored once locked
    if (boundary_valid) begin
      int mv;
      mv = (int'(boundary) - bnd + SYM) % SYM;
      if (bnd < 0 || (mv > 1 && mv < SYM - 1)) bnd = int'(boundary);
    end
  end

  task automatic run(input int n);
    for (int i = 0; i < n; i++) begin
      in_valid <= ($urandom_range(0, 4) != 0);
      in.re    <= sample_t'((nin + (in_valid ? 1 : 0)) % 30000);
      @(posedge clk);
    end
  endtask

  initial begin
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // drive samples in lockstep with the reference counter
    for (int phase = 0; phase < 3; phase++) begin
      for (int i = 0; i < 3 * SYM; i++) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 4) != 0);
        in.re    = sample_t'(nin % 30000);
        in.im    = '0;
      end
      @(negedge clk);
      in_valid = 1'b0;
      // the second move is one sample, which must be ignored
      boundary = (phase == 1) ? PW'((bnd + 1) % SYM) : PW'($urandom_range(0, SYM - 1));
      boundary_valid = 1'b1;
      @(negedge clk);
      boundary_valid = 1'b0;
    end
    for (int i = 0; i < 3 * SYM; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in.re    = sample_t'(nin % 30000);
    end
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (sofs < 6 || outs < 6 * NFFT) begin
      failures++;
      $display("too few frames: %0d sof, %0d samples", sofs, outs);
    end
    $display("frames %0d, samples %0d", sofs, outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
