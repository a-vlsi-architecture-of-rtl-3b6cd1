// vdsl_fft: variable-length pipelined FFT/IFFT (512 to 8192 points).
//
// The transform is a chain of SDF stages: NMAX/1024 radix-2 stages with
// delay lines NMAX/4 ... 512 (4096, 2048, 1024, 512 for NMAX = 8192),
// then three radix-2/4/8 elements of 512, 64 and 8 points (delay lines 448,
// 56 and 7). Together they hold NMAX-1 words. A shorter transform enters
// the chain further down, so the five modes share the same hardware:
//   mode 5 -> 8192 points, first radix-2 stage
//   mode 4 -> 4096, mode 3 -> 2048, mode 2 -> 1024: later radix-2 stages
//   mode 1 -> 512 points, straight into the first radix-2/4/8 element.
// The inverse transform reuses the forward path: real and imaginary parts
// are exchanged at the input and again at the output.
// The control unit here selects the entry stage, marks valid output once
// the first frame has passed, and numbers the outputs: they leave in
// bit-reversed order and out_bin gives the frequency (or, for the inverse,
// time) index of each.
// Interface: one sample per cycle with in_valid; in_sof marks the first
// sample of each frame and frames follow each other. The pipeline moves
// only on in_valid, so the last frame leaves while the next one enters
// (feed zeros to flush). scale has one bit per butterfly, first butterfly
// in bit 0 counted from the mode's entry point; all ones gives DFT/N and,
// for the inverse, the IDFT with its 1/N. Latency: a frame's first output is
// on out in the cycle after its (N - 1 + number of butterflies)-th valid
// cycle, counting the cycle of its first input as the first. The mode must be held constant between resets.
// Stage structure, buffer sizes and modes follow the document's
// architecture; word widths, scaling, handshake and the mode numbering
// are this design's choice.
module vdsl_fft
  import vdsl_pkg::*;
#(
  parameter int NMAX = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  input  fft_mode_e   mode,
  input  logic        inverse,
  input  logic [12:0] scale,
  input  logic        in_valid,
  input  logic        in_sof,
  input  cplx_t       in,
  output logic        out_valid,
  output logic        out_sof,
  output logic [12:0] out_bin,
  output cplx_t       out
);
  localparam int LMAX = $clog2(NMAX);
  localparam int NR2  = LMAX - 9;          // number of radix-2 stages

  // ---- control unit: entry point and per-stage scaling -----------------
  logic [3:0]  log2n;                      // log2 of the active length
  logic [3:0]  first;                      // first active butterfly (0 = NR2-stage 0)
  logic [12:0] stg_scale;                  // scale per physical butterfly

  always_comb begin
    log2n = 4'd8 + 4'(mode);
    if (log2n > 4'(LMAX)) log2n = 4'(LMAX);
    first     = 4'(LMAX) - log2n;
    stg_scale = scale << first;
  end

  cplx_t sw_in;
  assign sw_in = inverse ? swap_ri(in) : in;

  // ---- radix-2 stages ---------------------------------------------------
  cplx_t d   [NR2 + 1];
  logic  sof [NR2 + 1];

  for (genvar i = 0; i < NR2; i++) begin : g_r2
    cplx_t si;
    logic  fi;
    localparam int L = NMAX >> (i + 1);
    assign si = (first == 4'(i)) ? sw_in  : d[i];
    assign fi = (first == 4'(i)) ? in_sof : sof[i];
    fft_sdf_stage #(.L(L), .CM(2 * L), .KIND(TW_R2)) u_stage (
      .clk, .rst_n, .en(in_valid), .scale(stg_scale[i]),
      .in(si), .in_sof(fi), .out(d[i + 1]), .out_sof(sof[i + 1]));
  end
  assign d[0]   = '0;
  assign sof[0] = 1'b0;

  // ---- radix-2/4/8 elements -------------------------------------------
  cplx_t pe_in, p1, p2, p3;
  logic  pe_sof, f1, f2, f3;
  assign pe_in  = (first == 4'(NR2)) ? sw_in  : d[NR2];
  assign pe_sof = (first == 4'(NR2)) ? in_sof : sof[NR2];

  fft_r248_pe #(.M(512)) u_pe512 (.clk, .rst_n, .en(in_valid), .scale(stg_scale[NR2 +: 3]),
    .in(pe_in), .in_sof(pe_sof), .out(p1), .out_sof(f1));
  fft_r248_pe #(.M(64)) u_pe64 (.clk, .rst_n, .en(in_valid), .scale(stg_scale[NR2 + 3 +: 3]),
    .in(p1), .in_sof(f1), .out(p2), .out_sof(f2));
  fft_r248_pe #(.M(8)) u_pe8 (.clk, .rst_n, .en(in_valid), .scale(stg_scale[NR2 + 6 +: 3]),
    .in(p2), .in_sof(f2), .out(p3), .out_sof(f3));

  // ---- output side: valid, frame position and bin number ---------------
  logic        v_q, primed;
  logic [12:0] pos_q, pos, rev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q    <= 1'b0;
      primed <= 1'b0;
      pos_q  <= '0;
    end else begin
      v_q <= in_valid;
      if (v_q) begin
        if (f3) primed <= 1'b1;
        pos_q <= pos + 1'b1;
      end
    end
  end

  assign pos = f3 ? '0 : pos_q;
  always_comb begin
    for (int b = 0; b < 13; b++) rev[b] = pos[12 - b];
    out_bin = rev >> (4'd13 - log2n);
  end

  assign out_valid = v_q && (primed || f3);
  assign out_sof   = v_q && f3;
  assign out       = inverse ? swap_ri(p3) : p3;
endmodule
