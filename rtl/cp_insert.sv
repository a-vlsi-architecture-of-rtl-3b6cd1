// cp_insert: puts IFFT output in time order and prepends the cyclic prefix.
//
// The IFFT delivers each symbol's NFFT samples in bit-reversed order,
// tagged with their time index. They are written at that index into one
// half of a two-symbol buffer. When a symbol is complete its half is
// handed to the reader, which sends CP_LEN prefix samples (indices
// NFFT-CP_LEN .. NFFT-1) and then all NFFT samples in order, while the
// other half fills with the next symbol (parallel to serial conversion).
// Interface: in_valid/in_sof/in_idx/in from the IFFT; out_valid/out_ready
// towards the DAC, out_sos marks the first prefix sample of a symbol. A
// sample written into a half that still holds an unsent symbol raises
// overrun, which stays set until reset. The writer side must deliver NFFT samples in at most
// the NFFT + CP_LEN output cycles the reader needs per symbol.
// Adding the prefix and the parallel to serial step are the document's;
// the buffering and handshake are this design's choice.
module cp_insert
  import vdsl_pkg::*;
#(
  parameter int NFFT   = 8192,
  parameter int CP_LEN = 640
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_sof,
  input  logic [$clog2(NFFT)-1:0]  in_idx,
  input  cplx_t                    in,
  input  logic                     out_ready,
  output logic                     out_valid,
  output logic                     out_sos,
  output cplx_t                    out,
  output logic                     overrun
);
  localparam int AW = $clog2(NFFT);
  localparam int RW = $clog2(NFFT + CP_LEN);

  cplx_t         buffer [2 * NFFT];
  logic          wsel;            // half being written
  logic [AW:0]   wcount;          // samples written in the current half
  logic          full  [2];       // half holds a complete symbol
  logic          rsel;            // half being read
  logic [RW-1:0] rcnt;            // read position within prefix + symbol
  logic [AW-1:0] raddr;
  logic          wr_done;

  assign wr_done = in_valid && (wcount == (AW + 1)'(NFFT - 1)) && !in_sof;

  always_ff @(posedge clk) begin
    if (in_valid) buffer[{wsel, in_idx}] <= in;
  end

  assign raddr     = (rcnt < RW'(CP_LEN)) ? AW'(rcnt + RW'(NFFT - CP_LEN)) : AW'(rcnt - RW'(CP_LEN));
  assign out_valid = full[rsel];
  assign out_sos   = out_valid && (rcnt == '0);
  assign out       = buffer[{rsel, raddr}];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel    <= 1'b0;
      wcount  <= '0;
      full[0] <= 1'b0;
      full[1] <= 1'b0;
      rsel    <= 1'b0;
      rcnt    <= '0;
      overrun <= 1'b0;
    end else begin
      // write side
      if (in_valid) begin
        if (in_sof) wcount <= (AW + 1)'(1);
        else        wcount <= wcount + 1'b1;
      end
      if (in_valid && full[wsel]) overrun <= 1'b1;
      if (wr_done) begin
        full[wsel] <= 1'b1;
        wsel       <= ~wsel;
        wcount     <= '0;
      end
      // read side
      if (out_valid && out_ready) begin
        if (rcnt == RW'(NFFT + CP_LEN - 1)) begin
          rcnt       <= '0;
          full[rsel] <= 1'b0;
          rsel       <= ~rsel;
        end else begin
          rcnt <= rcnt + 1'b1;
        end
      end
    end
  end
endmodule
