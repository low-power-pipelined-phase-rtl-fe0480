// Pre-skewing flip-flop array of the pipelined phase accumulator.
//
// The N-bit frequency control word (FCW) is cut into M blocks of W = N/M
// bits. Accumulator block j runs j cycles behind block 0, so FCW block j has
// to reach it j cycles later; the array is a triangle of registers: column 0
// holds all M blocks, column c holds blocks c .. M-1, and column c copies
// blocks c .. M-1 of column c-1. Block j leaves the array from column j
// (skew_fcw[jW +: W]). In total the array holds N(M+1)/2 flip-flops.
//
// Every column runs on a clock of its own, gck[c]. Driven by the sequential
// gated clock generator, column c is clocked once, c cycles after a load, so
// the FCW moves through the triangle from left to right and the array is
// not clocked at all while the FCW is unchanged. With all gck tied to one
// free-running clock the same array is the conventional pre-skewing
// register.
//
// Ports: gck[M-1:0] (column clocks), rst_n (asynchronous, active low; the
// reset must not depend on a clock, as the columns are gated), fcw[N-1:0]
// (input word, sampled by column 0), skew_fcw[N-1:0] (block j taken from
// column j).
module preskew_array #(
  parameter int unsigned N = pacc_pkg::PACC_N,
  parameter int unsigned M = pacc_pkg::PACC_M
) (
  input  logic [M-1:0] gck,
  input  logic         rst_n,
  input  logic [N-1:0] fcw,
  output logic [N-1:0] skew_fcw
);

  localparam int unsigned W = N / M;

  if (N % M != 0) begin : g_bad_size
    $error("preskew_array: N must be a multiple of M");
  end

  for (genvar c = 0; c < M; c++) begin : g_col
    // Column c stores blocks c .. M-1: bit 0 of q is bit c*W of the FCW.
    logic [N-c*W-1:0] q;

    if (c == 0) begin : g_first
      always_ff @(posedge gck[c] or negedge rst_n) begin
        if (!rst_n) q <= '0;
        else        q <= fcw;
      end
    end else begin : g_next
      always_ff @(posedge gck[c] or negedge rst_n) begin
        if (!rst_n) q <= '0;
        else        q <= g_col[c-1].q[N-(c-1)*W-1:W];
      end
    end

    assign skew_fcw[c*W +: W] = q[W-1:0];
  end

endmodule
