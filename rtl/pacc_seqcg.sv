// Pipelined phase accumulator (PACC) with sequential clock gating, for a
// direct digital frequency synthesiser.
//
// Each cycle the accumulator adds the frequency control word (FCW) to an
// N-bit phase; the K upper bits are the phase output for the
// phase-to-amplitude converter that follows. For speed the N-bit accumulator
// is cut into M pipelined blocks of N/M bits (pipelined_acc). The FCW blocks
// reach those blocks through the triangular pre-skewing register
// (preskew_array) and the top K bits are re-aligned by the post-skewing
// register (postskew).
//
// Power: the pre-skewing register is the largest group of flip-flops, and
// its contents only change when the FCW changes. Its columns are therefore
// clocked by sequentially gated clocks (seq_gck_gen): a load pulse enables
// column 0 for one cycle, column 1 for one cycle one cycle later, and so on,
// so a new FCW takes M cycles to move through the array and each column sees
// one clock pulse per load. Accumulator and post-skew registers run on the
// free-running clock.
//
// Interface: clk, rst_n (asynchronous, active low, clears every register),
// load (high for one cycle with a new fcw; may be high on consecutive
// cycles), fcw[N-1:0], phase[K-1:0], col_en[M-1:0] (which pre-skewing
// columns are clocked on the next edge, for activity monitoring).
//
// Timing: with the FCW sampled on the edge where load is high (edge t), the
// phase is P(e) = P(e-1) + F(e-1), F being the FCW held in column 0, and the
// output after edge e is the upper K bits of P(e-M+1). The new FCW first
// shows on phase after edge t+M. Structure, sizes (N = 32, M = 8, K = 12)
// and the gating scheme follow the published design; reset, the load timing and the
// latch-based clock gates are this implementation's choices.
module pacc_seqcg #(
  parameter int unsigned N = pacc_pkg::PACC_N,
  parameter int unsigned M = pacc_pkg::PACC_M,
  parameter int unsigned K = pacc_pkg::PACC_K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] fcw,
  output logic [K-1:0] phase,
  output logic [M-1:0] col_en
);

  logic [M-1:0] gck;
  logic [N-1:0] skew_fcw;
  logic [N-1:0] acc_skew;

  seq_gck_gen #(.M(M)) u_gck_gen (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (load),
    .col_en (col_en),
    .gck    (gck)
  );

  preskew_array #(.N(N), .M(M)) u_preskew (
    .gck      (gck),
    .rst_n    (rst_n),
    .fcw      (fcw),
    .skew_fcw (skew_fcw)
  );

  pipelined_acc #(.N(N), .M(M)) u_acc (
    .clk      (clk),
    .rst_n    (rst_n),
    .skew_fcw (skew_fcw),
    .acc_skew (acc_skew)
  );

  postskew #(.N(N), .M(M), .K(K)) u_postskew (
    .clk     (clk),
    .rst_n   (rst_n),
    .acc_top (acc_skew[N-1 -: K]),
    .phase   (phase)
  );

endmodule
