// Post-skewing register and phase truncation.
//
// Only the K most significant accumulator bits are kept; they form S = K/W
// blocks of W = N/M bits, the accumulator blocks M-S .. M-1. Block j of the
// skewed accumulator is M-1-j cycles ahead of the top block, so it passes
// through M-1-j flip-flop stages and all K bits leave aligned, with the
// latency of the top block. The register holds K(KM/N - 1)/2 flip-flops
// (12 for N = 32, M = 8, K = 12). The top block goes straight to the output.
//
// Ports: clk, rst_n (asynchronous, active low), acc_top[K-1:0] (the K upper
// bits of the skewed accumulator), phase[K-1:0] (aligned, truncated phase).
// K must be a multiple of W, which holds for the default sizes; the
// published flip-flop count K(KM/N - 1)/2 makes the same assumption.
module postskew #(
  parameter int unsigned N = pacc_pkg::PACC_N,
  parameter int unsigned M = pacc_pkg::PACC_M,
  parameter int unsigned K = pacc_pkg::PACC_K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] acc_top,
  output logic [K-1:0] phase
);

  localparam int unsigned W = N / M;
  localparam int unsigned S = K / W;

  if (K % W != 0 || K > N || K == 0) begin : g_bad_size
    $error("postskew: K must be a non-zero multiple of N/M, at most N");
  end

  for (genvar i = 0; i < S; i++) begin : g_blk
    // Local block i is accumulator block M-S+i; it needs S-1-i delays.
    localparam int unsigned D = S - 1 - i;

    if (D == 0) begin : g_direct
      assign phase[i*W +: W] = acc_top[i*W +: W];
    end else begin : g_delay
      logic [W-1:0] dly [D];

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int d = 0; d < D; d++) dly[d] <= '0;
        end else begin
          dly[0] <= acc_top[i*W +: W];
          for (int d = 1; d < D; d++) dly[d] <= dly[d-1];
        end
      end

      assign phase[i*W +: W] = dly[D-1];
    end
  end

endmodule
