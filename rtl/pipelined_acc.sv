// Partitioned (pipelined) N-bit accumulator.
//
// The N-bit adder and its N-bit register are split into M blocks of
// W = N/M bits. Block j adds its W-bit slice of the (pre-skewed) FCW and the
// carry that block j-1 produced one cycle earlier to its own W-bit register,
// and keeps its carry out in a flip-flop for block j+1. Each carry therefore
// crosses one block per cycle and the critical path is a W-bit adder, which
// raises the throughput by M. The carry out of the top block is dropped: the
// phase wraps modulo 2^N.
//
// Timing: if the FCW blocks arrive skewed (block j delayed by j cycles), block
// j of acc_skew holds block j of the phase of j cycles earlier than block 0
// does. The post-skewing register re-aligns the bits that are used.
//
// Ports: clk, rst_n (asynchronous, active low; clears phase and carries),
// skew_fcw[N-1:0] (pre-skewed FCW), acc_skew[N-1:0] (register contents,
// block j in bits jW +: W).
module pipelined_acc #(
  parameter int unsigned N = pacc_pkg::PACC_N,
  parameter int unsigned M = pacc_pkg::PACC_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] skew_fcw,
  output logic [N-1:0] acc_skew
);

  localparam int unsigned W = N / M;

  if (N % M != 0) begin : g_bad_size
    $error("pipelined_acc: N must be a multiple of M");
  end

  logic [M-1:0] carry;  // carry[j]: carry out of block j, registered (j < M-1)

  for (genvar j = 0; j < M; j++) begin : g_blk
    logic         cin;
    logic [W:0]   sum;

    if (j == 0) begin : g_c0
      assign cin = 1'b0;
    end else begin : g_cj
      assign cin = carry[j-1];
    end

    assign sum = {1'b0, acc_skew[j*W +: W]} + {1'b0, skew_fcw[j*W +: W]} + {{W{1'b0}}, cin};

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) acc_skew[j*W +: W] <= '0;
      else        acc_skew[j*W +: W] <= sum[W-1:0];
    end

    if (j < M - 1) begin : g_carry
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) carry[j] <= 1'b0;
        else        carry[j] <= sum[W];
      end
    end else begin : g_wrap
      assign carry[j] = 1'b0;  // carry out of the top block is discarded
    end
  end

endmodule
