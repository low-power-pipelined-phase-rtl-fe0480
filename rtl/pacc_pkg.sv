// Shared sizes of the pipelined phase accumulator (PACC).
//
// The defaults describe the main configuration: a 32-bit phase word, an
// accumulator cut into 8 pipeline blocks of 4 bits each, and a phase output
// truncated to its 12 most significant bits. The helper functions give the
// flip-flop counts of the skewing structures, which the testbenches use to
// check the structure and to count clock activity.
package pacc_pkg;

  localparam int unsigned PACC_N = 32;  // accumulator / FCW width
  localparam int unsigned PACC_M = 8;   // pipeline blocks (stages)
  localparam int unsigned PACC_K = 12;  // truncated phase width

  // Number of pre-skewing flip-flops: block j is delayed by j+1 registers,
  // so the total is N(M+1)/2.
  function automatic int unsigned preskew_ff_count(int unsigned n, int unsigned m);
    return n * (m + 1) / 2;
  endfunction

  // Flip-flops in pre-skewing column c (c = 0 .. M-1): column c holds the
  // blocks c .. M-1 of the FCW.
  function automatic int unsigned preskew_col_width(int unsigned n, int unsigned m,
                                                     int unsigned c);
    return n - c * (n / m);
  endfunction

  // Number of post-skewing flip-flops for a k-bit output: k(kM/N - 1)/2.
  function automatic int unsigned postskew_ff_count(int unsigned n, int unsigned m,
                                                     int unsigned k);
    return k * (k * m / n - 1) / 2;
  endfunction

endpackage
