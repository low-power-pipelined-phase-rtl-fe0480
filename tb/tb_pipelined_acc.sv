// Self-checking testbench for pipelined_acc, the partitioned accumulator.
//
// The testbench skews the FCW itself: before edge n, block j of skew_fcw is
// block j of F(n-1-j), where F is a test sequence of FCW values. The
// reference is a full-width, unpipelined accumulator P(m) = F(0)+...+F(m-1)
// (mod 2^N): after edge n, block j of acc_skew must equal block j of
// P(n-j). The sequence holds random words for a few cycles at a time, words
// that change every cycle, all-ones words (a carry that ripples through every
// block, one block per cycle) and single-bit words, and the sum wraps many
// times. Counts of wraps and of carries across each block boundary show that
// these cases were met.
module tb_pipelined_acc;

  localparam int unsigned N = pacc_pkg::PACC_N;
  localparam int unsigned M = pacc_pkg::PACC_M;
  localparam int unsigned W = N / M;
  localparam int CYCLES = 1000;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic [N-1:0] skew_fcw = '0;
  logic [N-1:0] acc_skew;

  int checks = 0;
  int failures = 0;

  pipelined_acc #(.N(N), .M(M)) dut (
    .clk      (clk),
    .rst_n    (rst_n),
    .skew_fcw (skew_fcw),
    .acc_skew (acc_skew)
  );

  always #5 clk = ~clk;

  logic [N-1:0] F [CYCLES];
  logic [N-1:0] P [CYCLES + 1];
  int wraps = 0;
  int boundary_carries [M] = '{default: 0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  function automatic logic [N-1:0] f_at(input int i);
    return (i < 0) ? '0 : F[i];
  endfunction

  function automatic logic [N-1:0] p_at(input int i);
    return (i <= 0) ? '0 : P[i];
  endfunction

  initial begin
    // Test sequence and its reference sums.
    for (int i = 0; i < CYCLES; i++) begin
      if (i < 200)       F[i] = (i % 5 == 0) ? $urandom() : F[i-1];
      else if (i < 400)  F[i] = $urandom();
      else if (i < 500)  F[i] = '1;
      else if (i < 600)  F[i] = N'(1) << $urandom_range(0, N - 1);
      else               F[i] = (i % 17 == 0) ? $urandom() : F[i-1];
    end
    P[0] = '0;
    for (int i = 1; i <= CYCLES; i++) begin
      automatic logic [N:0] s = {1'b0, P[i-1]} + {1'b0, F[i-1]};
      P[i] = s[N-1:0];
      if (s[N]) wraps++;
      // Carry from block j into block j+1: carry out of the low (j+1)W bits.
      for (int j = 0; j < int'(M) - 1; j++) begin
        automatic logic [N-1:0] mask = (N'(1) << ((j+1)*W)) - 1;
        automatic logic [N:0]   lo   = {1'b0, P[i-1] & mask} + {1'b0, F[i-1] & mask};
        if (lo[(j+1)*W]) boundary_carries[j]++;
      end
    end

    #1 rst_n = 1'b0;
    #2;
    check(acc_skew == '0, "accumulator not cleared by reset");
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 1; n <= CYCLES; n++) begin
      // Inputs for edge n.
      for (int j = 0; j < int'(M); j++)
        skew_fcw[j*W +: W] = f_at(n - 1 - j)[j*W +: W];
      @(posedge clk);
      #1;
      begin
        automatic logic [N-1:0] e;
        for (int j = 0; j < int'(M); j++) e[j*W +: W] = p_at(n - j)[j*W +: W];
        check(acc_skew == e, $sformatf("edge %0d: acc_skew=%h expected %h", n, acc_skew, e));
      end
      @(negedge clk);
    end
    check(wraps > 10, $sformatf("only %0d wraps of the phase", wraps));
    for (int j = 0; j < int'(M) - 1; j++)
      check(boundary_carries[j] > 10, $sformatf("block boundary %0d: %0d carries", j,
                                                boundary_carries[j]));
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * CYCLES + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
