// Self-checking testbench for postskew, the post-skewing register.
//
// A new random word is applied to acc_top after every rising edge, standing
// for the register outputs of the accumulator. With A(k) the word applied
// after edge k, block i of phase must then equal block i of A(k - D_i), where
// D_i = S-1-i is the delay of that block (S = K/(N/M) blocks, the top one
// undelayed). The reset value is checked too.
module tb_postskew;

  localparam int unsigned N = pacc_pkg::PACC_N;
  localparam int unsigned M = pacc_pkg::PACC_M;
  localparam int unsigned K = pacc_pkg::PACC_K;
  localparam int unsigned W = N / M;
  localparam int unsigned S = K / W;
  localparam int CYCLES = 500;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic [K-1:0] acc_top = '0;
  logic [K-1:0] phase;

  int checks = 0;
  int failures = 0;

  postskew #(.N(N), .M(M), .K(K)) dut (
    .clk     (clk),
    .rst_n   (rst_n),
    .acc_top (acc_top),
    .phase   (phase)
  );

  always #5 clk = ~clk;

  logic [K-1:0] A [CYCLES];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    @(negedge clk);
    check(phase == '0, "post-skew register not cleared by reset");
    rst_n = 1'b1;
    for (int k = 0; k < CYCLES; k++) begin
      automatic logic [K-1:0] e;
      A[k] = K'($urandom());
      acc_top = A[k];
      #1;
      for (int i = 0; i < int'(S); i++) begin
        automatic int d = int'(S) - 1 - i;
        e[i*W +: W] = (k - d < 0) ? '0 : A[k - d][i*W +: W];
      end
      check(phase == e, $sformatf("step %0d: phase=%h expected %h", k, phase, e));
      @(negedge clk);
    end
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
