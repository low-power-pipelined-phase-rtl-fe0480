// Self-checking testbench for preskew_array, the column-clocked pre-skewing
// register.
//
// The testbench plays the part of the sequential clock generator: a load in
// cycle t pulses column c's clock in cycle t+c. The reference is a list of
// the FCW values loaded per cycle: after cycle n, block j of skew_fcw must
// equal block j of the FCW of the latest load made in a cycle <= n-j (zero
// before any). Sparse loads, back-to-back loads (which clock every column in
// every cycle, the conventional ungated case) and random gaps are used, and
// the reset value is checked.
module tb_preskew_array;

  localparam int unsigned N = pacc_pkg::PACC_N;
  localparam int unsigned M = pacc_pkg::PACC_M;
  localparam int unsigned W = N / M;
  localparam int unsigned CYCLES = 800;

  logic [M-1:0] gck = '0;
  logic         rst_n = 1'b1;
  logic [N-1:0] fcw = '0;
  logic [N-1:0] skew_fcw;

  int checks = 0;
  int failures = 0;

  preskew_array #(.N(N), .M(M)) dut (
    .gck      (gck),
    .rst_n    (rst_n),
    .fcw      (fcw),
    .skew_fcw (skew_fcw)
  );

  bit           ld_hist [CYCLES];
  logic [N-1:0] fcw_hist [CYCLES];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  function automatic logic [N-1:0] expected(input int n);
    logic [N-1:0] e = '0;
    for (int j = 0; j < int'(M); j++) begin
      for (int t = n - j; t >= 0; t--) begin
        if (ld_hist[t]) begin
          e[j*W +: W] = fcw_hist[t][j*W +: W];
          break;
        end
      end
    end
    return e;
  endfunction

  initial begin
    #1 rst_n = 1'b0;
    #4;
    check(skew_fcw == '0, "array not cleared by reset");
    #5 rst_n = 1'b1;
    for (int n = 0; n < CYCLES; n++) begin
      bit ld;
      if (n < 150)       ld = ($urandom_range(0, 11) == 0);
      else if (n < 230)  ld = 1'b1;
      else if (n < 500)  ld = ($urandom_range(0, 2) == 0);
      else               ld = ((n % 8) == 3);
      ld_hist[n]  = ld;
      fcw_hist[n] = $urandom();
      if (ld) fcw = fcw_hist[n];
      else    fcw = $urandom();  // not sampled: column 0 is not clocked
      #2;
      for (int c = 0; c < int'(M); c++)
        gck[c] = (n - c >= 0) && ld_hist[n - c];
      #5 gck = '0;
      #1;
      check(skew_fcw == expected(n),
            $sformatf("cycle %0d: skew_fcw=%h expected %h", n, skew_fcw, expected(n)));
      #2;
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
