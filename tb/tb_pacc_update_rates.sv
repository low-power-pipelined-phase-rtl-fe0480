// Workload testbench: the FCW update-rate sweep.
//
// For update periods R = 1, 2, 4, 8, 16, 32 and 64 cycles, pacc_seqcg (at
// its default sizes) runs with a new random FCW every R cycles while its
// phase output is compared every cycle with an unpipelined reference
// accumulator (output = upper K bits of the phase M-1 edges earlier).
//
// Clock activity of the pre-skewing register, counted as flip-flop clock
// events, is the quantity the gating scheme reduces. It is measured for this
// design from the column enables (column c holds N - c*N/M flip-flops) and
// worked out for two reference schemes from the load pattern alone:
//   conventional: all N(M+1)/2 flip-flops clocked every cycle;
//   single gate:  all of them clocked for M cycles from each load (the load
//                 and its delayed copies in a shift register, ORed), the
//                 same M-cycle window in which the sequential scheme clocks
//                 its M columns one after the other.
// Checks: the sequential scheme clocks exactly N(M+1)/2 flip-flops per load;
// it never exceeds the conventional activity and equals it only when R = 1;
// the single gate saves nothing for R <= M and something for R > M; the
// sequential scheme is below the single gate for R > 1.
module tb_pacc_update_rates;

  localparam int unsigned N = pacc_pkg::PACC_N;
  localparam int unsigned M = pacc_pkg::PACC_M;
  localparam int unsigned K = pacc_pkg::PACC_K;
  localparam int unsigned W = N / M;
  localparam int unsigned PRE_FF = pacc_pkg::preskew_ff_count(N, M);
  localparam int unsigned LOADS_PER_RATE = 40;
  localparam int          NRATES = 7;
  localparam int unsigned RATES [NRATES] = '{1, 2, 4, 8, 16, 32, 64};

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic         load = 1'b0;
  logic [N-1:0] fcw = '0;
  logic [K-1:0] phase;
  logic [M-1:0] col_en;

  int checks = 0;
  int failures = 0;

  pacc_seqcg dut (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (load),
    .fcw    (fcw),
    .phase  (phase),
    .col_en (col_en)
  );

  always #5 clk = ~clk;

  logic [N-1:0] ref_f = '0;
  logic [N-1:0] ref_p = '0;
  logic [N-1:0] p_hist [$];
  logic [M-2:0] single_sr = '0;   // reference single-gate shift register

  longint unsigned act_seq, act_conv, act_single, n_loads;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  task automatic cycle(input bit ld, input logic [N-1:0] word);
    logic [N:0] s;
    load = ld;
    fcw  = ld ? word : '0;
    for (int c = 0; c < int'(M); c++)
      if (col_en[c]) act_seq += longint'(N - c * W);
    act_conv += PRE_FF;
    if (ld || single_sr != '0) act_single += PRE_FF;
    single_sr = {single_sr[M-3:0], ld};
    s = {1'b0, ref_p} + {1'b0, ref_f};
    ref_p = s[N-1:0];
    if (ld) begin
      ref_f = word;
      n_loads++;
    end
    p_hist.push_back(ref_p);
    if (p_hist.size() > int'(M)) void'(p_hist.pop_front());
    @(posedge clk);
    #1;
    check(phase == p_hist[0][N-1 -: K],
          $sformatf("phase=%h expected %h", phase, p_hist[0][N-1 -: K]));
    @(negedge clk);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #2;
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < int'(M); i++) p_hist.push_back('0);
    repeat (2 * M) cycle(1'b0, '0);

    for (int r = 0; r < NRATES; r++) begin
      // Warm-up loads at the same period, so that the counted window sees
      // the steady periodic state; the window spans whole periods.
      for (int u = 0; u < int'(M / RATES[r]) + 2; u++) begin
        cycle(1'b1, $urandom());
        repeat (RATES[r] - 1) cycle(1'b0, '0);
      end
      act_seq = 0; act_conv = 0; act_single = 0; n_loads = 0;
      for (int u = 0; u < int'(LOADS_PER_RATE); u++) begin
        cycle(1'b1, $urandom());
        repeat (RATES[r] - 1) cycle(1'b0, '0);
      end
      check(n_loads == LOADS_PER_RATE, "load count");
      $display("R=%0d: pre-skew clock events per cycle: conventional %0d, single gate %0.1f, sequential %0.1f (%0.1f%% of conventional)",
               RATES[r], PRE_FF,
               real'(act_single) / real'(LOADS_PER_RATE * RATES[r]),
               real'(act_seq) / real'(LOADS_PER_RATE * RATES[r]),
               100.0 * real'(act_seq) / real'(act_conv));
      // Exact steady-state activities.
      check(act_conv == longint'(LOADS_PER_RATE) * RATES[r] * PRE_FF, "conventional count");
      check(act_seq == longint'(LOADS_PER_RATE) * PRE_FF,
            $sformatf("sequential: %0d clock events, expected %0d", act_seq,
                      longint'(LOADS_PER_RATE) * PRE_FF));
      check(act_single == longint'(LOADS_PER_RATE) * ((RATES[r] < M) ? RATES[r] : M) * PRE_FF,
            "single-gate count");
      // The comparisons of the schemes.
      check(act_seq <= act_conv, "sequential gating above conventional activity");
      if (RATES[r] == 1) check(act_seq == act_conv, "at R=1 sequential should equal conventional");
      else               check(act_seq < act_single, "sequential gating not below single gate");
      if (RATES[r] <= M) check(act_single == act_conv, "single gate saved clocks for R <= M");
      else               check(act_single < act_conv, "single gate saved nothing for R > M");
    end
    // Drain.
    repeat (M + 2) cycle(1'b0, '0);
    check(col_en == '0, "columns still enabled after the last load wave");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 30000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
