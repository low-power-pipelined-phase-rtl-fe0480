// End-to-end testbench for pacc_seqcg, the pipelined phase accumulator with
// sequential clock gating, at its default sizes (N = 32, M = 8, K = 12).
//
// Reference: an unpipelined accumulator. F is the FCW last loaded (taken on
// the edge where load is high) and the phase advances P <- P + F every
// cycle; after edge e the output must be the upper K bits of the value P had
// M-1 edges earlier. The output is compared every cycle.
//
// Sequence: reset; a latency measurement (one load after a long idle time,
// the output must first move M edges after the load edge); sparse random
// loads; loads every 8 cycles; loads on consecutive cycles and every 2 or 3
// cycles, so that several load waves travel through the pre-skewing columns
// at once; and a long run at a large FCW so the phase wraps. The column
// enables are counted: each column must be clocked once per load and never
// otherwise. Each mechanism (idle columns, overlapping load waves,
// back-to-back loads, phase wrap-around) is counted and must occur. Last, an
// asynchronous reset in the middle of a load wave must clear every register,
// and the accumulator must start again from zero.
module tb_pacc_seqcg;

  localparam int unsigned N = pacc_pkg::PACC_N;
  localparam int unsigned M = pacc_pkg::PACC_M;
  localparam int unsigned K = pacc_pkg::PACC_K;
  localparam int unsigned MAX_CYCLES = 20000;

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

  // Reference state.
  logic [N-1:0] ref_f = '0;
  logic [N-1:0] ref_p = '0;
  logic [N-1:0] p_hist [$];
  int unsigned  loads = 0;
  int unsigned  col_pulses [M] = '{default: 0};

  // Mechanism counters.
  int unsigned n_idle = 0;       // cycles with every pre-skew column gated off
  int unsigned n_overlap = 0;    // cycles with two or more columns clocked
  int unsigned n_b2b = 0;        // loads on consecutive cycles
  int unsigned n_wrap = 0;       // phase wrap-arounds
  bit          prev_load = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  function automatic logic [K-1:0] expected_phase();
    return p_hist[0][N-1 -: K];
  endfunction

  // One cycle: inputs applied after the falling edge, reference advanced for
  // the coming rising edge, output checked after it.
  task automatic cycle(input bit ld, input logic [N-1:0] word);
    logic [N:0] s;
    load = ld;
    fcw  = ld ? word : N'($urandom());  // fcw is ignored without load
    // Column enables announced for the coming edge.
    for (int c = 0; c < int'(M); c++) col_pulses[c] += col_en[c];
    if (col_en == '0) n_idle++;
    if ($countones(col_en) > 1) n_overlap++;
    if (ld && prev_load) n_b2b++;
    prev_load = ld;
    // Reference for the coming edge: phase first, with the old word.
    s = {1'b0, ref_p} + {1'b0, ref_f};
    if (s[N]) n_wrap++;
    ref_p = s[N-1:0];
    if (ld) begin
      ref_f = word;
      loads++;
    end
    p_hist.push_back(ref_p);
    if (p_hist.size() > int'(M)) void'(p_hist.pop_front());
    @(posedge clk);
    #1;
    check(phase == expected_phase(),
          $sformatf("phase=%h expected %h", phase, expected_phase()));
    @(negedge clk);
  endtask

  initial begin
    int lat;
    logic [K-1:0] ph0;
    #1 rst_n = 1'b0;
    #2;
    check(phase == '0, "phase not cleared by reset");
    check(col_en == '0, "column enables not cleared by reset");
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < int'(M); i++) p_hist.push_back('0);

    // Latency: from zero, load the smallest word that moves the output.
    repeat (5) cycle(1'b0, '0);
    ph0 = phase;
    cycle(1'b1, N'(1) << (N - K));
    lat = 0;
    while (phase == ph0 && lat < 4 * int'(M)) begin
      cycle(1'b0, '0);
      lat++;
    end
    // The load edge was the first; lat counts the edges after it.
    check(lat == int'(M), $sformatf("latency %0d edges after the load edge, expected %0d",
                                    lat, M));
    $display("load-to-phase latency: %0d cycles", lat);
    repeat (10) cycle(1'b0, '0);

    // Sparse random loads: columns idle between updates.
    for (int u = 0; u < 40; u++) begin
      cycle(1'b1, $urandom());
      repeat ($urandom_range(9, 40)) cycle(1'b0, '0);
    end
    // FCW updated every 8 cycles.
    for (int u = 0; u < 40; u++) begin
      cycle(1'b1, $urandom());
      repeat (7) cycle(1'b0, '0);
    end
    // Updates every cycle.
    repeat (100) cycle(1'b1, $urandom());
    // Updates every 2 and every 3 cycles.
    for (int u = 0; u < 50; u++) begin
      cycle(1'b1, $urandom());
      cycle(1'b0, '0);
    end
    for (int u = 0; u < 50; u++) begin
      cycle(1'b1, $urandom());
      repeat (2) cycle(1'b0, '0);
    end
    // Random update pattern.
    repeat (600) cycle($urandom_range(0, 3) == 0, $urandom());
    // Large FCW for many wrap-arounds, then drain.
    cycle(1'b1, 32'h9E37_79B9);
    repeat (200) cycle(1'b0, '0);
    repeat (M + 2) cycle(1'b0, '0);

    // Asynchronous reset in the middle of a load wave: everything clears,
    // including the gated columns, which get no clock edge during reset.
    cycle(1'b1, $urandom());
    repeat (3) cycle(1'b0, '0);
    #2 rst_n = 1'b0;
    #1;
    check(phase == '0 && col_en == '0, "asynchronous reset did not clear the outputs");
    check(dut.skew_fcw == '0, "asynchronous reset did not clear the pre-skewing columns");
    @(negedge clk);
    rst_n = 1'b1;
    ref_f = '0;
    ref_p = '0;
    for (int i = 0; i < int'(M); i++) p_hist[i] = '0;
    // The column waves of the interrupted load are gone.
    loads = loads - 1;
    for (int c = 0; c < 4; c++) col_pulses[c]--;
    repeat (4) cycle(1'b1, $urandom());
    repeat (3 * M) cycle(1'b0, '0);

    // Each column clocked exactly once per load.
    for (int c = 0; c < int'(M); c++)
      check(col_pulses[c] == loads,
            $sformatf("column %0d clocked %0d times for %0d loads", c, col_pulses[c], loads));
    $display("loads=%0d idle_cycles=%0d overlapping_waves=%0d back_to_back=%0d wraps=%0d",
             loads, n_idle, n_overlap, n_b2b, n_wrap);
    check(n_idle > 0, "no cycle with all pre-skew columns gated");
    check(n_overlap > 0, "no overlapping load waves");
    check(n_b2b > 0, "no back-to-back loads");
    check(n_wrap > 0, "phase never wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
