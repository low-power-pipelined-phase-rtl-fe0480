// Self-checking testbench for seq_gck_gen, the sequential gated clock
// generator.
//
// A random load pattern (sparse loads, bursts of back-to-back loads and long
// idle gaps) drives the generator. The reference is a plain history of the
// load values sampled at each rising edge: gck[c] must pulse at edge e
// exactly when load was sampled high at edge e-c, must stay low during every
// low phase of clk, and col_en[c] must announce the pulse. Pulses on every
// gated clock are also counted with edge-triggered counters and compared with
// the number of loads.
module tb_seq_gck_gen;

  localparam int unsigned M = pacc_pkg::PACC_M;
  localparam int unsigned CYCLES = 600;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic         load = 1'b0;
  logic [M-1:0] col_en;
  logic [M-1:0] gck;

  int checks = 0;
  int failures = 0;

  seq_gck_gen #(.M(M)) dut (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (load),
    .col_en (col_en),
    .gck    (gck)
  );

  always #5 clk = ~clk;

  // Edge counters on the gated clocks.
  int unsigned pulses [M];
  for (genvar c = 0; c < M; c++) begin : g_cnt
    always @(posedge gck[c]) pulses[c]++;
  end

  // hist[c]: load value sampled c edges ago (hist[0] = this edge).
  logic [M-1:0] hist = '0;
  int unsigned  loads = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;  // asynchronous reset edge
    #1 for (int c = 0; c < M; c++) pulses[c] = 0;
    repeat (3) @(negedge clk);
    // No clock pulse may reach the columns while in reset.
    check(pulses.sum() == 0, "gated clock pulsed during reset");
    rst_n = 1'b1;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      check(gck == '0, "gated clock high while clk is low");
      // Expected enables for the coming edge: load now, then history.
      check(col_en == {hist[M-2:0], load}, $sformatf("col_en=%b", col_en));
      @(posedge clk);
      hist = {hist[M-2:0], load};
      if (load) loads++;
      #1;
      check(gck == hist, $sformatf("gck=%b expected %b", gck, hist));
      @(negedge clk);
      // New load value, applied right after the falling edge.
      if (cyc < 100)       load = ($urandom_range(0, 9) == 0);   // sparse
      else if (cyc < 140)  load = 1'b1;                           // every cycle
      else if (cyc < 300)  load = ($urandom_range(0, 1) == 0);   // dense
      else if (cyc < CYCLES - M - 2) load = ((cyc % 8) == 0);    // every 8
      else                 load = 1'b0;                           // drain
      // Step back to before the falling edge of the next iteration.
      @(posedge clk);
      hist = {hist[M-2:0], load};
      if (load) loads++;
      #1;
      check(gck == hist, $sformatf("gck=%b expected %b", gck, hist));
    end
    // Every load must have produced exactly one pulse on every column clock.
    for (int c = 0; c < M; c++)
      check(pulses[c] == loads, $sformatf("column %0d: %0d pulses for %0d loads",
                                           c, pulses[c], loads));
    $display("loads=%0d", loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (4 * CYCLES + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
