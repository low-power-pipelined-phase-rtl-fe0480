// Sequential gated clock generator for the pre-skewing flip-flop columns.
//
// A shift register of M-1 flip-flops on the free-running clock passes the
// load pulse along; tap c of the chain (the load input itself for c = 0)
// enables the clock of pre-skewing column c through a clock gate. A load
// sampled on rising edge t therefore produces exactly one pulse on gck[0] at
// edge t, one on gck[1] at edge t+1, ... and one on gck[M-1] at edge t+M-1:
// the new FCW is moved one column to the right per cycle and every column is
// clocked for one cycle only. Loads may arrive on consecutive cycles; each
// one starts its own wave through the chain, so the FCW can be updated every
// cycle.
//
// Ports: clk, rst_n (asynchronous, active low), load (one-cycle pulse that
// accompanies a new FCW), col_en[M-1:0] (the enable of each column for the
// coming edge), gck[M-1:0] (gated column clocks).
//
// The shift register and AND-gate structure follow the proposed scheme.
// Taking column 0's enable straight from load (so the chain has M-1
// flip-flops) and using latch-based clock gates instead of bare AND gates
// are choices of this implementation. An assertion checks that every column
// enable is followed by the next column's enable; its reset qualifier is the
// only synchronous use of rst_n (a lint note about rst_n being used both
// synchronously and asynchronously refers to it).
module seq_gck_gen #(
  parameter int unsigned M = pacc_pkg::PACC_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  output logic [M-1:0] col_en,
  output logic [M-1:0] gck
);

  logic [M-1:1] load_sr;  // load_sr[c] enables column c

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) load_sr <= '0;
    else        load_sr <= {load_sr[M-2:1], load};
  end

  assign col_en = {load_sr, load};

  for (genvar c = 0; c < M; c++) begin : g_cg
    clock_gate u_cg (
      .clk  (clk),
      .en   (col_en[c]),
      .gclk (gck[c])
    );
  end

  // Rule of the scheme: a column enabled on one edge hands the word on, so
  // the next column is enabled on the following edge.
  for (genvar c = 0; c < M - 1; c++) begin : g_chk
    a_wave : assert property (@(posedge clk) disable iff (!rst_n)
                              col_en[c] |=> col_en[c+1])
      else $error("seq_gck_gen: column %0d enable not followed by column %0d", c, c + 1);
  end

endmodule
