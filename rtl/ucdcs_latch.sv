// ucdcs_latch: Ultra-fast Completely Dynamic Current Steering latch (W bits).
// The master is a current-steering n-latch: while the clock is low it
// precharges and holds; while the clock is high an input current turns on a
// bipolar pull-down and the latch takes the input value. The slave is a TSPC
// p-latch. Seen from outside it stores D as it was when clk fell (clk_b
// rose); it has no reset. The circuit needs the clock and its complement
// ("pseudo single phase"); the model checks that clk_b is the complement of
// clk at every clock edge.
module ucdcs_latch #(
  parameter int unsigned W = hype_pkg::VAL_W
) (
  input  logic         clk,
  input  logic         clk_b,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(negedge clk) q <= d;

  // Values sampled just before each edge: clk_b is high before clk rises
  // and low before clk falls.
  a_clkb_rise: assert property (@(posedge clk) clk_b)
    else $error("ucdcs_latch: clk_b is not the complement of clk");
  a_clkb_fall: assert property (@(negedge clk) !clk_b)
    else $error("ucdcs_latch: clk_b is not the complement of clk");
endmodule
