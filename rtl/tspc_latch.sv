// tspc_latch: True Single Phase Clock latch pair (W bits).
// A master n-latch follows D while the clock is high and holds while it is
// low; a slave p-latch follows the master while the clock is low and holds
// while it is high. Together they store D as it was when the clock fell,
// so this model is a falling-edge register with no reset. In the neuron
// the switching tree sits in the master's pull-down, which is why the data
// is the tree's function of the current inputs. Needs only one clock.
module tspc_latch #(
  parameter int unsigned W = hype_pkg::VAL_W
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(negedge clk) q <= d;
endmodule
