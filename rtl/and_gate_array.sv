// and_gate_array: the input AND gates of a neuron half-pair.
// For every input position n the upper half sees C[n] & F[n] (connected and
// firing) and the lower half sees C[n] & F[n] & E[n] (connected, firing and
// the upper-level neuron is regular). Purely combinational. The two gate
// rows follow the neuron description; the parameterised width is this
// design's choice so the same block serves 3-, 4-, 7- and 8-input neurons.
module and_gate_array #(
  parameter int unsigned N_IN = 8
) (
  input  logic [N_IN-1:0] conn,      // connectivity C
  input  logic [N_IN-1:0] fire,      // firing status F of the upper level
  input  logic [N_IN-1:0] regular,   // regular status E of the upper level
  output logic [N_IN-1:0] act_upper, // active inputs
  output logic [N_IN-1:0] act_lower  // active regular inputs
);
  always_comb begin
    act_upper = conn & fire;
    act_lower = conn & fire & regular;
  end
endmodule
