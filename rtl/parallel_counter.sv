// parallel_counter: counts the ones on N_IN inputs (R0 = LSB of count).
// Serves as the 8-bit (4 outputs), 4-bit (3 outputs) and 7-bit (3 outputs)
// parallel counters of the pipelined neuron. The original circuits are
// minimised two-level gate netlists or merged switching trees; this RTL
// gives their function as a population count and leaves the gate
// structure to synthesis. Combinational, no clock.
module parallel_counter #(
  parameter int unsigned N_IN  = 8,
  parameter int unsigned CNT_W = $clog2(N_IN + 1)
) (
  input  logic [N_IN-1:0]  in_bits,
  output logic [CNT_W-1:0] count
);
  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < N_IN; i++) count = count + CNT_W'(in_bits[i]);
  end
endmodule
