// mux2_bank: W parallel 2-to-1 multiplexers sharing one selection bit.
// r = c ? d0 : d1, as the pipelined neuron's multiplexer is specified
// (C = 1 passes D0). Combinational.
module mux2_bank #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         c,
  output logic [W-1:0] r
);
  always_comb r = c ? d0 : d1;
endmodule
