// activity_block: decides whether the neuron fires.
// A half "has fired" when the sign bit of its running value is 1, i.e. the
// accumulated active-input count has passed the start value. An ordinary
// neuron fires on the upper half's sign bit alone; a beta regular neuron
// needs both the upper and the lower half's sign bits. Combinational.
module activity_block (
  input  logic sign_upper,
  input  logic beta_regular,
  input  logic sign_lower,
  output logic activity
);
  always_comb activity = sign_upper & (sign_lower | ~beta_regular);
endmodule
