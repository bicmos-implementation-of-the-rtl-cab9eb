// hype_test_chip: the fabricated test cell holding two 3-input single block
// HyPE neurons, one with TSPC output latches (neuron 1) and one with UCDCS
// output latches (neuron 2). Both share every input pad: connectivity va,
// firing status vb, regular status vc_reg, threshold vt (7 bits, host
// loads T-1), beta regular vbeta, selection bit vc and the clock vclk1.
// Each neuron has its own activity pad (vact_1, vact_2). The 16 test
// outputs of the selected neuron reach vr_left (3-input AND, i.e. lower
// half) and vr_right (2-input AND, upper half) through the choice block.
// The test outputs are complemented (pad low = bit 1). The UCDCS neuron's
// complemented clock is made on chip from vclk1. Timing as in
// single_block_neuron: everything updates on the falling edge of vclk1.
// Pad grouping follows the original chip's pad list; the vchoice polarity and
// the on-chip clock inverter are this design's choices.
module hype_test_chip
  import hype_pkg::*;
(
  input  logic             vclk1,
  input  logic [2:0]       va,
  input  logic [2:0]       vb,
  input  logic [2:0]       vc_reg,
  input  thr_t             vt,
  input  logic             vbeta,
  input  logic             vc,
  input  logic             vchoice,
  output logic             vact_1,
  output logic             vact_2,
  output logic [VAL_W-1:0] vr_left,
  output logic [VAL_W-1:0] vr_right
);
  logic             vclk1_b;
  logic [VAL_W-1:0] n1_upper, n1_lower, n2_upper, n2_lower;

  always_comb vclk1_b = ~vclk1;

  single_block_neuron #(.LATCH(LATCH_TSPC)) u_neuron1 (
    .clk(vclk1), .clk_b(vclk1_b), .conn(va), .fire(vb), .regular(vc_reg),
    .threshold(vt), .sel(vc), .beta_regular(vbeta), .activity(vact_1),
    .r_upper(n1_upper), .r_lower(n1_lower));

  single_block_neuron #(.LATCH(LATCH_UCDCS)) u_neuron2 (
    .clk(vclk1), .clk_b(vclk1_b), .conn(va), .fire(vb), .regular(vc_reg),
    .threshold(vt), .sel(vc), .beta_regular(vbeta), .activity(vact_2),
    .r_upper(n2_upper), .r_lower(n2_lower));

  choice_block #(.W(2*VAL_W)) u_choice (
    .choice(vchoice),
    .in_n1({n1_lower, n1_upper}),
    .in_n2({n2_lower, n2_upper}),
    .out({vr_left, vr_right}));
endmodule
