// hype_top: the HyPE neuron hardware side by side.
//  * chip_*: the fabricated test chip (two 3-input single block neurons,
//    TSPC and UCDCS latches, and the choice block on the test outputs).
//  * pf_*:   the 8-input pipelined general neuron in its fast logic-gate
//    form (8-bit parallel counter, 8-4 subtractor).
//  * ps_*:   the same neuron in its area-minimised "slow" form (two 4-bit
//    counters with a 3-3 adder, 3-3 / 5-1-c subtractor).
// The three are independent; each keeps its own clock and ports. Timing
// and the host protocol are described in single_block_neuron and
// pipeline_neuron. Only the test chip was fabricated; the pipelined
// neurons are the designs it was derived from.
module hype_top
  import hype_pkg::*;
(
  // test chip pads
  input  logic             chip_vclk1,
  input  logic [2:0]       chip_va,
  input  logic [2:0]       chip_vb,
  input  logic [2:0]       chip_vc_reg,
  input  thr_t             chip_vt,
  input  logic             chip_vbeta,
  input  logic             chip_vc,
  input  logic             chip_vchoice,
  output logic             chip_vact_1,
  output logic             chip_vact_2,
  output logic [VAL_W-1:0] chip_vr_left,
  output logic [VAL_W-1:0] chip_vr_right,
  // fast 8-input pipelined neuron
  input  logic             pf_clk,
  input  logic             pf_rb,
  input  logic [7:0]       pf_conn,
  input  logic [7:0]       pf_fire,
  input  logic [7:0]       pf_regular,
  input  logic [VAL_W-1:0] pf_threshold,
  input  logic             pf_sel,
  input  logic             pf_beta_regular,
  output logic             pf_activity,
  output logic [VAL_W-1:0] pf_upper_value,
  output logic [VAL_W-1:0] pf_lower_value,
  // slow 8-input pipelined neuron
  input  logic             ps_clk,
  input  logic             ps_rb,
  input  logic [7:0]       ps_conn,
  input  logic [7:0]       ps_fire,
  input  logic [7:0]       ps_regular,
  input  logic [VAL_W-1:0] ps_threshold,
  input  logic             ps_sel,
  input  logic             ps_beta_regular,
  output logic             ps_activity,
  output logic [VAL_W-1:0] ps_upper_value,
  output logic [VAL_W-1:0] ps_lower_value
);
  hype_test_chip u_chip (
    .vclk1(chip_vclk1), .va(chip_va), .vb(chip_vb), .vc_reg(chip_vc_reg),
    .vt(chip_vt), .vbeta(chip_vbeta), .vc(chip_vc), .vchoice(chip_vchoice),
    .vact_1(chip_vact_1), .vact_2(chip_vact_2),
    .vr_left(chip_vr_left), .vr_right(chip_vr_right));

  pipeline_neuron #(.N_IN(8), .SLOW(1'b0)) u_pipe_fast (
    .clk(pf_clk), .rb(pf_rb), .conn(pf_conn), .fire(pf_fire), .regular(pf_regular),
    .threshold(pf_threshold), .sel(pf_sel), .beta_regular(pf_beta_regular),
    .activity(pf_activity), .upper_value(pf_upper_value), .lower_value(pf_lower_value));

  pipeline_neuron #(.N_IN(8), .SLOW(1'b1)) u_pipe_slow (
    .clk(ps_clk), .rb(ps_rb), .conn(ps_conn), .fire(ps_fire), .regular(ps_regular),
    .threshold(ps_threshold), .sel(ps_sel), .beta_regular(ps_beta_regular),
    .activity(ps_activity), .upper_value(ps_upper_value), .lower_value(ps_lower_value));
endmodule
