// single_block_neuron: the 3-input single block dynamic HyPE neuron.
//
// Works like the pipelined neuron, but each half is one merged functional
// block (parallel_subtractor3) whose 8-bit result is held in an output latch
// and fed back, so a chunk of three inputs is counted in one clock:
//   upper half: active inputs C&F, start value {0, threshold}
//   lower half: active regular inputs C&F&E, start value {0, threshold>>1}
// `sel` = 1 loads the start value minus the current chunk's count; sel = 0
// subtracts the chunk's count from the held value. The activity block
// fires on the upper sign bit, or on both sign bits when beta_regular = 1.
// As in the pipelined neuron the host loads T-1 on `threshold`.
//
// LATCH picks the output latch circuit: LATCH_TSPC or LATCH_UCDCS (which
// also takes clk_b, the complemented clock). Both store at the falling
// edge of clk; chunk k and its sel must be stable before falling edge k and
// the value including it (and `activity`) is valid after that edge.
// r_upper / r_lower are the test outputs of the two blocks; with
// COMPLEMENT_OUT = 1 they carry the complemented value, as the dynamic
// tree delivers it. There is no reset: the first sel = 1 defines the state.
//
// Follows the original design: one merged block per half, 19 block inputs, two
// latch variants, complemented test outputs (stated for the TSPC variant).
// This design's choices: complemented outputs for the UCDCS variant too,
// the right-shifted threshold for the lower half, T-1 loading.
module single_block_neuron
  import hype_pkg::*;
#(
  parameter latch_kind_e LATCH          = LATCH_TSPC,
  parameter int unsigned N_IN           = 3,
  parameter bit          COMPLEMENT_OUT = 1'b1
) (
  input  logic             clk,
  input  logic             clk_b,
  input  logic [N_IN-1:0]  conn,
  input  logic [N_IN-1:0]  fire,
  input  logic [N_IN-1:0]  regular,
  input  thr_t             threshold,
  input  logic             sel,
  input  logic             beta_regular,
  output logic             activity,
  output logic [VAL_W-1:0] r_upper,
  output logic [VAL_W-1:0] r_lower
);
  logic [N_IN-1:0]  act_upper, act_lower;
  thr_t             thr_lower;
  logic [VAL_W-1:0] next_upper, next_lower;
  logic [VAL_W-1:0] val_upper, val_lower;

  and_gate_array #(.N_IN(N_IN)) u_and (
    .conn(conn), .fire(fire), .regular(regular),
    .act_upper(act_upper), .act_lower(act_lower));

  always_comb thr_lower = threshold >> 1;

  parallel_subtractor3 #(.N_IN(N_IN)) u_psub_u (
    .act(act_upper), .threshold(threshold), .feedback(val_upper), .sel(sel), .result(next_upper));
  parallel_subtractor3 #(.N_IN(N_IN)) u_psub_l (
    .act(act_lower), .threshold(thr_lower), .feedback(val_lower), .sel(sel), .result(next_lower));

  if (LATCH == LATCH_TSPC) begin : g_tspc
    tspc_latch #(.W(VAL_W)) u_lat_u (.clk(clk), .d(next_upper), .q(val_upper));
    tspc_latch #(.W(VAL_W)) u_lat_l (.clk(clk), .d(next_lower), .q(val_lower));
    // The TSPC variant needs only the true clock.
    logic unused_clk_b;
    always_comb unused_clk_b = clk_b;
  end else begin : g_ucdcs
    ucdcs_latch #(.W(VAL_W)) u_lat_u (.clk(clk), .clk_b(clk_b), .d(next_upper), .q(val_upper));
    ucdcs_latch #(.W(VAL_W)) u_lat_l (.clk(clk), .clk_b(clk_b), .d(next_lower), .q(val_lower));
  end

  activity_block u_act (
    .sign_upper(val_upper[VAL_W-1]), .beta_regular(beta_regular),
    .sign_lower(val_lower[VAL_W-1]), .activity(activity));

  always_comb begin
    r_upper = COMPLEMENT_OUT ? ~val_upper : val_upper;
    r_lower = COMPLEMENT_OUT ? ~val_lower : val_lower;
  end
endmodule
