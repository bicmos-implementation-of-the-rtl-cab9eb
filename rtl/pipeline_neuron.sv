// pipeline_neuron: the general pipelined HyPE neuron.
//
// A neuron fires when the number of its connected, firing upper-level
// inputs reaches its threshold T; a beta regular neuron must in addition
// have at least T/2 connected, firing *regular* inputs. Because a neuron
// can have over a hundred connections, the inputs are fed N_IN at a time
// and the neuron counts them down:
//   * AND gates form C&F (upper half) and C&F&E (lower half);
//   * a parallel counter per half counts the ones of the chunk and a
//     falling-edge flip-flop row latches the count;
//   * a multiplexer per half picks the start value (sel = 1) or the
//     fed-back running value (sel = 0); a subtractor removes the latched
//     count and a second flip-flop row latches the result;
//   * the sign bits of the two running values go to the activity block.
// The upper half starts from `threshold`, the lower half from
// `threshold >>> 1`. A half has fired once its running value is negative,
// so the host loads T-1 to obtain "count >= T" (and the lower half then
// fires exactly when 2*regular_count >= T).
//
// Timing: all flip-flops act on the falling edge of clk. Chunk k, applied
// before falling edge k, is counted at that edge; `sel` must be 1 during
// the following clock period for the first chunk only, and the running
// value including chunk k is visible after falling edge k+1. `activity` is
// valid one falling edge after the last chunk's count. The host stops
// feeding once the neuron has fired (the running value wraps otherwise).
// rb is the flip-flops' active-low asynchronous clear.
//
// Follows the original design: the two halves, the stage order, flip-flops after
// the counter and the subtractor (24 of them for N_IN = 8), the tdrn cell,
// and the slow 8-input variant (SLOW = 1: two 4-bit counters plus a 3-3
// adder, and a 3-3 / 5-1-c subtractor). This design's choices: the
// multiplexer polarity, the unlatched selection bit, T-1 loading and the
// arithmetic right shift for the lower half.
module pipeline_neuron #(
  parameter int unsigned N_IN  = 8,
  parameter bit          SLOW  = 1'b0,
  parameter int unsigned VAL_W = hype_pkg::VAL_W
) (
  input  logic             clk,
  input  logic             rb,
  input  logic [N_IN-1:0]  conn,
  input  logic [N_IN-1:0]  fire,
  input  logic [N_IN-1:0]  regular,
  input  logic [VAL_W-1:0] threshold,
  input  logic             sel,
  input  logic             beta_regular,
  output logic             activity,
  output logic [VAL_W-1:0] upper_value,
  output logic [VAL_W-1:0] lower_value
);
  localparam int unsigned CNT_W = $clog2(N_IN + 1);

  logic [N_IN-1:0]  act_upper, act_lower;
  logic [CNT_W-1:0] cnt_upper, cnt_lower;       // counter outputs
  logic [CNT_W-1:0] cnt_upper_q, cnt_lower_q;   // latched counts
  logic [VAL_W-1:0] start_lower;
  logic [VAL_W-1:0] mux_upper, mux_lower;
  logic [VAL_W-1:0] diff_upper, diff_lower;
  logic [CNT_W-1:0] unused_cnt_qb_u, unused_cnt_qb_l;
  logic [VAL_W-1:0] unused_val_qb_u, unused_val_qb_l;

  and_gate_array #(.N_IN(N_IN)) u_and (
    .conn(conn), .fire(fire), .regular(regular),
    .act_upper(act_upper), .act_lower(act_lower));

  if (SLOW) begin : g_slow
    if (N_IN != 8 || VAL_W != 8) begin : g_bad
      $error("pipeline_neuron: SLOW=1 exists only for N_IN=8, VAL_W=8");
    end
    slow_counter8 u_cnt_u (.in_bits(act_upper), .count(cnt_upper));
    slow_counter8 u_cnt_l (.in_bits(act_lower), .count(cnt_lower));
  end else begin : g_fast
    parallel_counter #(.N_IN(N_IN)) u_cnt_u (.in_bits(act_upper), .count(cnt_upper));
    parallel_counter #(.N_IN(N_IN)) u_cnt_l (.in_bits(act_lower), .count(cnt_lower));
  end

  tdrn_dff #(.W(CNT_W)) u_cnt_ff_u (.clk(clk), .rb(rb), .d(cnt_upper), .q(cnt_upper_q), .qb(unused_cnt_qb_u));
  tdrn_dff #(.W(CNT_W)) u_cnt_ff_l (.clk(clk), .rb(rb), .d(cnt_lower), .q(cnt_lower_q), .qb(unused_cnt_qb_l));

  always_comb start_lower = VAL_W'($signed(threshold) >>> 1);

  mux2_bank #(.W(VAL_W)) u_mux_u (.d0(threshold),   .d1(upper_value), .c(sel), .r(mux_upper));
  mux2_bank #(.W(VAL_W)) u_mux_l (.d0(start_lower), .d1(lower_value), .c(sel), .r(mux_lower));

  if (SLOW) begin : g_slow_sub
    slow_subtractor_8_4 u_sub_u (.value(mux_upper), .count(cnt_upper_q), .diff(diff_upper));
    slow_subtractor_8_4 u_sub_l (.value(mux_lower), .count(cnt_lower_q), .diff(diff_lower));
  end else begin : g_fast_sub
    subtractor #(.VAL_W(VAL_W), .CNT_W(CNT_W)) u_sub_u (.value(mux_upper), .count(cnt_upper_q), .diff(diff_upper));
    subtractor #(.VAL_W(VAL_W), .CNT_W(CNT_W)) u_sub_l (.value(mux_lower), .count(cnt_lower_q), .diff(diff_lower));
  end

  tdrn_dff #(.W(VAL_W)) u_val_ff_u (.clk(clk), .rb(rb), .d(diff_upper), .q(upper_value), .qb(unused_val_qb_u));
  tdrn_dff #(.W(VAL_W)) u_val_ff_l (.clk(clk), .rb(rb), .d(diff_lower), .q(lower_value), .qb(unused_val_qb_l));

  activity_block u_act (
    .sign_upper(upper_value[VAL_W-1]), .beta_regular(beta_regular),
    .sign_lower(lower_value[VAL_W-1]), .activity(activity));
endmodule
