// tb_single_block_neuron: drives the TSPC and the UCDCS variant with the
// same random neuron evaluations: a threshold T in 1..128 (loaded as T-1),
// a beta-regular flag and 1..40 chunks of three (C, F, E) inputs. After
// every falling edge both halves' test outputs must equal the complement
// of the running value computed here, i.e. one chunk is absorbed per
// clock; after the last chunk the activity must match the firing rule.
// Counts fired / not fired / beta lower-half vetoes and fails if any
// never happened.
module tb_single_block_neuron;
  import hype_pkg::*;
  import hype_tb_pkg::*;
  int checks = 0, failures = 0;
  int n_fire = 0, n_quiet = 0, n_veto = 0;
  logic clk = 1'b0, clk_b;
  logic [2:0] conn, fire, regular;
  logic [6:0] threshold;
  logic sel, beta;
  logic act_t, act_u;
  logic [7:0] ru_t, rl_t, ru_u, rl_u;

  single_block_neuron #(.LATCH(LATCH_TSPC)) dut_t (
    .clk(clk), .clk_b(clk_b), .conn(conn), .fire(fire), .regular(regular), .threshold(threshold),
    .sel(sel), .beta_regular(beta), .activity(act_t), .r_upper(ru_t), .r_lower(rl_t));
  single_block_neuron #(.LATCH(LATCH_UCDCS)) dut_u (
    .clk(clk), .clk_b(clk_b), .conn(conn), .fire(fire), .regular(regular), .threshold(threshold),
    .sel(sel), .beta_regular(beta), .activity(act_u), .r_upper(ru_u), .r_lower(rl_u));

  always #5 clk = ~clk;
  assign clk_b = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("single_block_neuron: %s failed at %0t", what, $time); end
  endtask

  initial begin
    conn = '0; fire = '0; regular = '0; threshold = '0; sel = 1'b0; beta = 1'b0;
    for (int trial = 0; trial < 600; trial++) begin
      int t, k_n, tot_u, tot_l, dens, edens;
      logic [7:0] v_u, v_l;
      t     = $urandom_range(1, 128);
      k_n   = $urandom_range(1, 40);
      dens  = $urandom_range(0, 100);
      edens = $urandom_range(0, 100);
      beta  = 1'(trial % 3 == 0);
      tot_u = 0; tot_l = 0;
      for (int k = 0; k < k_n; k++) begin
        int nu, nl;
        @(posedge clk);
        for (int i = 0; i < 3; i++) begin
          conn[i]    = ($urandom_range(0, 99) < dens);
          fire[i]    = ($urandom_range(0, 99) < dens);
          regular[i] = ($urandom_range(0, 99) < edens);
        end
        threshold = 7'(t - 1);
        sel = (k == 0);
        nu = 0; nl = 0;
        for (int i = 0; i < 3; i++) begin
          if (conn[i] && fire[i]) nu++;
          if (conn[i] && fire[i] && regular[i]) nl++;
        end
        tot_u += nu; tot_l += nl;
        if (k == 0) begin v_u = 8'(t - 1); v_l = 8'((t - 1) / 2); end
        v_u = v_u - 8'(nu);
        v_l = v_l - 8'(nl);
        @(negedge clk); #1;
        check(ru_t == ~v_u && rl_t == ~v_l, "TSPC running value");
        check(ru_u == ~v_u && rl_u == ~v_l, "UCDCS running value");
      end
      check(act_t == ref_fire(tot_u, tot_l, t, beta), "TSPC activity");
      check(act_u == ref_fire(tot_u, tot_l, t, beta), "UCDCS activity");
      if (ref_fire(tot_u, tot_l, t, beta)) n_fire++; else n_quiet++;
      if (beta && tot_u >= t && 2 * tot_l < t) n_veto++;
    end
    $display("fired=%0d quiet=%0d beta_veto=%0d", n_fire, n_quiet, n_veto);
    check(n_fire > 0 && n_quiet > 0 && n_veto > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
