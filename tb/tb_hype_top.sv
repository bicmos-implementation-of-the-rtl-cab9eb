// tb_hype_top: end-to-end test of hype_top at its default parameters.
//
// Builds HyPE neurons the way the training algorithm does and evaluates
// each on all three neuron implementations:
//   * the upper level has N_UP neurons (54 input characteristics for
//     alpha, 150 for beta and gamma after initialisation, 200 after a
//     sleep, and a 2000-neuron level); the neuron picks M random
//     connections, duplicates allowed (15/17/14 inputs initially,
//     20/24/26 after a sleep, 120 on the 2000-neuron level);
//   * thresholds are a virgin value (50 at novelty arousal 0; 7, 7, 6 at
//     novelty arousal 1) or an imprinted value (connected inputs - 1);
//   * the upper level's firing and regular vectors are random.
// The whole connectivity vector is streamed through the test chip three
// inputs per clock and through the fast and the slow 8-input pipelined
// neurons eight per clock. Every activity output must match the firing
// rule, and the cycle counts must be ceil(N_UP/3) clocks on the chip and
// ceil(N_UP/8)+1 on the pipelined neurons. The chip's test outputs are
// read through both choice settings, and the pipelined neurons' clear is
// used once per level. Counted mechanisms, each of which must occur:
// chip fire / quiet / beta veto, pipeline fire / quiet / beta veto,
// choice 0 and 1 reads, clears.
module tb_hype_top;
  import hype_tb_pkg::*;
  int checks = 0, failures = 0;
  int n_cfire = 0, n_cquiet = 0, n_cveto = 0, n_pfire = 0, n_pquiet = 0, n_pveto = 0;
  int n_ch0 = 0, n_ch1 = 0, n_clear = 0;
  logic clk = 1'b0;

  logic [2:0] c_va, c_vb, c_vc_reg; logic [6:0] c_vt;
  logic c_vbeta, c_vc, c_vchoice, c_act1, c_act2;
  logic [7:0] c_left, c_right;
  logic rb;
  logic [7:0] p_conn, p_fire, p_reg, p_thr;
  logic p_sel, p_beta, pf_act, ps_act;
  logic [7:0] pf_u, pf_l, ps_u, ps_l;

  hype_top dut (
    .chip_vclk1(clk), .chip_va(c_va), .chip_vb(c_vb), .chip_vc_reg(c_vc_reg), .chip_vt(c_vt),
    .chip_vbeta(c_vbeta), .chip_vc(c_vc), .chip_vchoice(c_vchoice), .chip_vact_1(c_act1),
    .chip_vact_2(c_act2), .chip_vr_left(c_left), .chip_vr_right(c_right),
    .pf_clk(clk), .pf_rb(rb), .pf_conn(p_conn), .pf_fire(p_fire), .pf_regular(p_reg),
    .pf_threshold(p_thr), .pf_sel(p_sel), .pf_beta_regular(p_beta), .pf_activity(pf_act),
    .pf_upper_value(pf_u), .pf_lower_value(pf_l),
    .ps_clk(clk), .ps_rb(rb), .ps_conn(p_conn), .ps_fire(p_fire), .ps_regular(p_reg),
    .ps_threshold(p_thr), .ps_sel(p_sel), .ps_beta_regular(p_beta), .ps_activity(ps_act),
    .ps_upper_value(ps_u), .ps_lower_value(ps_l));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("hype_top: %s failed at %0t", what, $time); end
  endtask

  // One neuron: connectivity c, upper-level firing f and regular e vectors.
  task automatic evaluate(input logic [2047:0] c, input logic [2047:0] f, input logic [2047:0] e,
                          input int n_up, input int t, input bit beta);
    int tot_u = 0, tot_l = 0, cycles;
    bit exp_fire;
    logic [7:0] v_u, v_l;
    for (int n = 0; n < n_up; n++) begin
      if (c[n] && f[n]) tot_u++;
      if (c[n] && f[n] && e[n]) tot_l++;
    end
    exp_fire = ref_fire(tot_u, tot_l, t, beta);

    // test chip: 3 inputs per clock
    c_vt = 7'(t - 1); c_vbeta = beta;
    v_u = 8'(t - 1); v_l = 8'((t - 1) / 2);
    cycles = 0;
    for (int k = 0; k * 3 < n_up; k++) begin
      int nu = 0, nl = 0;
      @(posedge clk);
      for (int i = 0; i < 3; i++) begin
        int n = 3 * k + i;
        c_va[i]     = (n < n_up) && c[n];
        c_vb[i]     = (n < n_up) && f[n];
        c_vc_reg[i] = (n < n_up) && e[n];
        if (c_va[i] && c_vb[i]) nu++;
        if (c_va[i] && c_vb[i] && c_vc_reg[i]) nl++;
      end
      c_vc = (k == 0);
      c_vchoice = k[0];
      v_u = v_u - 8'(nu); v_l = v_l - 8'(nl);
      @(negedge clk); #1;
      cycles++;
      check(c_right == ~v_u && c_left == ~v_l, "chip test outputs");
      if (c_vchoice) n_ch1++; else n_ch0++;
    end
    check(cycles == (n_up + 2) / 3, "chip cycle count");
    check(c_act1 == exp_fire && c_act2 == exp_fire, "chip activity");
    if (exp_fire) n_cfire++; else n_cquiet++;
    if (beta && tot_u >= t && 2 * tot_l < t) n_cveto++;

    // pipelined neurons: 8 inputs per clock, one extra clock of latency
    p_thr = 8'(t - 1); p_beta = beta;
    cycles = 0;
    for (int k = 0; k * 8 < n_up + 8; k++) begin
      @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        int n = 8 * k + i;
        p_conn[i] = (n < n_up) && c[n];
        p_fire[i] = (n < n_up) && f[n];
        p_reg[i]  = (n < n_up) && e[n];
      end
      p_sel = (k == 1);
      @(negedge clk); #1;
      cycles++;
    end
    check(cycles == (n_up + 7) / 8 + 1, "pipeline cycle count");
    check(pf_act == exp_fire && ps_act == exp_fire, "pipeline activity");
    check(pf_u == ps_u && pf_l == ps_l, "fast and slow pipelines agree");
    check(pf_u == 8'((t - 1) - tot_u) && pf_l == 8'((t - 1) / 2 - tot_l), "pipeline final values");
    if (exp_fire) n_pfire++; else n_pquiet++;
    if (beta && tot_u >= t && 2 * tot_l < t) n_pveto++;
  endtask

  initial begin
    // level:            alpha0 beta0 gamma0 alpha1 beta1 gamma1 large
    static int n_up [7]      = '{54,    150,  150,   200,   200,  200,   2000};
    static int m_in [7]      = '{15,    17,   14,    20,    24,   26,    120};
    static int t_virgin1 [7] = '{7,     7,    6,     7,     7,    6,     7};
    static int n_neurons [7] = '{60,    60,   60,    60,    60,   60,    12};
    rb = 1'b0; p_sel = 1'b0; p_conn = '0; p_fire = '0; p_reg = '0; p_thr = '0; p_beta = 1'b0;
    c_va = '0; c_vb = '0; c_vc_reg = '0; c_vt = '0; c_vbeta = 1'b0; c_vc = 1'b0; c_vchoice = 1'b0;
    repeat (2) @(posedge clk);
    rb = 1'b1;
    // worked examples of the firing rule: three active inputs against a
    // threshold of 3 fire; an imprinted neuron with three connections has
    // threshold 2 and fires on two of them but not on one.
    begin
      logic [2047:0] c, f, e;
      c = '0; f = '0; e = '0;
      c[2:0] = 3'b111; f[2:0] = 3'b111; e[2:0] = 3'b111;
      evaluate(c, f, e, 9, 3, 1'b0);
      check(c_act1 && pf_act, "3 active inputs, threshold 3");
      f[2:0] = 3'b101;
      evaluate(c, f, e, 9, 2, 1'b0);
      check(c_act1 && pf_act, "imprinted neuron, 2 of 3 active");
      f[2:0] = 3'b100;
      evaluate(c, f, e, 9, 2, 1'b0);
      check(!c_act1 && !pf_act, "imprinted neuron, 1 of 3 active");
      // the output (basal ganglia) neuron fires on any active input: T = 1
      c = '0; f = '0; e = '0;
      c[40] = 1'b1; c[7] = 1'b1; f[7] = 1'b1;
      evaluate(c, f, e, 45, 1, 1'b0);
      check(c_act1 && pf_act, "output neuron, one active input");
      f[7] = 1'b0;
      evaluate(c, f, e, 45, 1, 1'b0);
      check(!c_act1 && !pf_act, "output neuron, no active input");
    end
    for (int lv = 0; lv < 7; lv++) begin
      for (int nn = 0; nn < n_neurons[lv]; nn++) begin
        logic [2047:0] c, f, e;
        int t, ncon, dens, edens;
        bit beta;
        c = '0; f = '0; e = '0;
        for (int s = 0; s < m_in[lv]; s++) c[$urandom_range(0, n_up[lv] - 1)] = 1'b1;
        // imprinted neurons see mostly their own pattern again
        dens  = (nn % 3 == 2) ? $urandom_range(80, 100) : $urandom_range(10, 95);
        edens = $urandom_range(10, 90);
        for (int n = 0; n < n_up[lv]; n++) begin
          f[n] = ($urandom_range(0, 99) < dens);
          e[n] = (lv == 0) ? 1'b1 : ($urandom_range(0, 99) < edens);
        end
        ncon = 0;
        for (int n = 0; n < n_up[lv]; n++) if (c[n]) ncon++;
        case (nn % 3)
          0: t = 50;                          // virgin, novelty arousal 0
          1: t = t_virgin1[lv];               // virgin, novelty arousal 1
          default: t = (ncon > 1) ? ncon - 1 : 1; // imprinted
        endcase
        // beta regular neurons: imprinted neurons of the beta level
        beta = (lv == 1 || lv == 4) && (nn % 3 == 2);
        evaluate(c, f, e, n_up[lv], t, beta);
      end
      #1 rb = 1'b0; #1;
      check(pf_u == 0 && ps_u == 0 && pf_l == 0 && ps_l == 0, "pipeline clear");
      n_clear++;
      @(posedge clk); rb = 1'b1;
    end
    $display("chip fire=%0d quiet=%0d veto=%0d | pipe fire=%0d quiet=%0d veto=%0d | choice0=%0d choice1=%0d clear=%0d",
             n_cfire, n_cquiet, n_cveto, n_pfire, n_pquiet, n_pveto, n_ch0, n_ch1, n_clear);
    check(n_cfire > 0, "chip fired");     check(n_cquiet > 0, "chip stayed quiet");
    check(n_cveto > 0, "chip beta veto"); check(n_pfire > 0, "pipeline fired");
    check(n_pquiet > 0, "pipeline stayed quiet"); check(n_pveto > 0, "pipeline beta veto");
    check(n_ch0 > 0 && n_ch1 > 0, "both choice settings"); check(n_clear > 0, "clear used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
