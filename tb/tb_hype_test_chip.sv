// tb_hype_test_chip: pad-level test of the test chip. Random neuron
// evaluations (T in 1..128 loaded as T-1 on vt, 1..40 chunks on va/vb/vc_reg,
// vc high for the first chunk) are applied with one clock vclk1. After
// every falling edge the 16 test pads must carry the complement of the
// running values (vr_left: lower half, vr_right: upper half) of the neuron
// chosen by vchoice, which is changed at random; after the last chunk both
// activity pads must match the firing rule. Counts firings, quiet
// evaluations, beta vetoes and reads through each choice setting.
module tb_hype_test_chip;
  import hype_tb_pkg::*;
  int checks = 0, failures = 0;
  int n_fire = 0, n_quiet = 0, n_veto = 0, n_ch0 = 0, n_ch1 = 0;
  logic vclk1 = 1'b0;
  logic [2:0] va, vb, vc_reg;
  logic [6:0] vt;
  logic vbeta, vc, vchoice, vact_1, vact_2;
  logic [7:0] vr_left, vr_right;

  hype_test_chip dut (
    .vclk1(vclk1), .va(va), .vb(vb), .vc_reg(vc_reg), .vt(vt), .vbeta(vbeta), .vc(vc),
    .vchoice(vchoice), .vact_1(vact_1), .vact_2(vact_2), .vr_left(vr_left), .vr_right(vr_right));

  always #5 vclk1 = ~vclk1;

  initial begin
    repeat (100000) @(posedge vclk1);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("hype_test_chip: %s failed at %0t", what, $time); end
  endtask

  initial begin
    va = '0; vb = '0; vc_reg = '0; vt = '0; vbeta = 1'b0; vc = 1'b0; vchoice = 1'b0;
    for (int trial = 0; trial < 400; trial++) begin
      int t, k_n, tot_u, tot_l, dens, edens;
      logic [7:0] v_u, v_l;
      t     = $urandom_range(1, 128);
      k_n   = $urandom_range(1, 40);
      dens  = $urandom_range(20, 100);
      edens = $urandom_range(0, 100);
      vbeta = 1'(trial % 3 == 0);
      tot_u = 0; tot_l = 0;
      for (int k = 0; k < k_n; k++) begin
        int nu, nl;
        @(posedge vclk1);
        for (int i = 0; i < 3; i++) begin
          va[i]     = ($urandom_range(0, 99) < dens);
          vb[i]     = ($urandom_range(0, 99) < dens);
          vc_reg[i] = ($urandom_range(0, 99) < edens);
        end
        vt = 7'(t - 1);
        vc = (k == 0);
        vchoice = 1'($urandom_range(0, 1));
        nu = 0; nl = 0;
        for (int i = 0; i < 3; i++) begin
          if (va[i] && vb[i]) nu++;
          if (va[i] && vb[i] && vc_reg[i]) nl++;
        end
        tot_u += nu; tot_l += nl;
        if (k == 0) begin v_u = 8'(t - 1); v_l = 8'((t - 1) / 2); end
        v_u = v_u - 8'(nu);
        v_l = v_l - 8'(nl);
        @(negedge vclk1); #1;
        check(vr_right == ~v_u && vr_left == ~v_l, "test outputs");
        if (vchoice) n_ch1++; else n_ch0++;
      end
      check(vact_1 == ref_fire(tot_u, tot_l, t, vbeta), "vact_1 (TSPC)");
      check(vact_2 == ref_fire(tot_u, tot_l, t, vbeta), "vact_2 (UCDCS)");
      if (ref_fire(tot_u, tot_l, t, vbeta)) n_fire++; else n_quiet++;
      if (vbeta && tot_u >= t && 2 * tot_l < t) n_veto++;
    end
    $display("fired=%0d quiet=%0d beta_veto=%0d choice0=%0d choice1=%0d", n_fire, n_quiet, n_veto, n_ch0, n_ch1);
    check(n_fire > 0 && n_quiet > 0 && n_veto > 0 && n_ch0 > 0 && n_ch1 > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
