// tb_pipeline_neuron: four pipelined neurons fed from one random stream:
// 8-input fast, 8-input slow (two 4-bit counters + 3-3 adder, 3-3/5-1-c
// subtractor), 4-input and 7-input, each seeing the low N bits of every
// chunk. Threshold T in 1..128 is loaded as T-1; sel is raised in the
// period after the first chunk's counting edge. The running values of both
// halves are compared after every falling edge with a model that absorbs
// chunk k at falling edge k+1 (two-stage latency: count latch, then value
// latch); the activity after the last chunk must match the firing rule.
// The asynchronous clear is exercised once per 50 trials.
module tb_pipeline_neuron;
  import hype_tb_pkg::*;
  localparam int NV = 4;
  localparam int WIDTH [NV] = '{8, 8, 4, 7};
  int checks = 0, failures = 0;
  int n_fire = 0, n_quiet = 0, n_veto = 0;
  logic clk = 1'b0, rb;
  logic [7:0] conn, fire, regular, threshold;
  logic sel, beta;
  logic [NV-1:0] act;
  logic [7:0] uv [NV];
  logic [7:0] lv [NV];

  pipeline_neuron                          dut0 (.clk(clk), .rb(rb), .conn(conn),      .fire(fire),      .regular(regular),      .threshold(threshold), .sel(sel), .beta_regular(beta), .activity(act[0]), .upper_value(uv[0]), .lower_value(lv[0]));
  pipeline_neuron #(.SLOW(1'b1))           dut1 (.clk(clk), .rb(rb), .conn(conn),      .fire(fire),      .regular(regular),      .threshold(threshold), .sel(sel), .beta_regular(beta), .activity(act[1]), .upper_value(uv[1]), .lower_value(lv[1]));
  pipeline_neuron #(.N_IN(4))              dut2 (.clk(clk), .rb(rb), .conn(conn[3:0]), .fire(fire[3:0]), .regular(regular[3:0]), .threshold(threshold), .sel(sel), .beta_regular(beta), .activity(act[2]), .upper_value(uv[2]), .lower_value(lv[2]));
  pipeline_neuron #(.N_IN(7))              dut3 (.clk(clk), .rb(rb), .conn(conn[6:0]), .fire(fire[6:0]), .regular(regular[6:0]), .threshold(threshold), .sel(sel), .beta_regular(beta), .activity(act[3]), .upper_value(uv[3]), .lower_value(lv[3]));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what, int v);
    checks++;
    if (!cond) begin failures++; $display("pipeline_neuron[%0d]: %s failed at %0t", v, what, $time); end
  endtask

  initial begin
    rb = 1'b0; conn = '0; fire = '0; regular = '0; threshold = '0; sel = 1'b0; beta = 1'b0;
    repeat (2) @(posedge clk);
    rb = 1'b1;
    for (int trial = 0; trial < 600; trial++) begin
      int t, k_n, dens, edens;
      int tot_u [NV], tot_l [NV];
      int cu [NV], cl [NV];          // counts waiting in the count latch
      logic [7:0] v_u [NV], v_l [NV];
      t    = $urandom_range(1, 128);
      k_n  = $urandom_range(1, 16);  // at most 128 inputs: no wrap
      dens = $urandom_range(0, 100);
      edens = $urandom_range(0, 100);
      beta = 1'(trial % 3 == 0);
      threshold = 8'(t - 1);
      for (int v = 0; v < NV; v++) begin tot_u[v] = 0; tot_l[v] = 0; end
      // k = 0 .. k_n-1 apply chunks; k = k_n only flushes the last count
      for (int k = 0; k <= k_n; k++) begin
        @(posedge clk);
        if (k < k_n) begin
          for (int i = 0; i < 8; i++) begin
            conn[i]    = ($urandom_range(0, 99) < dens);
            fire[i]    = ($urandom_range(0, 99) < dens);
            regular[i] = ($urandom_range(0, 99) < edens);
          end
        end else begin
          conn = '0; fire = '0; regular = '0;
        end
        sel = (k == 1) || (k_n == 1 && k == 1);
        @(negedge clk); #1;
        for (int v = 0; v < NV; v++) begin
          // the value latch has just absorbed the count of chunk k-1
          if (k >= 1) begin
            if (k == 1) begin v_u[v] = 8'(t - 1); v_l[v] = 8'((t - 1) / 2); end
            v_u[v] = v_u[v] - 8'(cu[v]);
            v_l[v] = v_l[v] - 8'(cl[v]);
            check(uv[v] == v_u[v] && lv[v] == v_l[v], "running value", v);
          end
          cu[v] = ones8(conn & fire, WIDTH[v]);
          cl[v] = ones8(conn & fire & regular, WIDTH[v]);
          if (k < k_n) begin tot_u[v] += cu[v]; tot_l[v] += cl[v]; end
        end
      end
      for (int v = 0; v < NV; v++) begin
        check(act[v] == ref_fire(tot_u[v], tot_l[v], t, beta), "activity", v);
        if (ref_fire(tot_u[v], tot_l[v], t, beta)) n_fire++; else n_quiet++;
        if (beta && tot_u[v] >= t && 2 * tot_l[v] < t) n_veto++;
      end
      if (trial % 50 == 49) begin
        #1 rb = 1'b0; #1;
        for (int v = 0; v < NV; v++) check(uv[v] == 8'h00 && lv[v] == 8'h00, "clear", v);
        @(posedge clk); rb = 1'b1;
      end
    end
    $display("fired=%0d quiet=%0d beta_veto=%0d", n_fire, n_quiet, n_veto);
    check(n_fire > 0 && n_quiet > 0 && n_veto > 0, "all cases exercised", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
