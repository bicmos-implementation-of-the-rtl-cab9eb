// hype_tb_pkg: reference model of the HyPE neuron firing rule, written
// from the rule itself rather than from the RTL:
//   a neuron fires when (active inputs) >= T, and a beta regular neuron
//   must also have 2 * (active regular inputs) >= T.
// Also the value the host loads on the threshold inputs (T - 1) and the
// start value of the lower half.
package hype_tb_pkg;
  function automatic bit ref_fire(int n_active, int n_active_regular, int t, bit beta_regular);
    return (n_active >= t) && (!beta_regular || (2 * n_active_regular >= t));
  endfunction

  function automatic int ones8(logic [7:0] v, int n);
    int s = 0;
    for (int i = 0; i < n; i++) if (v[i]) s++;
    return s;
  endfunction
endpackage
