// tb_parallel_counter: exhaustive check of the 8-, 7- and 4-input parallel
// counters against a bit-by-bit count made in the testbench, and of the
// output widths the neuron relies on (4, 3 and 3 bits).
module tb_parallel_counter;
  int checks = 0, failures = 0;
  logic [7:0] in8; logic [3:0] out8;
  logic [6:0] in7; logic [2:0] out7;
  logic [3:0] in4; logic [2:0] out4;

  parallel_counter              dut8 (.in_bits(in8), .count(out8));
  parallel_counter #(.N_IN(7))  dut7 (.in_bits(in7), .count(out7));
  parallel_counter #(.N_IN(4))  dut4 (.in_bits(in4), .count(out4));

  function automatic int ones(int v, int n);
    int s = 0;
    for (int i = 0; i < n; i++) if (((v >> i) & 1) != 0) s++;
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks += 3;
    if ($bits(out8) != 4) failures++;
    if ($bits(out7) != 3) failures++;
    if ($bits(out4) != 3) failures++;
    for (int v = 0; v < 256; v++) begin
      in8 = 8'(v); in7 = 7'(v); in4 = 4'(v);
      #1;
      checks++; if (int'(out8) != ones(v, 8)) failures++;
      if (v < 128) begin checks++; if (int'(out7) != ones(v, 7)) failures++; end
      if (v < 16)  begin checks++; if (int'(out4) != ones(v, 4)) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
