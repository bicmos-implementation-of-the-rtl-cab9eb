// tb_tspc_latch: the latch pair must present, after each falling clock
// edge, the data present just before that edge, and must not change on
// the rising edge or while the data changes during either clock phase.
module tb_tspc_latch;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [7:0] d, q, exp_q;
  tspc_latch dut (.clk(clk), .d(d), .q(q));
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    d = 8'h00;
    for (int k = 0; k < 100; k++) begin
      @(posedge clk); #1;
      d = 8'($urandom);               // clock high: master evaluates
      #2 d = 8'($urandom);            // last value before the fall counts
      exp_q = d;
      @(negedge clk); #1;
      checks++; if (q != exp_q) failures++;
      d = ~d;                         // clock low: output must hold
      #2;
      checks++; if (q != exp_q) failures++;
      @(posedge clk); #1;
      checks++; if (q != exp_q) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
