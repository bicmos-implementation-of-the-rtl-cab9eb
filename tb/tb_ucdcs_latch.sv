// tb_ucdcs_latch: as for the TSPC latch, with the complemented clock
// supplied: the output takes the data present before each falling edge of
// clk and holds it through the other phase.
module tb_ucdcs_latch;
  int checks = 0, failures = 0;
  logic clk = 1'b0, clk_b;
  logic [7:0] d, q, exp_q;
  ucdcs_latch dut (.clk(clk), .clk_b(clk_b), .d(d), .q(q));
  always #5 clk = ~clk;
  assign clk_b = ~clk;
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
      d = 8'($urandom);
      #2 d = 8'($urandom);
      exp_q = d;
      @(negedge clk); #1;
      checks++; if (q != exp_q) failures++;
      d = ~d;
      #2;
      checks++; if (q != exp_q) failures++;
      @(posedge clk); #1;
      checks++; if (q != exp_q) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
