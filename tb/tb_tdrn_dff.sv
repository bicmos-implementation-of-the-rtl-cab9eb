// tb_tdrn_dff: the flip-flop must take D only at falling clock edges, hold
// it through the rising edge, give QB = ~Q, and clear Q at once when RB
// goes low (before any clock edge), staying cleared while RB is low.
module tb_tdrn_dff;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rb;
  logic [7:0] d, q, qb;
  tdrn_dff #(.W(8)) dut (.clk(clk), .rb(rb), .d(d), .q(q), .qb(qb));
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("tdrn_dff: %s failed at %0t", what, $time); end
  endtask

  initial begin
    logic [7:0] held;
    rb = 1'b1; d = 8'h00;
    @(posedge clk);
    for (int k = 0; k < 100; k++) begin
      d = 8'($urandom);
      @(negedge clk); #1;
      check(q == d, "capture at falling edge");
      check(qb == ~q, "QB complement");
      held = q;
      d = ~d;                       // change D while clock is low
      @(posedge clk); #1;
      check(q == held, "hold through rising edge");
      if (k % 10 == 5) begin
        #1 rb = 1'b0; #1;
        check(q == 8'h00, "asynchronous clear");
        check(qb == 8'hff, "QB after clear");
        @(negedge clk); #1;
        check(q == 8'h00, "held clear while RB low");
        rb = 1'b1;
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
