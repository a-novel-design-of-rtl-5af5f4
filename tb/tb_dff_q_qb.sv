// tb_dff_q_qb: self-checking testbench for DFF1 (dff_q_qb).
// Drives random data for many cycles and checks that q equals the value of d
// sampled at the previous rising edge, that qb is always its inverse, and
// that the asynchronous reset clears q even between clock edges.
module tb_dff_q_qb;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0;
  logic q, qb;
  int checks = 0, failures = 0;
  logic expected;

  dff_q_qb dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .qb(qb));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 check(q, 1'b0, "q in reset");
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      d = 1'($urandom);
      expected = d;
      @(posedge clk);
      #1;
      check(q, expected, "q after edge");
      check(qb, ~expected, "qb after edge");
    end
    // asynchronous reset in the middle of a cycle
    @(negedge clk); d = 1'b1; @(posedge clk); #1 check(q, 1'b1, "q before reset");
    #2 rst_n = 1'b0; #1 check(q, 1'b0, "q after async reset");
    check(qb, 1'b1, "qb after async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
