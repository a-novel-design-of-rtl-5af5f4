// tb_nand_ff: self-checking testbench for NAND-FF2 (nand_ff).
// Drives all four (d2, s) pairs and then random pairs, and checks that q
// holds d2 AND s from the previous rising edge and that qb is its inverse.
module tb_nand_ff;
  logic clk = 1'b0, rst_n = 1'b0, d2 = 1'b0, s = 1'b0;
  logic q, qb;
  int checks = 0, failures = 0;
  logic expected;

  nand_ff dut (.clk(clk), .rst_n(rst_n), .d2(d2), .s(s), .q(q), .qb(qb));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (d2=%0b s=%0b) at %0t", what, got, exp, d2, s, $time);
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
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (i < 8) {d2, s} = 2'(i);
      else       {d2, s} = 2'($urandom);
      expected = d2 & s;
      @(posedge clk);
      #1;
      check(q, expected, "q");
      check(qb, ~expected, "qb");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
