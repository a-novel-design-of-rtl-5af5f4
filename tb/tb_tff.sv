// tb_tff: self-checking testbench for the toggle flip-flop stage.
// Checks reset to 0, a toggle on every rising clock edge, qb = ~q, and an
// output period of exactly two clock periods.
module tb_tff;
  logic clk = 1'b0, rst_n = 1'b0;
  logic q, qb;
  logic expected;
  int checks = 0, failures = 0;
  int cycle = 0, last_rise = -1;
  logic q_d = 1'b0;

  tff dut (.clk(clk), .rst_n(rst_n), .q(q), .qb(qb));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 check(q == 1'b0, "q in reset");
    rst_n = 1'b1;
    expected = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk);
      #1;
      cycle++;
      expected = ~expected;
      check(q == expected, "q toggles");
      check(qb == ~q, "qb is ~q");
      if (q && !q_d) begin
        if (last_rise >= 0) check(cycle - last_rise == 2, "period of 2 cycles");
        last_rise = cycle;
      end
      q_d = q;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
