// tb_tg_mux: self-checking testbench for the transmission-gate multiplexer.
// Applies every (mc, qb2) combination several times and checks
// S = 1 when mc = 1 (TG1 on) and S = qb2 when mc = 0 (TG0 on).
module tb_tg_mux;
  logic mc = 1'b0, qb2 = 1'b0;
  logic s;
  logic expected;
  int checks = 0, failures = 0;

  tg_mux dut (.mc(mc), .qb2(qb2), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      {mc, qb2} = (i < 4) ? 2'(i) : 2'($urandom);
      #1;
      expected = mc ? 1'b1 : qb2;
      checks++;
      if (s !== expected) begin
        failures++;
        $display("FAIL mc=%0b qb2=%0b: s=%0b expected %0b", mc, qb2, s, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
