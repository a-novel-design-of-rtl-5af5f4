// tb_modulus_ctrl: self-checking testbench for the modulus control gate.
// Sweeps both modes and every counter value and checks that MC drops to 0
// (divide by 3) only in the divide-by-127 mode at the all-ones count.
module tb_modulus_ctrl;
  localparam int unsigned STAGES = 5;
  logic mode = 1'b1;
  logic [STAGES-1:0] cnt = '0;
  logic mc;
  logic expected;
  int checks = 0, failures = 0;

  modulus_ctrl dut (.mode(mode), .cnt(cnt), .mc(mc));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int c = 0; c < (1 << STAGES); c++) begin
        mode = 1'(m);
        cnt  = STAGES'(c);
        #1;
        expected = (m == 0 && c == (1 << STAGES) - 1) ? 1'b0 : 1'b1;
        checks++;
        if (mc !== expected) begin
          failures++;
          $display("FAIL mode=%0d cnt=%0d: mc=%0b expected %0b", m, c, mc, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
