// tb_async_counter: self-checking testbench for the ripple counter at its
// default size (5 stages, divide by 32).
// A clock is applied to clk_in; after every rising edge the stage outputs
// must equal an integer model that counts up modulo 32, fout must be the top
// bit, and fout must repeat every 32 input periods with 16 high.
module tb_async_counter;
  localparam int unsigned STAGES = 5;
  logic clk_in = 1'b0, rst_n = 1'b0;
  logic [STAGES-1:0] cnt;
  logic fout, fout_d = 1'b0;
  int unsigned model = 0;
  int checks = 0, failures = 0;
  int cycle = 0, last_rise = -1, high_cycles = 0;
  int periods = 0;

  async_counter dut (.clk_in(clk_in), .rst_n(rst_n), .cnt(cnt), .fout(fout));

  always #5 clk_in = ~clk_in;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (cnt=%0d model=%0d)", what, $time, cnt, model);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk_in);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk_in);
    #1 check(cnt == '0, "count in reset");
    rst_n = 1'b1;
    for (int i = 0; i < 40 * (1 << STAGES); i++) begin
      @(posedge clk_in);
      #1;
      cycle++;
      model = (model + 1) % (1 << STAGES);
      check(cnt == STAGES'(model), "count");
      check(fout == cnt[STAGES-1], "fout is the top stage");
      if (fout && !fout_d) begin
        if (last_rise >= 0) begin
          check(cycle - last_rise == (1 << STAGES), "fout period");
          check(high_cycles == (1 << (STAGES - 1)), "fout high time");
          periods++;
        end
        last_rise = cycle;
        high_cycles = 1;
      end
      else if (fout) high_cycles++;
      fout_d = fout;
    end
    check(periods > 30, "enough output periods seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
