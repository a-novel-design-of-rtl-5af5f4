// tb_dmp_127_128: end-to-end testbench of the divide-by-127/128 prescaler at
// its default size (3/4 counter plus a 5-stage ripple counter).
// After reset the first output edge must come on the 61st clock edge. The
// modulus input is then changed at random times while fout is low (the
// terminal count that decides the next period lies in fout's high phase), so
// the mode in force when fout rises decides the length of the period that
// starts there. Every period must be 128 input cycles in mode 1 and 127 in
// mode 0, with 64 cycles low. The 3/4 counter's state is watched: inside a
// divide-by-127 period exactly one 11 -> 00 step (state 01 skipped) must
// occur, inside a divide-by-128 period none. Counted mechanisms, each of
// which must happen: divide-by-128 periods, divide-by-127 periods, skipped
// 01 states, mode switches.
module tb_dmp_127_128;
  logic clk = 1'b0, rst_n = 1'b0, mode = 1'b1;
  logic fout;
  logic [4:0] cnt;
  int checks = 0, failures = 0;
  int cycle = 0, last_rise = -1, last_fall = -1;
  int n128 = 0, n127 = 0, n_skip = 0, n_switch = 0;
  int skips_in_period = 0;
  logic fout_d = 1'b0;
  logic period_mode;
  logic [1:0] st, st_d;

  dmp_127_128 dut (.clk(clk), .rst_n(rst_n), .mode(mode), .fout(fout), .cnt(cnt));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    st_d = 2'b00;
    while (n127 + n128 < 60) begin
      @(posedge clk);
      #1;
      cycle++;
      st = {dut.u_div34.q1, dut.u_div34.q2};
      if (st_d == 2'b11 && st == 2'b00) begin
        n_skip++;
        skips_in_period++;
      end
      if (st_d == 2'b11) check(st == 2'b01 || st == 2'b00, "3/4 counter leaves 11 correctly");
      st_d = st;
      if (fout && !fout_d) begin
        if (last_rise < 0) begin
          check(cycle == 61, "first output edge after reset");
        end else begin
          check(cycle - last_rise == (period_mode ? 128 : 127), "output period");
          check(skips_in_period == (period_mode ? 0 : 1), "skipped 01 states per period");
          if (period_mode) n128++; else n127++;
        end
        last_rise = cycle;
        period_mode = mode;
        skips_in_period = 0;
      end
      if (!fout && fout_d) begin
        last_fall = cycle;
      end
      if (fout && !fout_d && last_fall >= 0) begin
        check(cycle - last_fall == 64, "low time of fout");
      end
      fout_d = fout;
      // change the modulus at a random point of the low phase
      if (!fout && cycle > 70 && ($urandom % 90) == 0) begin
        @(negedge clk);
        mode = ~mode;
        n_switch++;
      end
    end
    check(n128 > 0, "divide-by-128 periods occurred");
    check(n127 > 0, "divide-by-127 periods occurred");
    check(n_skip > 0, "state 01 skipped");
    check(n_switch > 0, "mode switched");
    $display("periods: /128=%0d /127=%0d skipped-01=%0d mode switches=%0d",
             n128, n127, n_skip, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
