// tb_div34_counter: self-checking testbench for the divide-by-3/4 counter.
// The expected state sequence comes from the published state cycles,
// written here as a table: divide by 4 runs 00 -> 10 -> 11 -> 01 -> 00,
// divide by 3 runs 00 -> 10 -> 11 -> 00. Phase 1 holds MC = 1, phase 2
// MC = 0, phase 3 changes MC at random cycles. Every cycle the state and the
// complementary outputs are compared with the table; the spacing of Q1
// rising edges is checked to be 4 or 3 cycles for a period in which MC held
// its value on the decision edge. Both modes and a mode switch must occur.
module tb_div34_counter;
  import prescaler_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, mc = 1'b1;
  logic q1, qb1, q2, qb2;
  div34_state_e model, got;
  logic mc_at_11;          // MC seen on the edge that left state 11
  int checks = 0, failures = 0;
  int cycle = 0, last_rise = -1;
  int n_div4 = 0, n_div3 = 0, n_switch = 0;
  logic q1_d = 1'b0;
  logic mc_prev = 1'b1;

  div34_counter dut (.clk(clk), .rst_n(rst_n), .mc(mc),
                     .q1(q1), .qb1(qb1), .q2(q2), .qb2(qb2));

  always #5 clk = ~clk;

  function automatic div34_state_e next_state(div34_state_e st, logic m);
    case (st)
      ST_00:   return ST_10;
      ST_10:   return ST_11;
      ST_11:   return m ? ST_01 : ST_00;
      default: return ST_00;   // ST_01
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d: state=%b model=%b mc=%0b", what, cycle, {q1, q2}, model, mc);
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
    repeat (2) @(posedge clk);
    #1 check({q1, q2} == 2'b00, "reset state");
    model = ST_00;
    mc_at_11 = 1'b1;
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (i < 400)       mc = MC_DIV4;
      else if (i < 800)  mc = MC_DIV3;
      else if (($urandom % 7) == 0) mc = ~mc;
      if (mc != mc_prev) n_switch++;
      mc_prev = mc;
      @(posedge clk);
      if (model == ST_11) mc_at_11 = mc;
      model = next_state(model, mc);
      #1;
      cycle++;
      got = div34_state_e'({q1, q2});
      check(got == model, "state");
      check(qb1 == ~q1 && qb2 == ~q2, "complementary outputs");
      if (q1 && !q1_d) begin
        if (last_rise >= 0) begin
          check(cycle - last_rise == (mc_at_11 ? 4 : 3), "period length");
          if (mc_at_11) n_div4++; else n_div3++;
        end
        last_rise = cycle;
      end
      q1_d = q1;
    end
    check(n_div4 > 0, "divide-by-4 period seen");
    check(n_div3 > 0, "divide-by-3 period seen");
    check(n_switch > 0, "mode switch seen");
    $display("periods: div4=%0d div3=%0d mode switches=%0d", n_div4, n_div3, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
