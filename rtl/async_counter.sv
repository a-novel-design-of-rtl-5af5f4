// async_counter: asynchronous (ripple) binary counter, divide by 2**STAGES.
//
// STAGES toggle flip-flops are chained: stage 0 is clocked by clk_in, and
// each later stage by the inverted output of the stage before it, i.e. it
// toggles when that stage falls. The chain therefore counts up by one on
// every rising edge of clk_in, and cnt[STAGES-1] (also on fout) is clk_in
// divided by 2**STAGES with a 50% duty cycle. With the default 5 stages it
// is the divide-by-32 counter of the 127/128 prescaler. Clocking each stage
// from the previous inverted output (an up-counter) is this design's choice.
//
// Ports: clk_in, rst_n (asynchronous, active low); cnt (count, stage i in
// bit i), fout (= cnt[STAGES-1]).
// Timing: cnt changes on each rising edge of clk_in, after the ripple through
// the stages that toggle (zero delay in simulation).
module async_counter #(
  parameter int unsigned STAGES = prescaler_pkg::ASYNC_STAGES
) (
  input  logic              clk_in,
  input  logic              rst_n,
  output logic [STAGES-1:0] cnt,
  output logic              fout
);

  logic [STAGES-1:0] qb;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    if (i == 0) begin : g_first
      tff u_tff (.clk(clk_in),    .rst_n(rst_n), .q(cnt[i]), .qb(qb[i]));
    end else begin : g_next
      tff u_tff (.clk(qb[i-1]),   .rst_n(rst_n), .q(cnt[i]), .qb(qb[i]));
    end
  end

  assign fout = cnt[STAGES-1];

endmodule
