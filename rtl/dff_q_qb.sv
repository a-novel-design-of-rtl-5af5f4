// dff_q_qb: DFF1 of the divide-by-3/4 counter, a rising-edge D flip-flop
// with true (q) and complementary (qb) outputs.
//
// In silicon this is a true-single-phase-clock (TSPC) ratioed flip-flop; at
// the logic level it is a plain edge-triggered register: q takes d on every
// rising clock edge and qb is always its inverse. The active-low
// asynchronous reset (q = 0) is this design's addition so that simulation and
// start-up are deterministic; the counter it sits in is self-starting without
// it.
//
// Ports: clk, rst_n (asynchronous, active low), d; q, qb.
// Timing: one clock edge from d to q.
module dff_q_qb (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic qb
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

  assign qb = ~q;

endmodule
