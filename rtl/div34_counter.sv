// div34_counter: the high-speed synchronous divide-by-3/4 counter.
//
// Two flip-flops form a 2-bit Johnson counter: DFF1 takes QB2, NAND-FF2
// takes Q1 AND S, and S comes from the transmission-gate multiplexer.
//   MC = 1 (divide by 4): S = 1, and {Q1,Q2} runs 00 -> 10 -> 11 -> 01 -> 00.
//   MC = 0 (divide by 3): S = QB2, so NAND-FF2 loads 0 when leaving 11 and
//                         the state 01 is skipped: 00 -> 10 -> 11 -> 00.
// MC only matters on the clock edge that leaves state 11 (Q1 = Q2 = 1); at
// every other edge S = 1 and S = QB2 give the same next state.
// The structure (DFF1, NAND-FF2, TG multiplexer, feedback QB2 -> D1) follows
// the published schematic. Reset to state 00 is this design's addition; the
// counter reaches its cycle from any state without it (01 in divide-by-3
// mode simply goes to 00).
//
// Ports: clk, rst_n (asynchronous, active low), mc; q1, qb1, q2, qb2.
// Timing: the outputs repeat every 4 (mc = 1) or 3 (mc = 0) clock cycles;
// q1 rises once per period, on the edge that leaves state 00.
module div34_counter (
  input  logic clk,
  input  logic rst_n,
  input  logic mc,
  output logic q1,
  output logic qb1,
  output logic q2,
  output logic qb2
);

  logic s;

  dff_q_qb u_dff1 (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (qb2),
    .q    (q1),
    .qb   (qb1)
  );

  tg_mux u_tg_mux (
    .mc (mc),
    .qb2(qb2),
    .s  (s)
  );

  nand_ff u_nand_ff2 (
    .clk  (clk),
    .rst_n(rst_n),
    .d2   (q1),
    .s    (s),
    .q    (q2),
    .qb   (qb2)
  );

endmodule
