// nand_ff: NAND-FF2 of the divide-by-3/4 counter, a flip-flop whose input
// stage computes the AND of its two data inputs.
//
// The point of this cell is that the mode-selection gate is merged into the
// flip-flop: in the circuit the first TSPC stage has d2 and s as two series
// pull-down transistors (a ratioed NAND), so no separate logic gate sits
// between DFF1 and this flop. At the logic level the flop stores (d2 AND s)
// on each rising clock edge. The active-low asynchronous reset (q = 0) is
// this design's addition.
//
// Ports: clk, rst_n (asynchronous, active low), d2, s; q, qb.
// Timing: one clock edge from d2/s to q.
module nand_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d2,
  input  logic s,
  output logic q,
  output logic qb
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d2 & s;
  end

  assign qb = ~q;

endmodule
