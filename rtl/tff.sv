// tff: one toggle flip-flop stage of the asynchronous (ripple) counter.
//
// The stage inverts its output on every rising edge of its own clock input,
// so q runs at half the frequency of clk. In the prescaler the stages are
// TSPC flip-flops with their inverted output fed back to the data input,
// chosen there for low power since they run at a quarter of the input
// frequency or less. The active-low asynchronous reset (q = 0) is this
// design's addition.
//
// Ports: clk, rst_n (asynchronous, active low); q, qb.
// Timing: q toggles on every rising clk edge.
module tff (
  input  logic clk,
  input  logic rst_n,
  output logic q,
  output logic qb
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= ~q;
  end

  assign qb = ~q;

endmodule
