// modulus_ctrl: forms the mode-control input MC of the divide-by-3/4 counter.
//
// A 127/128 prescaler is a 3/4 counter followed by a divide-by-32 counter.
// To divide by 128 every 3/4-counter period is 4 cycles; to divide by 127
// exactly one of the 32 periods must be 3 cycles. This block asks for the
// short period when the prescaler is in its small-modulus mode and the
// asynchronous counter shows its terminal count (all ones):
//   mc = mode | ~&cnt      (mc = 0 means "divide by 3")
// Since the count takes each value once per output period, exactly one
// period is shortened. The document states only that the counter divides by
// 3 in divide-by-127 mode; this gate and the terminal count it decodes are
// this design's choice.
//
// Ports: mode (1 = divide by 128, 0 = divide by 127), cnt (asynchronous
// counter state); mc. Purely combinational.
module modulus_ctrl
  import prescaler_pkg::*;
#(
  parameter int unsigned STAGES = ASYNC_STAGES
) (
  input  logic              mode,
  input  logic [STAGES-1:0] cnt,
  output logic              mc
);

  always_comb begin
    if (mode == MC_DIV3 && (&cnt)) mc = MC_DIV3;
    else                           mc = MC_DIV4;
  end

endmodule
