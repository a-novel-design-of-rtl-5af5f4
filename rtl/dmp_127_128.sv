// dmp_127_128: divide-by-127/128 dual-modulus prescaler built around the
// high-speed divide-by-3/4 counter.
//
// The input clock drives only the synchronous divide-by-3/4 counter. Its Q1
// output clocks an asynchronous divide-by-2**ASYNC_STAGES ripple counter
// (divide by 32 by default), whose last stage is the prescaler output fout.
// modulus_ctrl sets the 3/4 counter's MC:
//   mode = 1: MC stays 1, every 3/4 period is 4 cycles, fout = clk / 128.
//   mode = 0: MC drops to 0 while the ripple counter holds all ones, so that
//             one 3/4 period in 32 is 3 cycles (state 01 skipped), and
//             fout = clk / 127: each fout edge comes one cycle earlier.
// The ripple count changes on the edge that enters state 10 and MC is used
// on the edge that leaves state 11, which leaves the ripple chain and the
// control gate at least one full input cycle to settle. Taking the ripple
// clock from Q1 and decoding the all-ones count are this design's choices;
// the 3/4 counter and the 3/4 + divide-by-32 split follow the document.
//
// Ports: clk (input clock), rst_n (asynchronous, active low), mode (modulus
// select, 1 = 128, 0 = 127); fout (divided output, about 50% duty), cnt
// (ripple counter state, for observation).
// Timing: after reset the counter leaves state 00 on the first clock edge,
// so fout first rises on the 61st edge (16th rise of Q1); from then on
// each fout period is 128 or 127 input cycles with 64 cycles low.
// A change of mode takes effect at the next terminal count, which lies at
// the end of fout's high phase.
module dmp_127_128 #(
  parameter int unsigned ASYNC_STAGES = prescaler_pkg::ASYNC_STAGES
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    mode,
  output logic                    fout,
  output logic [ASYNC_STAGES-1:0] cnt
);

  logic mc;
  logic q1, qb1, q2, qb2;

  div34_counter u_div34 (
    .clk  (clk),
    .rst_n(rst_n),
    .mc   (mc),
    .q1   (q1),
    .qb1  (qb1),
    .q2   (q2),
    .qb2  (qb2)
  );

  async_counter #(.STAGES(ASYNC_STAGES)) u_async (
    .clk_in(q1),
    .rst_n (rst_n),
    .cnt   (cnt),
    .fout  (fout)
  );

  modulus_ctrl #(.STAGES(ASYNC_STAGES)) u_mctrl (
    .mode(mode),
    .cnt (cnt),
    .mc  (mc)
  );

endmodule
