// prescaler_pkg: constants shared by the divide-by-127/128 dual-modulus
// prescaler and its divide-by-3/4 counter.
//
// The mode-control encoding follows the counter description: MC = 1 makes
// the synchronous counter divide by 4, MC = 0 makes it divide by 3. The
// prescaler's own modulus input uses the same polarity (1 selects the larger
// modulus, 128), which is this design's choice.
package prescaler_pkg;

  // Mode-control levels of the divide-by-3/4 counter.
  localparam logic MC_DIV3 = 1'b0;
  localparam logic MC_DIV4 = 1'b1;

  // Stages of the asynchronous counter behind the 3/4 counter:
  // 5 toggle stages divide by 32, giving 4*32 = 128 and 4*32-1 = 127.
  localparam int unsigned ASYNC_STAGES = 5;

  // State of the divide-by-3/4 counter, written as {Q1, Q2}.
  typedef enum logic [1:0] {
    ST_00 = 2'b00,
    ST_10 = 2'b10,
    ST_11 = 2'b11,
    ST_01 = 2'b01
  } div34_state_e;

endpackage
