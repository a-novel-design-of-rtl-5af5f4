// tg_mux: the 2-to-1 transmission-gate multiplexer that forms the select
// signal S of the divide-by-3/4 counter.
//
// Two transmission gates share the output node S. TG0 passes QB2 to S and is
// on when MC = 0; TG1 passes the supply (logic 1) to S and is on when
// MC = 1; an inverter on MC drives the complementary gate inputs. So
// S = MC ? 1 : QB2. With MC = 1 the following NAND-FF2 sees "Q1 AND 1" and
// the counter divides by 4; with MC = 0 it sees "Q1 AND QB2" and divides by 3.
// QB2 to S through one gate is the counter's critical path.
//
// Ports: mc, qb2; s. Purely combinational.
module tg_mux
  import prescaler_pkg::*;
(
  input  logic mc,
  input  logic qb2,
  output logic s
);

  always_comb begin
    if (mc == MC_DIV4) s = 1'b1;   // TG1 on: S tied to the supply
    else               s = qb2;    // TG0 on: S follows QB2
  end

endmodule
