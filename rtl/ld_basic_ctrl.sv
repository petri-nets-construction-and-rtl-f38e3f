// ld_basic_ctrl: fault-free model of the basic self-holding rung.
//
// The rung drives coil C through the start contact A ("a" contact) with a
// holding contact of C in parallel, and the stop contact B ("b" contact) in
// series: C = (A + C) * not B, which simplifies to a two-place BPN:
//     p1:S --t1:A--> p2:C --t2:B--> p1:S
// with the initial token in p1. The coil is on while p2 holds the token.
// Net and output follow the document. The event of t1 is A * not B rather
// than A alone, the rung's simplified equation C = A * not B: with both
// buttons pressed in the same clock the stop wins, as it does in the rung
// (this design's reading). The synchronous active-high reset to p1 follows
// the document's HDL controller.
//
// Interface: clk, rst, a_i (start pressed), b_i (stop pressed), c_o (coil).
// Timing: c_o rises one clock after a_i is sampled high (b_i low) in p1
// and falls one clock after b_i is sampled high in p2.
module ld_basic_ctrl (
  input  logic       clk,
  input  logic       rst,
  input  logic       a_i,
  input  logic       b_i,
  output logic       c_o,
  output logic [1:0] marking_o,  // {p2:C, p1:S}
  output logic [1:0] fire_o      // {t2, t1}
);

  bpn_net #(
    .NP   (2),
    .NT   (2),
    //          t2      t1
    .PRE  ({2'b10, 2'b01}),
    .POST ({2'b01, 2'b10}),
    .OR_IN(2'b00),
    .M0   (2'b01)
  ) u_net (
    .clk      (clk),
    .rst      (rst),
    .ev_i     ({b_i, a_i & ~b_i}),
    .marking_o(marking_o),
    .fire_o   (fire_o)
  );

  assign c_o = marking_o[1];

endmodule
