// stamping_ctrl: BPN controller of the three-cylinder stamping cell.
//
// Pusher A feeds a work piece, stamper B stamps it, both retract together,
// then thrower C ejects it and the cycle restarts with A+:
//   p1:s -t1:m1-> p2:A+ -t2:a1-> p3:B+ -t3:b1-> p4:(A-,B-) -t4:a0*b0->
//   p5:C+ -t5:c1-> p6:C- -t6:c0-> p2
// The safety transition t7:m2 is an OR transition: from whichever of p2..p6
// holds the token it returns the net to p1, which stops every valve. The
// nets, events and valve assignments follow the document (the net with the
// added safety design). This design's choice: m2 takes priority over any
// other event sampled in the same cycle.
//
// Interface: clk, rst (synchronous, active high, token to p1), in_i (m1,
// m2, limit switches a0..c1, 1 = closed), valves_o (A+, A-, B+, B-, C+,
// C-), marking_o (p6..p1), fire_o (t7..t1).
// Timing: valves change one clock after the enabling event is sampled.
module stamping_ctrl
  import bpn_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  stamp_in_t  in_i,
  output stamp_out_t valves_o,
  output logic [5:0] marking_o,
  output logic [6:0] fire_o
);

  logic [6:0] fire_int;

  // Engine order: t7 first (priority), then t1..t6.
  bpn_net #(
    .NP   (6),
    .NT   (7),
    //           t6         t5         t4         t3         t2         t1         t7
    .PRE  ({6'b100000, 6'b010000, 6'b001000, 6'b000100, 6'b000010, 6'b000001, 6'b111110}),
    .POST ({6'b000010, 6'b100000, 6'b010000, 6'b001000, 6'b000100, 6'b000010, 6'b000001}),
    .OR_IN(7'b0000001),
    .M0   (6'b000001)
  ) u_net (
    .clk      (clk),
    .rst      (rst),
    .ev_i     ({in_i.c0, in_i.c1, in_i.a0 & in_i.b0, in_i.b1, in_i.a1, in_i.m1, in_i.m2}),
    .marking_o(marking_o),
    .fire_o   (fire_int)
  );

  assign fire_o = {fire_int[0], fire_int[6:1]};

  always_comb begin
    valves_o.a_plus  = marking_o[1];
    valves_o.b_plus  = marking_o[2];
    valves_o.a_minus = marking_o[3];
    valves_o.b_minus = marking_o[3];
    valves_o.c_plus  = marking_o[4];
    valves_o.c_minus = marking_o[5];
  end

endmodule
