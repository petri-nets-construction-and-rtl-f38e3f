// yd_starter_ctrl: fault-free (ASIC) model of the Y-Delta motor starter.
//
// The nine-rung relay ladder of the starter reduces to a three-place safe
// Boolean Petri net:
//     p1:PL1 (idle) --t1:Pb1--> p2:(Y,PL2) star start --t2:T_delta--> p3:(D,PL3) delta run
//     p2 --t31:(Pb2+OL)--> p1,    p3 --t32:(Pb2+OL)--> p1
// The composite place (X, M, Timer) of the full net is marked whenever the
// motor is in star or delta, so X and the timer coil are decoded as p2 | p3.
// The timer contact T_delta closes DELAY_S seconds after the timer coil is
// energised (5 s in the document). Places, transitions, outputs and the
// 5 s delay follow the document. This design's own choices: a stop or
// overload in star wins over a T_delta that arrives in the same cycle;
// t1 is the start button alone, as in the document's net.
//
// Interface: clk, rst (synchronous, active high, back to idle), in_i
// (pb1 start, pb2 stop, ol overload; 1 = active), out_o (PL1, PL2, PL3, X,
// Y, D), plus the marking and the firing vector for observation.
// Timing: outputs change one clock after the event is sampled; D follows
// Y after PRESET clocks of star operation plus one.
module yd_starter_ctrl
  import bpn_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 1_000_000,
  parameter int unsigned DELAY_S = 5
) (
  input  logic       clk,
  input  logic       rst,
  input  yd_in_t     in_i,
  output yd_out_t    out_o,
  output logic       tdelta_o,   // timer contact T_delta
  output logic [2:0] marking_o,  // {p3:D, p2:Y, p1:PL1}
  output logic [3:0] fire_o      // {t32, t31, t2, t1}
);

  logic       stop;
  logic       timer_coil;
  logic [3:0] ev;
  logic [3:0] fire_int;

  assign stop       = in_i.pb2 | in_i.ol;
  assign timer_coil = marking_o[1] | marking_o[2];

  on_delay_timer #(
    .CLK_HZ (CLK_HZ),
    .DELAY_S(DELAY_S)
  ) u_timer (
    .clk   (clk),
    .rst   (rst),
    .coil_i(timer_coil),
    .done_o(tdelta_o)
  );

  // Engine order (lowest index wins a shared token): t31, t32, t1, t2.
  assign ev = {tdelta_o, in_i.pb1, stop, stop};

  bpn_net #(
    .NP   (3),
    .NT   (4),
    //           t2      t1      t32     t31
    .PRE  ({3'b010, 3'b001, 3'b100, 3'b010}),
    .POST ({3'b100, 3'b010, 3'b001, 3'b001}),
    .OR_IN(4'b0000),
    .M0   (3'b001)
  ) u_net (
    .clk      (clk),
    .rst      (rst),
    .ev_i     (ev),
    .marking_o(marking_o),
    .fire_o   (fire_int)
  );

  assign fire_o = {fire_int[1], fire_int[0], fire_int[3], fire_int[2]};

  always_comb begin
    out_o.pl1 = marking_o[0];
    out_o.pl2 = marking_o[1];
    out_o.pl3 = marking_o[2];
    out_o.x   = marking_o[1] | marking_o[2];
    out_o.y   = marking_o[1];
    out_o.d   = marking_o[2];
  end

  // Implicit specification: relay coils Y and D are mutually exclusive.
  a_y_d_excl: assert property (@(posedge clk) disable iff (rst) !(out_o.y && out_o.d))
    else $error("yd_starter_ctrl: Y and D energised together");

endmodule
