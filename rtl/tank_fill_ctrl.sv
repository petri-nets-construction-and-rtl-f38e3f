// tank_fill_ctrl: BPN controller of the two-tank filling system.
//
// Each tank cycles through three steps: empty, filling (inlet valve V open)
// and emptying (outlet valve W open). The two cycles run concurrently and
// meet only at the start transition, which needs both tanks empty:
//     (1) m  : {1, 4} -> {2, 5}      step 2: V1, step 5: V2
//     (2) h1 : 2 -> 3                step 3: W1
//     (3) b1 : 3 -> 1
//     (4) h2 : 5 -> 6                step 6: W2
//     (5) b2 : 6 -> 4
// Initial marking {1, 4}. The net, its events and outputs follow the
// document. This design's choice: the sensor inputs are levels, h = water
// above the high mark, b = water below the low mark.
//
// Interface: clk, rst (synchronous, active high), m_i, h1_i, b1_i, h2_i,
// b2_i, valves_o (V1, V2, W1, W2), marking_o (steps 6..1), fire_o (5..1).
// Timing: valves change one clock after the enabling event is sampled.
module tank_fill_ctrl
  import bpn_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       m_i,
  input  logic       h1_i,
  input  logic       b1_i,
  input  logic       h2_i,
  input  logic       b2_i,
  output tank_out_t  valves_o,
  output logic [5:0] marking_o,
  output logic [4:0] fire_o
);

  bpn_net #(
    .NP   (6),
    .NT   (5),
    //           (5)b2      (4)h2      (3)b1      (2)h1      (1)m
    .PRE  ({6'b100000, 6'b010000, 6'b000100, 6'b000010, 6'b001001}),
    .POST ({6'b001000, 6'b100000, 6'b000001, 6'b000100, 6'b010010}),
    .OR_IN(5'b00000),
    .M0   (6'b001001)
  ) u_net (
    .clk      (clk),
    .rst      (rst),
    .ev_i     ({b2_i, h2_i, b1_i, h1_i, m_i}),
    .marking_o(marking_o),
    .fire_o   (fire_o)
  );

  always_comb begin
    valves_o.v1 = marking_o[1];
    valves_o.w1 = marking_o[2];
    valves_o.v2 = marking_o[4];
    valves_o.w2 = marking_o[5];
  end

endmodule
