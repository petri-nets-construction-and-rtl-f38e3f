// stamping_plc_model: behavioural model of the stamping cell's local
// controller (a PLC running SET/RST ladder logic), the equipment the
// abstract model is compared with. Not part of the design.
//
// One step relay per place, each rung "SET next step, RST this step" when
// this step is on and its switch closes; m2 resets every working step and
// sets the start step. Injectable faults on its input contacts: stuck_on
// and stuck_off masks in the bit order {m1, m2, a0, a1, b0, b1, c0, c1}.
module stamping_plc_model
  import bpn_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  stamp_in_t  in_i,
  input  logic [7:0] stuck_on,
  input  logic [7:0] stuck_off,
  output stamp_out_t out_o
);
  logic [6:1] r;  // step relays
  stamp_in_t s;

  assign s = stamp_in_t'((8'(in_i) | stuck_on) & ~stuck_off);

  always_ff @(posedge clk) begin
    if (rst) r <= 6'b000001;
    else if (s.m2 && !r[1]) r <= 6'b000001;
    else if (r[1] && s.m1) r <= 6'b000010;
    else if (r[2] && s.a1) r <= 6'b000100;
    else if (r[3] && s.b1) r <= 6'b001000;
    else if (r[4] && s.a0 && s.b0) r <= 6'b010000;
    else if (r[5] && s.c1) r <= 6'b100000;
    else if (r[6] && s.c0) r <= 6'b000010;
  end

  always_comb begin
    out_o.a_plus  = r[2];
    out_o.b_plus  = r[3];
    out_o.a_minus = r[4];
    out_o.b_minus = r[4];
    out_o.c_plus  = r[5];
    out_o.c_minus = r[6];
  end
endmodule
