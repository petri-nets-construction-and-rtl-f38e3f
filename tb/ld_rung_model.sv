// ld_rung_model: behavioural model of a relay rung C = (A + C) * not B, the
// device a ld_basic_tester checks, with injectable single faults.
//
// The coil is modelled as a register updated every clock (one clock of relay
// delay). Fault inputs, each active high:
//   a_on    start contact A stuck closed      a_off   A stuck open
//   b_shut  stop contact B never opens         b_open  B stuck open
//   c_on    coil stuck energised               c_off   coil never energises
//   h_off   holding contact of C stuck open
// Interface: clk, rst (synchronous, coil off), a_i, b_i (buttons pressed),
// the fault inputs, c_o (coil). Simulation only.
module ld_rung_model (
  input  logic clk,
  input  logic rst,
  input  logic a_i,
  input  logic b_i,
  input  logic a_on,
  input  logic a_off,
  input  logic b_shut,
  input  logic b_open,
  input  logic c_on,
  input  logic c_off,
  input  logic h_off,
  output logic c_o
);
  logic coil;
  logic a_c, b_c, hold_c;

  assign a_c    = a_on | (a_i & ~a_off);           // A contact closed
  assign b_c    = ~b_open & (b_shut | ~b_i);       // stop contact closed
  assign hold_c = coil & ~h_off;                   // holding contact closed

  always_ff @(posedge clk) begin
    if (rst) coil <= 1'b0;
    else     coil <= (a_c | hold_c) & b_c;
  end

  assign c_o = c_on | (coil & ~c_off);
endmodule
