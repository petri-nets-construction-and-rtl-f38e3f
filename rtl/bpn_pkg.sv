// bpn_pkg: shared types of the Boolean Petri net (BPN) controllers.
//
// A BPN controller keeps one bit per place (1 = token present, the net is
// safe so a place never holds more than one token) and fires a transition
// when all its input places are marked and its Boolean event equation is
// true. The structs below name the primary outputs and inputs of the
// Y-Delta starter and of the stamping cell, in the order the controllers
// and testers pack them. The names follow the ladder and cell symbols:
// PL1/PL2/PL3 indicator lights, X/Y/D relay coils; A+/A-, B+/B-, C+/C-
// solenoid valves, m1/m2 push buttons, a0..c1 limit switches. fail_type_e
// is the three-way troubleshooting class reported by the stamping tester.
package bpn_pkg;

  // Outputs of the Y-Delta starter, compared as one 6-bit vector.
  typedef struct packed {
    logic pl1;  // green lamp: motor idle
    logic pl2;  // yellow lamp: star start
    logic pl3;  // red lamp: delta run
    logic x;    // main contactor (composite place X, M, Timer)
    logic y;    // star contactor
    logic d;    // delta contactor
  } yd_out_t;

  // Primary inputs of the Y-Delta starter.
  typedef struct packed {
    logic pb1;  // start push button ("a" contact)
    logic pb2;  // stop push button ("b" contact, 1 = pressed)
    logic ol;   // overload relay tripped
  } yd_in_t;

  // Solenoid valves of the stamping cell.
  typedef struct packed {
    logic a_plus;
    logic a_minus;
    logic b_plus;
    logic b_minus;
    logic c_plus;
    logic c_minus;
  } stamp_out_t;

  // Push buttons and limit switches of the stamping cell.
  typedef struct packed {
    logic m1;   // start
    logic m2;   // safety stop
    logic a0;   // pusher A retracted
    logic a1;   // pusher A extended
    logic b0;   // stamper B retracted
    logic b1;   // stamper B extended
    logic c0;   // thrower C retracted
    logic c1;   // thrower C extended
  } stamp_in_t;

  // Output valves of the two-tank filling system.
  typedef struct packed {
    logic v1;
    logic v2;
    logic w1;
    logic w2;
  } tank_out_t;

  // Troubleshooting class of a failed stamping-cell test: which kind of
  // switch to inspect first.
  typedef enum logic [1:0] {
    FT_NONE      = 2'd0,  // no failure
    FT_STUCK_ON  = 2'd1,  // failed with no event: a normally open switch stuck on
    FT_STUCK_OFF = 2'd2,  // failed at an event: that switch or its wiring stuck off
    FT_SAFETY    = 2'd3   // failed at the safety stop: switch m2 (normally closed)
  } fail_type_e;

endpackage
