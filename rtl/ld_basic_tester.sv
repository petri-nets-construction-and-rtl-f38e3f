// ld_basic_tester: functional test and fault-free controller of the basic
// self-holding rung C = (A + C) * not B.
//
// The rung has two inputs, so its six single stuck-at faults (A, B and C,
// each stuck on or stuck off) are covered by a test event sequence of only
// three steps, one per transition of the two-place net plus "no event":
//   0 no event  (A=0, B=0)  C must stay off - else start button A stuck on
//   1 A event   (A=1, B=0)  C must come on  - else A, B, C or the wiring
//                                             between them stuck off
//   2 B event   (A=0, B=1)  C must drop     - else stop button B stuck (its
//                                             contact never opens)
// The fault-free net (ld_basic_ctrl) and the rung under test receive the
// same inputs; a one-bit response comparator checks the coil at the end of
// each step and fail_step_o names the first step that failed, i.e. the row
// of the troubleshooting list above. Sequence, outputs and the hints follow
// the document. Mode switch (this design's choice, as in the other testers):
// while no test runs the net works as the rung's controller, driven by
// op_a_i/op_b_i; during a test it is reset and driven by the sequencer.
//
// Interface: clk, rst, start_i (begin a test), op_a_i/op_b_i (buttons in
// normal operation), ld_a_o/ld_b_o (inputs to apply to the rung), ld_c_i
// (coil of the rung under test), c_o/marking_o/fire_o (fault-free net),
// step_o, busy_o, done_o, pass_o, fail_step_o, dov_pos_o (C should be on but
// is off), dov_neg_o (C is on but should be off).
// Timing: a test takes 1 + 3*SETTLE clocks; each step holds its inputs
// SETTLE clocks and is compared in its last clock.
module ld_basic_tester #(
  parameter int unsigned SETTLE = 100_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start_i,
  input  logic       op_a_i,
  input  logic       op_b_i,
  output logic       ld_a_o,
  output logic       ld_b_o,
  input  logic       ld_c_i,
  output logic       c_o,
  output logic [1:0] marking_o,
  output logic [1:0] fire_o,
  output logic [1:0] step_o,
  output logic       busy_o,
  output logic       done_o,
  output logic       pass_o,
  output logic [1:0] fail_step_o,
  output logic       dov_pos_o,
  output logic       dov_neg_o
);

  // Step vectors, {A, B}; element 0 is step 0.
  localparam logic [2:0][1:0] STEP_IN = {2'b01, 2'b10, 2'b00};
  localparam logic [2:0][31:0] STEP_WAIT = {32'(SETTLE), 32'(SETTLE), 32'(SETTLE)};

  logic       init;
  logic       strobe;
  logic       mismatch;
  logic       seq_fail;
  logic       cmp_fail;
  logic       cmp_pass;
  logic [1:0] seq_pi;

  test_event_sequencer #(
    .N_STEPS  (3),
    .IN_W     (2),
    .STEP_IN  (STEP_IN),
    .STEP_WAIT(STEP_WAIT)
  ) u_seq (
    .clk        (clk),
    .rst        (rst),
    .start_i    (start_i),
    .mismatch_i (mismatch),
    .init_o     (init),
    .pi_o       (seq_pi),
    .strobe_o   (strobe),
    .busy_o     (busy_o),
    .done_o     (done_o),
    .fail_o     (seq_fail),
    .fail_step_o(fail_step_o),
    .step_o     (step_o)
  );

  assign {ld_a_o, ld_b_o} = busy_o ? seq_pi : {op_a_i, op_b_i};

  ld_basic_ctrl u_model (
    .clk      (clk),
    .rst      (rst | init),
    .a_i      (ld_a_o),
    .b_i      (ld_b_o),
    .c_o      (c_o),
    .marking_o(marking_o),
    .fire_o   (fire_o)
  );

  response_comparator #(.W(1)) u_cmp (
    .clk       (clk),
    .rst       (rst | init),
    .strobe_i  (strobe),
    .ref_i     (c_o),
    .dut_i     (ld_c_i),
    .mismatch_o(mismatch),
    .dov_pos_o (dov_pos_o),
    .dov_neg_o (dov_neg_o),
    .fail_o    (cmp_fail),
    .pass_o    (cmp_pass)
  );

  assign pass_o = !seq_fail;

  // The comparator and the sequencer judge the same strobes.
  a_fail_agree: assert property (@(posedge clk) disable iff (rst) done_o |-> (cmp_fail == seq_fail && cmp_pass == !seq_fail));

endmodule
