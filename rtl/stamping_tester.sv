// stamping_tester: functional test and abstract-model controller of the
// stamping cell.
//
// The abstract Petri-net model of the stamping cell (stamping_ctrl) runs
// next to the local controller (a PLC) and both get the same inputs; a
// response comparator checks the six solenoid valves after each test event.
// The test event sequence is m1, a1, b1, a0, b0, c1, c0, m2, preceded by
// "no event": step 0 catches normally open switches stuck on, steps 1..7
// catch switches or wiring stuck off, step 8 checks the safety stop m2.
// fail_step_o gives the first failing step and fail_type_o sorts it into
// the three troubleshooting classes of the switch types: stuck on (failed
// at "no event"), stuck off (failed at m1..c0) and the normally closed
// safety switch m2 (failed at the last step). The sequence, the comparison
// and the three classes follow the document. This design's choices: the
// limit switches are applied as the levels a real cell would show (a
// cylinder at rest keeps its retracted switch closed, so a0, b0 and c0 are
// 1 whenever that cylinder is back), each step is held SETTLE clocks, and,
// as for the Y-Delta starter, the model acts as the controller itself
// (driven by op_in_i) while no test runs.
//
// Interface: clk, rst, start_i, op_in_i, lc_in_o (inputs for the local
// controller), lc_out_i (its valves), model_out_o, model_marking_o,
// step_o, fire_o, busy_o, done_o, pass_o, fail_step_o, fail_type_o (FT_NONE
// until a step fails), dov_pos_o, dov_neg_o.
// Timing: a test takes 1 + 9*SETTLE clocks.
module stamping_tester
  import bpn_pkg::*;
#(
  parameter int unsigned SETTLE = 100_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start_i,
  input  stamp_in_t  op_in_i,
  output stamp_in_t  lc_in_o,
  input  stamp_out_t lc_out_i,
  output stamp_out_t model_out_o,
  output logic [5:0] model_marking_o,
  output logic [3:0] step_o,
  output logic [6:0] fire_o,
  output logic       busy_o,
  output logic       done_o,
  output logic       pass_o,
  output logic [3:0] fail_step_o,
  output fail_type_e fail_type_o,
  output logic [5:0] dov_pos_o,
  output logic [5:0] dov_neg_o
);

  // Step vectors, {m1, m2, a0, a1, b0, b1, c0, c1}.
  localparam logic [8:0][7:0] STEP_IN = {
    8'b0110_1010,   // 8: m2 (safety stop)
    8'b0010_1010,   // 7: c0
    8'b0010_1001,   // 6: c1
    8'b0010_1010,   // 5: b0 (a0 still closed)
    8'b0010_0110,   // 4: a0
    8'b0001_0110,   // 3: b1
    8'b0001_1010,   // 2: a1
    8'b1010_1010,   // 1: m1
    8'b0010_1010    // 0: no event, all cylinders retracted
  };
  localparam logic [8:0][31:0] STEP_WAIT = {9{32'(SETTLE)}};

  logic       init;
  logic       strobe;
  logic       mismatch;
  logic       seq_fail;
  logic       cmp_fail;
  logic       cmp_pass;
  logic [7:0] seq_pi;

  test_event_sequencer #(
    .N_STEPS  (9),
    .IN_W     (8),
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

  assign lc_in_o = busy_o ? stamp_in_t'(seq_pi) : op_in_i;

  stamping_ctrl u_model (
    .clk      (clk),
    .rst      (rst | init),
    .in_i     (lc_in_o),
    .valves_o (model_out_o),
    .marking_o(model_marking_o),
    .fire_o   (fire_o)
  );

  response_comparator #(.W(6)) u_cmp (
    .clk       (clk),
    .rst       (rst | init),
    .strobe_i  (strobe),
    .ref_i     (model_out_o),
    .dut_i     (lc_out_i),
    .mismatch_o(mismatch),
    .dov_pos_o (dov_pos_o),
    .dov_neg_o (dov_neg_o),
    .fail_o    (cmp_fail),
    .pass_o    (cmp_pass)
  );

  assign pass_o = !seq_fail;

  // Troubleshooting class of the first failing step.
  always_comb begin
    if (!seq_fail)                fail_type_o = FT_NONE;
    else if (fail_step_o == 4'd0) fail_type_o = FT_STUCK_ON;
    else if (fail_step_o == 4'd8) fail_type_o = FT_SAFETY;
    else                          fail_type_o = FT_STUCK_OFF;
  end

  a_fail_agree: assert property (@(posedge clk) disable iff (rst) done_o |-> (cmp_fail == seq_fail && cmp_pass == !seq_fail));

endmodule
