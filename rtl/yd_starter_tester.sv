// yd_starter_tester: functional test and fault-free controller of the
// Y-Delta starter ladder.
//
// The fault-free Petri-net model of the starter (yd_starter_ctrl) and the
// ladder under test receive the same primary inputs; a response comparator
// flags any difference of the six outputs. The test event sequence is
//   0 no event   - start button stuck on?
//   1 Pb1        - path from Pb1 to Y stuck off?
//   2 T_delta    - path from the timer to D stuck off?  (wait for the timer)
//   3 Pb2        - stop button stuck (its contact never opens)?
// and fail_step_o names the first step that failed, which selects the
// troubleshooting hint of that row. The structure and the sequence follow
// the document. Mode switch (this design's choice): while no test runs the
// fault-free model works as the starter controller itself, driven by
// op_in_i; during a test it is reset and driven by the sequencer.
// Each step holds its inputs SETTLE clocks (the timer step PRESET + SETTLE).
//
// Interface: clk, rst, start_i (begin a test), op_in_i (buttons in normal
// operation), ld_in_o (inputs to apply to the ladder), ld_out_i (ladder
// outputs), asic_out_o and asic_marking_o (fault-free model), step_o, fire_o, busy_o, done_o, pass_o,
// fail_step_o, dov_pos_o, dov_neg_o.
// Timing: a test takes 1 + 4*SETTLE + PRESET clocks.
module yd_starter_tester
  import bpn_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 1_000_000,
  parameter int unsigned DELAY_S = 5,
  parameter int unsigned SETTLE  = CLK_HZ / 10,
  localparam int unsigned PRESET = CLK_HZ * DELAY_S
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start_i,
  input  yd_in_t     op_in_i,
  output yd_in_t     ld_in_o,
  input  yd_out_t    ld_out_i,
  output yd_out_t    asic_out_o,
  output logic       tdelta_o,
  output logic [2:0] asic_marking_o,
  output logic [1:0] step_o,
  output logic [3:0] fire_o,
  output logic       busy_o,
  output logic       done_o,
  output logic       pass_o,
  output logic [1:0] fail_step_o,
  output logic [5:0] dov_pos_o,
  output logic [5:0] dov_neg_o
);

  // Step vectors, {pb1, pb2, ol}.
  localparam logic [3:0][2:0] STEP_IN = {3'b010, 3'b000, 3'b100, 3'b000};
  localparam logic [3:0][31:0] STEP_WAIT = {
    32'(SETTLE), 32'(PRESET + SETTLE), 32'(SETTLE), 32'(SETTLE)};

  logic       init;
  logic       strobe;
  logic       mismatch;
  logic       seq_fail;
  logic       cmp_fail;
  logic       cmp_pass;
  logic [2:0] seq_pi;
  yd_in_t     asic_in;

  test_event_sequencer #(
    .N_STEPS  (4),
    .IN_W     (3),
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

  assign ld_in_o = busy_o ? yd_in_t'(seq_pi) : op_in_i;
  assign asic_in = ld_in_o;

  yd_starter_ctrl #(
    .CLK_HZ (CLK_HZ),
    .DELAY_S(DELAY_S)
  ) u_asic (
    .clk      (clk),
    .rst      (rst | init),
    .in_i     (asic_in),
    .out_o    (asic_out_o),
    .tdelta_o (tdelta_o),
    .marking_o(asic_marking_o),
    .fire_o   (fire_o)
  );

  response_comparator #(.W(6)) u_cmp (
    .clk       (clk),
    .rst       (rst | init),
    .strobe_i  (strobe),
    .ref_i     (asic_out_o),
    .dut_i     (ld_out_i),
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
