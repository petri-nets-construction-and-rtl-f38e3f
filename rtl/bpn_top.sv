// bpn_top: the Boolean Petri net controllers and ladder testers, side by
// side.
//
// Four sequence controllers are each written as a safe Boolean Petri net
// (one flip-flop per place, one Boolean event per transition) and share the
// token engine bpn_net:
//   - the basic self-holding rung C = (A + C) not B, inside its tester
//                                                        (ld_basic_tester)
//   - the Y-Delta motor starter, inside its tester       (yd_starter_tester)
//   - the two-tank filling system                        (tank_fill_ctrl)
//   - the stamping cell, inside its tester               (stamping_tester)
// The three testers compare the Petri-net model with the ladder or PLC
// that really drives the machine, by applying a test event sequence and
// checking the responses; the machine-side controller is outside this
// chip, so its inputs and outputs are ports (ld_rung_*, yd_ld_*, st_lc_*).
// Beside them stands the example combinational circuit with fault injection used for
// Logic Petri net test generation (and_or_cut). The designs do not
// interact; they share only clk and rst.
//
// Interface: clk; rst (synchronous, active high, every net back to its
// initial marking); the remaining ports belong to one design each and are
// described in that module.
// Timing: see each module; the rung test takes 1 + 3*LD_SETTLE clocks,
// the Y-Delta test 1 + 4*YD_SETTLE + CLK_HZ*DELAY_S clocks and the
// stamping test 1 + 9*ST_SETTLE clocks.
module bpn_top
  import bpn_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 1_000_000,
  parameter int unsigned LD_SETTLE = CLK_HZ / 10,
  parameter int unsigned DELAY_S   = 5,
  parameter int unsigned YD_SETTLE = CLK_HZ / 10,
  parameter int unsigned ST_SETTLE = CLK_HZ / 10
) (
  input  logic       clk,
  input  logic       rst,

  // Basic self-holding rung.
  input  logic       ld_start_i,
  input  logic       ld_a_i,
  input  logic       ld_b_i,
  output logic       ld_rung_a_o,
  output logic       ld_rung_b_o,
  input  logic       ld_rung_c_i,
  output logic       ld_c_o,
  output logic [1:0] ld_marking_o,
  output logic [1:0] ld_fire_o,
  output logic [1:0] ld_step_o,
  output logic       ld_busy_o,
  output logic       ld_done_o,
  output logic       ld_pass_o,
  output logic [1:0] ld_fail_step_o,
  output logic       ld_dov_pos_o,
  output logic       ld_dov_neg_o,

  // Y-Delta starter: fault-free controller and ladder test.
  input  logic       yd_start_i,
  input  yd_in_t     yd_op_in_i,
  output yd_in_t     yd_ld_in_o,
  input  yd_out_t    yd_ld_out_i,
  output yd_out_t    yd_asic_out_o,
  output logic [2:0] yd_marking_o,
  output logic [3:0] yd_fire_o,
  output logic       yd_tdelta_o,
  output logic [1:0] yd_step_o,
  output logic       yd_busy_o,
  output logic       yd_done_o,
  output logic       yd_pass_o,
  output logic [1:0] yd_fail_step_o,
  output logic [5:0] yd_dov_pos_o,
  output logic [5:0] yd_dov_neg_o,

  // Two-tank filling.
  input  logic       tk_m_i,
  input  logic       tk_h1_i,
  input  logic       tk_b1_i,
  input  logic       tk_h2_i,
  input  logic       tk_b2_i,
  output tank_out_t  tk_valves_o,
  output logic [5:0] tk_marking_o,
  output logic [4:0] tk_fire_o,

  // Stamping cell: abstract-model controller and local-controller test.
  input  logic       st_start_i,
  input  stamp_in_t  st_op_in_i,
  output stamp_in_t  st_lc_in_o,
  input  stamp_out_t st_lc_out_i,
  output stamp_out_t st_model_out_o,
  output logic [5:0] st_marking_o,
  output logic [6:0] st_fire_o,
  output logic [3:0] st_step_o,
  output logic       st_busy_o,
  output logic       st_done_o,
  output logic       st_pass_o,
  output logic [3:0] st_fail_step_o,
  output fail_type_e st_fail_type_o,
  output logic [5:0] st_dov_pos_o,
  output logic [5:0] st_dov_neg_o,

  // Example combinational circuit with a stuck-at fault.
  input  logic [4:1] cut_p_i,
  input  logic       cut_fault_en_i,
  input  logic [2:0] cut_fault_site_i,
  input  logic       cut_fault_val_i,
  output logic       cut_p7_o,
  output logic [7:1] cut_lines_o
);

  ld_basic_tester #(.SETTLE(LD_SETTLE)) u_ld_basic (
    .clk        (clk),
    .rst        (rst),
    .start_i    (ld_start_i),
    .op_a_i     (ld_a_i),
    .op_b_i     (ld_b_i),
    .ld_a_o     (ld_rung_a_o),
    .ld_b_o     (ld_rung_b_o),
    .ld_c_i     (ld_rung_c_i),
    .c_o        (ld_c_o),
    .marking_o  (ld_marking_o),
    .fire_o     (ld_fire_o),
    .step_o     (ld_step_o),
    .busy_o     (ld_busy_o),
    .done_o     (ld_done_o),
    .pass_o     (ld_pass_o),
    .fail_step_o(ld_fail_step_o),
    .dov_pos_o  (ld_dov_pos_o),
    .dov_neg_o  (ld_dov_neg_o)
  );

  yd_starter_tester #(
    .CLK_HZ (CLK_HZ),
    .DELAY_S(DELAY_S),
    .SETTLE (YD_SETTLE)
  ) u_yd (
    .clk           (clk),
    .rst           (rst),
    .start_i       (yd_start_i),
    .op_in_i       (yd_op_in_i),
    .ld_in_o       (yd_ld_in_o),
    .ld_out_i      (yd_ld_out_i),
    .asic_out_o    (yd_asic_out_o),
    .tdelta_o      (yd_tdelta_o),
    .asic_marking_o(yd_marking_o),
    .step_o        (yd_step_o),
    .fire_o        (yd_fire_o),
    .busy_o        (yd_busy_o),
    .done_o        (yd_done_o),
    .pass_o        (yd_pass_o),
    .fail_step_o   (yd_fail_step_o),
    .dov_pos_o     (yd_dov_pos_o),
    .dov_neg_o     (yd_dov_neg_o)
  );

  tank_fill_ctrl u_tank (
    .clk      (clk),
    .rst      (rst),
    .m_i      (tk_m_i),
    .h1_i     (tk_h1_i),
    .b1_i     (tk_b1_i),
    .h2_i     (tk_h2_i),
    .b2_i     (tk_b2_i),
    .valves_o (tk_valves_o),
    .marking_o(tk_marking_o),
    .fire_o   (tk_fire_o)
  );

  stamping_tester #(
    .SETTLE(ST_SETTLE)
  ) u_stamp (
    .clk            (clk),
    .rst            (rst),
    .start_i        (st_start_i),
    .op_in_i        (st_op_in_i),
    .lc_in_o        (st_lc_in_o),
    .lc_out_i       (st_lc_out_i),
    .model_out_o    (st_model_out_o),
    .model_marking_o(st_marking_o),
    .step_o         (st_step_o),
    .fire_o         (st_fire_o),
    .busy_o         (st_busy_o),
    .done_o         (st_done_o),
    .pass_o         (st_pass_o),
    .fail_step_o    (st_fail_step_o),
    .fail_type_o    (st_fail_type_o),
    .dov_pos_o      (st_dov_pos_o),
    .dov_neg_o      (st_dov_neg_o)
  );

  and_or_cut u_cut (
    .p_i         (cut_p_i),
    .fault_en_i  (cut_fault_en_i),
    .fault_site_i(cut_fault_site_i),
    .fault_val_i (cut_fault_val_i),
    .p7_o        (cut_p7_o),
    .lines_o     (cut_lines_o)
  );

endmodule
