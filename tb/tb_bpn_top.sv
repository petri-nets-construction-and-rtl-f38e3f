// tb_bpn_top: end-to-end test of all designs at reduced timer and step
// lengths (20 Hz clock, 1 s delay, 6-clock test steps).
//
// Drives the basic rung, the tanks, the example circuit, the Y-Delta starter
// and the stamping cell in operation, then runs the three functional tests
// twice: against fault-free behavioural models of the rung, the ladder and
// the PLC (must pass) and with one injected fault each (must fail at the
// right event).
// Every mechanism is counted and a mechanism that never happened fails.
module tb_bpn_top;
  import bpn_pkg::*;
  localparam int unsigned CLK_HZ = 20, DELAY_S = 1, SETTLE = 6;
  localparam int unsigned PRESET = CLK_HZ * DELAY_S;
  localparam int unsigned WATCHDOG = 20000;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_self_hold, n_rung_reset, n_yd_start, n_yd_timer, n_yd_stop_pb2, n_yd_stop_ol, n_mode_op,
      n_yd_pass, n_yd_fail, n_tank_fill, n_tank_sync, n_st_join_wait, n_st_cycle, n_st_safety,
      n_st_pass, n_st_fail, n_cut_detect, n_ld_pass, n_ld_fail;

  // Basic rung.
  logic ld_start = 0, ld_a = 0, ld_b = 0, ld_c, ld_rung_a, ld_rung_b, ld_rung_c;
  logic ld_busy, ld_done, ld_pass, ld_dpos, ld_dneg;
  logic [1:0] ld_marking, ld_fire, ld_step, ld_fail_step;
  logic rung_rst = 1, rung_a_off = 0;
  // Y-Delta.
  logic yd_start = 0;
  yd_in_t yd_op_in = '0, yd_ld_in;
  yd_out_t yd_ld_out, yd_asic_out;
  logic [2:0] yd_marking;
  logic [3:0] yd_fire;
  logic yd_tdelta, yd_busy, yd_done, yd_pass;
  logic [1:0] yd_step, yd_fail_step;
  logic [5:0] yd_dpos, yd_dneg;
  logic ld_rst = 1, f1 = 0, f2 = 0, f3 = 0;
  // Tanks.
  logic tk_m = 0, tk_h1 = 0, tk_b1 = 0, tk_h2 = 0, tk_b2 = 0;
  tank_out_t tk_v;
  logic [5:0] tk_marking;
  logic [4:0] tk_fire;
  // Stamping.
  logic st_start = 0, plc_rst = 1;
  stamp_in_t st_op_in = '0, st_lc_in;
  stamp_out_t st_lc_out, st_model_out;
  logic [5:0] st_marking, st_dpos, st_dneg;
  logic [6:0] st_fire;
  logic [3:0] st_step, st_fail_step;
  fail_type_e st_fail_type;
  logic st_busy, st_done, st_pass;
  logic [7:0] s_off = '0;
  // Combinational circuit.
  logic [4:1] cut_p = '0;
  logic cut_en = 0, cut_val = 0, cut_p7;
  logic [2:0] cut_site = '0;
  logic [7:1] cut_lines;

  bpn_top #(.CLK_HZ(CLK_HZ), .DELAY_S(DELAY_S), .LD_SETTLE(SETTLE), .YD_SETTLE(SETTLE), .ST_SETTLE(SETTLE)) dut (
    .clk(clk), .rst(rst),
    .ld_start_i(ld_start), .ld_a_i(ld_a), .ld_b_i(ld_b), .ld_rung_a_o(ld_rung_a), .ld_rung_b_o(ld_rung_b),
    .ld_rung_c_i(ld_rung_c), .ld_c_o(ld_c), .ld_marking_o(ld_marking), .ld_fire_o(ld_fire),
    .ld_step_o(ld_step), .ld_busy_o(ld_busy), .ld_done_o(ld_done), .ld_pass_o(ld_pass),
    .ld_fail_step_o(ld_fail_step), .ld_dov_pos_o(ld_dpos), .ld_dov_neg_o(ld_dneg),
    .yd_start_i(yd_start), .yd_op_in_i(yd_op_in), .yd_ld_in_o(yd_ld_in), .yd_ld_out_i(yd_ld_out),
    .yd_asic_out_o(yd_asic_out), .yd_marking_o(yd_marking), .yd_fire_o(yd_fire), .yd_tdelta_o(yd_tdelta),
    .yd_step_o(yd_step), .yd_busy_o(yd_busy), .yd_done_o(yd_done), .yd_pass_o(yd_pass),
    .yd_fail_step_o(yd_fail_step), .yd_dov_pos_o(yd_dpos), .yd_dov_neg_o(yd_dneg),
    .tk_m_i(tk_m), .tk_h1_i(tk_h1), .tk_b1_i(tk_b1), .tk_h2_i(tk_h2), .tk_b2_i(tk_b2),
    .tk_valves_o(tk_v), .tk_marking_o(tk_marking), .tk_fire_o(tk_fire),
    .st_start_i(st_start), .st_op_in_i(st_op_in), .st_lc_in_o(st_lc_in), .st_lc_out_i(st_lc_out),
    .st_model_out_o(st_model_out), .st_marking_o(st_marking), .st_fire_o(st_fire), .st_step_o(st_step),
    .st_busy_o(st_busy), .st_done_o(st_done), .st_pass_o(st_pass), .st_fail_step_o(st_fail_step),
    .st_fail_type_o(st_fail_type),
    .st_dov_pos_o(st_dpos), .st_dov_neg_o(st_dneg),
    .cut_p_i(cut_p), .cut_fault_en_i(cut_en), .cut_fault_site_i(cut_site), .cut_fault_val_i(cut_val),
    .cut_p7_o(cut_p7), .cut_lines_o(cut_lines));

  ld_rung_model rung (
    .clk(clk), .rst(rung_rst), .a_i(ld_rung_a), .b_i(ld_rung_b), .a_on(1'b0), .a_off(rung_a_off),
    .b_shut(1'b0), .b_open(1'b0), .c_on(1'b0), .c_off(1'b0), .h_off(1'b0), .c_o(ld_rung_c));

  yd_ladder_model #(.PRESET(PRESET)) ladder (
    .clk(clk), .rst(ld_rst), .in_i(yd_ld_in), .f1(f1), .f2(f2), .f3(f3), .pb1_on(1'b0), .pb2_on(1'b0),
    .out_o(yd_ld_out));

  stamping_plc_model plc (.clk(clk), .rst(plc_rst), .in_i(st_lc_in), .stuck_on(8'h00), .stuck_off(s_off),
                          .out_o(st_lc_out));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  // Stamping inputs as cell levels, {m1, m2, a0, a1, b0, b1, c0, c1}.
  task automatic st_apply(input logic [7:0] v);
    st_op_in = stamp_in_t'(v); tick(2);
  endtask

  // Count transitions of the Y-Delta model as they fire.
  always @(posedge clk) if (!rst) begin
    if (yd_fire[0]) n_yd_start++;
    if (yd_fire[1]) n_yd_timer++;
    if ((yd_fire[2] || yd_fire[3]) && yd_ld_in.ol) n_yd_stop_ol++;
    else if (yd_fire[2] || yd_fire[3]) n_yd_stop_pb2++;
    if (st_fire[6]) n_st_safety++;
    if (st_fire[5]) n_st_cycle++;
  end

  task automatic run_tests(input bit ld_fault, input bit yd_fault, input bit st_fault);
    rung_a_off = ld_fault;                              // start contact A open
    f2 = yd_fault; s_off = st_fault ? 8'h10 : 8'h00;   // D path open / a1 dead
    rung_rst = 1; ld_rst = 1; plc_rst = 1; tick(); rung_rst = 0; ld_rst = 0; plc_rst = 0;
    ld_start = 1; yd_start = 1; st_start = 1; tick(); ld_start = 0; yd_start = 0; st_start = 0;
    while (!(ld_done && yd_done && st_done)) tick();
    if (ld_pass) n_ld_pass++; else n_ld_fail++;
    check(ld_pass == !ld_fault, "rung test verdict");
    check(ld_fault ? ld_fail_step == 2'd1 : 1'b1, "rung failing event is A");
    if (yd_pass) n_yd_pass++; else n_yd_fail++;
    if (st_pass) n_st_pass++; else n_st_fail++;
    check(yd_pass == !yd_fault, "Y-Delta test verdict");
    check(yd_fault ? yd_fail_step == 2'd2 : 1'b1, "Y-Delta failing event is T_delta");
    check(st_pass == !st_fault, "stamping test verdict");
    check(st_fault ? st_fail_step == 4'd2 : 1'b1, "stamping failing event is a1");
    check(st_fail_type == (st_fault ? FT_STUCK_OFF : FT_NONE), "stamping troubleshooting class");
    rung_a_off = 0; f2 = 0; s_off = '0;
  endtask

  initial begin
    {n_self_hold, n_rung_reset, n_yd_start, n_yd_timer, n_yd_stop_pb2, n_yd_stop_ol, n_mode_op,
     n_yd_pass, n_yd_fail, n_tank_fill, n_tank_sync, n_st_join_wait, n_st_cycle, n_st_safety,
     n_st_pass, n_st_fail, n_cut_detect, n_ld_pass, n_ld_fail} = '0;
    st_op_in = stamp_in_t'(8'b0010_1010);
    tick(2); rst = 0; rung_rst = 0; ld_rst = 0; plc_rst = 0; tick();

    // Basic rung: start, self hold, stop.
    ld_a = 1; tick(); ld_a = 0; tick(3);
    check(ld_c && ld_rung_c, "rung holds C");
    if (ld_c) n_self_hold++;
    ld_b = 1; tick(); ld_b = 0;
    check(!ld_c && !ld_rung_c, "rung releases C");
    if (!ld_c) n_rung_reset++;

    // Tanks: concurrent filling and the synchronised restart.
    tk_m = 1; tick(); tk_m = 0;
    check(tk_v == 4'b1100, "both tanks filling");
    if (tk_v == 4'b1100) n_tank_fill++;
    tk_h1 = 1; tick(); tk_h1 = 0; tk_b1 = 1; tick(); tk_b1 = 0;
    tk_m = 1; tick(); tk_m = 0;
    check(tk_v == 4'b0100, "restart waits for tank 2");
    if (tk_v == 4'b0100) n_tank_sync++;
    tk_h2 = 1; tick(); tk_h2 = 0; tk_b2 = 1; tick(); tk_b2 = 0;
    check(tk_v == 4'b0000 && tk_marking == 6'b001001, "both tanks empty");

    // Combinational circuit: p6 stuck-at-0 seen with p3 p4 = 11, p1 p2 = 00.
    cut_p = 4'b1100; #1;
    check(cut_p7, "fault-free p7");
    cut_en = 1; cut_site = 3'd6; cut_val = 0; #1;
    check(!cut_p7, "p6 stuck-at-0 visible at p7");
    if (!cut_p7) n_cut_detect++;
    cut_en = 0;

    // Y-Delta in operation: the model runs the motor next to the ladder.
    yd_op_in = '{pb1: 1'b1, pb2: 1'b0, ol: 1'b0}; tick(); yd_op_in = '0; tick();
    check(yd_asic_out.y && yd_ld_out.y, "star start");
    if (yd_asic_out.y && !yd_busy) n_mode_op++;
    tick(PRESET + 2);
    check(yd_asic_out.d && yd_ld_out.d, "delta run after T_delta");
    yd_op_in.pb2 = 1; tick(); yd_op_in = '0; tick();
    check(yd_asic_out.pl1 && yd_ld_out.pl1, "stopped by Pb2");
    yd_op_in.pb1 = 1; tick(); yd_op_in = '0; tick(3);
    yd_op_in.ol = 1; tick(); yd_op_in = '0; tick();
    check(yd_asic_out.pl1 && yd_ld_out.pl1, "stopped by overload");

    // Stamping in operation: one work cycle, then the safety stop.
    st_apply(8'b1010_1010);  // m1
    st_apply(8'b0001_1010);  // a1
    st_apply(8'b0001_0110);  // b1
    st_apply(8'b0010_0110);  // a0 only: stays in (A-, B-)
    check(st_model_out.a_minus, "join waits for b0");
    if (st_model_out.a_minus) n_st_join_wait++;
    st_apply(8'b0010_1010);  // a0 b0
    st_apply(8'b0010_1001);  // c1
    st_apply(8'b0010_1010);  // c0: back to A+
    check(st_model_out.a_plus && st_lc_out.a_plus, "next work cycle");
    st_apply(8'b0110_1010);  // m2
    check(st_marking == 6'b000001 && st_model_out == '0, "safety stop");
    st_apply(8'b0010_1010);

    // Functional tests: both pass, then both catch an injected fault.
    run_tests(0, 0, 0);
    run_tests(1, 1, 1);

    check(n_self_hold > 0, "mechanism: rung self hold");
    check(n_rung_reset > 0, "mechanism: rung reset");
    check(n_ld_pass > 0 && n_ld_fail > 0, "mechanism: rung test pass and fail");
    check(n_yd_start > 0, "mechanism: Y-Delta start");
    check(n_yd_timer > 0, "mechanism: T_delta star-to-delta");
    check(n_yd_stop_pb2 > 0, "mechanism: stop by Pb2");
    check(n_yd_stop_ol > 0, "mechanism: stop by overload");
    check(n_mode_op > 0, "mechanism: operation mode");
    check(n_yd_pass > 0 && n_yd_fail > 0, "mechanism: Y-Delta test pass and fail");
    check(n_tank_fill > 0, "mechanism: concurrent filling");
    check(n_tank_sync > 0, "mechanism: synchronised restart");
    check(n_st_join_wait > 0, "mechanism: a0 b0 join");
    check(n_st_cycle > 0, "mechanism: stamping cycle return");
    check(n_st_safety > 0, "mechanism: m2 safety stop");
    check(n_st_pass > 0 && n_st_fail > 0, "mechanism: stamping test pass and fail");
    check(n_cut_detect > 0, "mechanism: stuck-at detection");
    $display("mechanisms: hold=%0d reset=%0d ld_pass=%0d ld_fail=%0d yd_start=%0d yd_timer=%0d stop_pb2=%0d stop_ol=%0d op=%0d yd_pass=%0d yd_fail=%0d tank_fill=%0d tank_sync=%0d join_wait=%0d st_cycle=%0d st_safety=%0d st_pass=%0d st_fail=%0d cut=%0d",
             n_self_hold, n_rung_reset, n_ld_pass, n_ld_fail, n_yd_start, n_yd_timer, n_yd_stop_pb2, n_yd_stop_ol, n_mode_op,
             n_yd_pass, n_yd_fail, n_tank_fill, n_tank_sync, n_st_join_wait, n_st_cycle, n_st_safety,
             n_st_pass, n_st_fail, n_cut_detect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
