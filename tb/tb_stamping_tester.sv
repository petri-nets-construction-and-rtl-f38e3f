// tb_stamping_tester: functional test of the stamping cell's local
// controller against the abstract Petri-net model.
//
// The tester drives a behavioural PLC model. A fault-free PLC passes; a
// switch stuck on fails at "no event" (m1) or later where it first changes
// the response; a switch stuck off fails at the event that needs it; a dead
// m2 fails at the last, safety-stop step, and each verdict carries the
// matching troubleshooting class. The test length is checked, and
// normal operation (mode switch) is compared with the PLC.
module tb_stamping_tester;
  import bpn_pkg::*;
  localparam int unsigned SETTLE = 5;

  logic clk = 0, rst = 1, start = 0, plc_rst = 1;
  stamp_in_t op_in = '0, lc_in;
  stamp_out_t lc_out, model_out;
  logic [5:0] marking, dpos, dneg;
  logic [6:0] fire;
  logic [3:0] step, fail_step;
  fail_type_e fail_type;
  logic busy, done, pass;
  logic [7:0] s_on = '0, s_off = '0;
  int checks = 0, failures = 0;

  stamping_tester #(.SETTLE(SETTLE)) dut (
    .clk(clk), .rst(rst), .start_i(start), .op_in_i(op_in), .lc_in_o(lc_in), .lc_out_i(lc_out),
    .model_out_o(model_out), .model_marking_o(marking), .step_o(step), .fire_o(fire), .busy_o(busy),
    .done_o(done), .pass_o(pass), .fail_step_o(fail_step), .fail_type_o(fail_type), .dov_pos_o(dpos), .dov_neg_o(dneg));

  stamping_plc_model plc (.clk(clk), .rst(plc_rst), .in_i(lc_in), .stuck_on(s_on), .stuck_off(s_off),
                          .out_o(lc_out));

  always #5 clk = ~clk;

  task automatic run_test(input logic [7:0] on_m, input logic [7:0] off_m, input int exp_step,
                          input string what);
    int n;
    s_on = on_m; s_off = off_m;
    plc_rst = 1; @(negedge clk); plc_rst = 0;
    start = 1; @(negedge clk); start = 0;
    n = 1;
    while (!done && n < 10000) begin @(negedge clk); n++; end
    checks++;
    if (n != 1 + 9 * SETTLE + 1) begin failures++; $display("FAIL %s: test took %0d clocks", what, n); end
    checks++;
    if (exp_step < 0) begin
      if (!pass) begin failures++; $display("FAIL %s: failed at step %0d", what, fail_step); end
    end else if (pass || fail_step != 4'(exp_step)) begin
      failures++; $display("FAIL %s: pass=%b step=%0d, expected failure at %0d", what, pass, fail_step, exp_step);
    end
    // Troubleshooting class: none, stuck on (step 0), safety (step 8), else stuck off.
    checks++;
    if (fail_type != (exp_step < 0 ? FT_NONE : exp_step == 0 ? FT_STUCK_ON :
                      exp_step == 8 ? FT_SAFETY : FT_STUCK_OFF)) begin
      failures++; $display("FAIL %s: troubleshooting class %s", what, fail_type.name());
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    // Bit order {m1, m2, a0, a1, b0, b1, c0, c1}.
    run_test(8'h00, 8'h00, -1, "fault-free PLC");
    run_test(8'h80, 8'h00, 0, "m1 stuck on");
    run_test(8'h00, 8'h80, 1, "m1 stuck off");
    run_test(8'h00, 8'h10, 2, "a1 stuck off");
    run_test(8'h00, 8'h04, 3, "b1 stuck off");
    run_test(8'h00, 8'h08, 5, "b0 stuck off");
    run_test(8'h00, 8'h01, 6, "c1 stuck off");
    run_test(8'h00, 8'h02, 7, "c0 stuck off");
    run_test(8'h00, 8'h40, 8, "m2 stuck off");
    run_test(8'h10, 8'h00, 1, "a1 stuck on");
    run_test(8'h00, 8'h00, -1, "fault-free again");
    // Mode switch: outside a test the model runs from op_in like the PLC.
    s_on = '0; s_off = '0;
    rst = 1; plc_rst = 1; @(negedge clk); rst = 0; plc_rst = 0;
    for (int n = 0; n < 2000; n++) begin
      op_in = stamp_in_t'(8'($urandom) & 8'($urandom) & 8'($urandom));
      @(negedge clk);
      checks++;
      if (lc_in !== op_in || model_out !== lc_out) begin
        failures++; $display("FAIL operation mode: model %b PLC %b", model_out, lc_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
