// tb_yd_starter_tester: functional test of a Y-Delta ladder.
//
// The tester is connected to a behavioural ladder model. A fault-free
// ladder must pass; each injected fault must fail at the event the
// troubleshooting table assigns to it (Pb1 stuck on: no-event step 0; Pb1
// stuck open: step 1; D path or PL3 lamp stuck open: step 2; stop contact
// never opening: step 3), with the expected DOV signs. The test length in
// clocks is checked, and normal operation outside a test (the mode switch)
// is checked against the ladder.
module tb_yd_starter_tester;
  import bpn_pkg::*;
  localparam int unsigned CLK_HZ = 20, DELAY_S = 1, SETTLE = 6;
  localparam int unsigned PRESET = CLK_HZ * DELAY_S;

  logic clk = 0, rst = 1, start = 0;
  yd_in_t op_in = '0, ld_in;
  yd_out_t ld_out, asic_out;
  logic tdelta, busy, done, pass;
  logic [2:0] marking;
  logic [1:0] step, fail_step;
  logic [3:0] fire;
  logic [5:0] dpos, dneg;
  logic f1 = 0, f2 = 0, f3 = 0, pb1_on = 0, pb2_on = 0, ld_rst = 1;
  int checks = 0, failures = 0;

  yd_starter_tester #(.CLK_HZ(CLK_HZ), .DELAY_S(DELAY_S), .SETTLE(SETTLE)) dut (
    .clk(clk), .rst(rst), .start_i(start), .op_in_i(op_in), .ld_in_o(ld_in), .ld_out_i(ld_out),
    .asic_out_o(asic_out), .tdelta_o(tdelta), .asic_marking_o(marking), .step_o(step), .fire_o(fire),
    .busy_o(busy), .done_o(done), .pass_o(pass), .fail_step_o(fail_step), .dov_pos_o(dpos), .dov_neg_o(dneg));

  yd_ladder_model #(.PRESET(PRESET)) ladder (
    .clk(clk), .rst(ld_rst), .in_i(ld_in), .f1(f1), .f2(f2), .f3(f3), .pb1_on(pb1_on), .pb2_on(pb2_on),
    .out_o(ld_out));

  always #5 clk = ~clk;

  // exp_step < 0: the ladder must pass.
  task automatic run_test(input int exp_step, input logic [5:0] exp_pos, input logic [5:0] exp_neg,
                          input string what);
    int n;
    ld_rst = 1; @(negedge clk); ld_rst = 0;
    start = 1; @(negedge clk); start = 0;
    n = 1;
    while (!done && n < 10000) begin @(negedge clk); n++; end
    checks++;
    if (n != 1 + 4 * SETTLE + PRESET + 1) begin failures++; $display("FAIL %s: test took %0d clocks", what, n); end
    checks++;
    if (exp_step < 0) begin
      if (!pass) begin failures++; $display("FAIL %s: failed at step %0d", what, fail_step); end
    end else begin
      if (pass || fail_step != 2'(exp_step)) begin
        failures++; $display("FAIL %s: pass=%b step=%0d, expected failure at %0d", what, pass, fail_step, exp_step);
      end
    end
    // DOV of the last strobe (step 3, back to idle).
    checks++;
    if (dpos !== exp_pos || dneg !== exp_neg) begin
      failures++; $display("FAIL %s: final DOV +%b -%b", what, dpos, dneg);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    run_test(-1, 6'b0, 6'b0, "fault-free ladder");
    pb1_on = 1;
    // Pb1 stuck on: caught by "no event"; at the last strobe Pb2 is still
    // pressed, so both sides are idle there.
    run_test(0, 6'b0, 6'b0, "Pb1 stuck on");
    pb1_on = 0; f1 = 1;
    run_test(1, 6'b0, 6'b0, "f1 Pb1 stuck open");
    f1 = 0; f2 = 1;
    run_test(2, 6'b0, 6'b0, "f2 D path stuck open");
    f2 = 0; f3 = 1;
    run_test(2, 6'b0, 6'b0, "f3 PL3 contact stuck open");
    f3 = 0; pb2_on = 1;
    run_test(3, 6'b100000, 6'b001101, "stop contact never opens");
    pb2_on = 0;
    run_test(-1, 6'b0, 6'b0, "fault-free again");
    // Mode switch: outside a test the model follows op_in like the ladder.
    ld_rst = 1; rst = 1; @(negedge clk); rst = 0; ld_rst = 0;
    for (int n = 0; n < 600; n++) begin
      op_in = '{pb1: ($urandom % 10) == 0, pb2: ($urandom % 50) == 0, ol: 1'b0};
      @(negedge clk);
      checks++;
      if (ld_in !== op_in) begin failures++; $display("FAIL operation mode inputs"); end
      if (asic_out.d) begin
        checks++;
        if (!ld_out.d) begin failures++; $display("FAIL operation mode: model in delta, ladder not"); end
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
