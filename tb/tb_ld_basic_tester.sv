// tb_ld_basic_tester: functional test of the basic self-holding rung.
//
// The tester is connected to a behavioural rung with injectable faults. A
// fault-free rung must pass; each stuck-at fault must fail at the step the
// troubleshooting list assigns to it (A stuck closed or coil stuck on: "no
// event", step 0; A, the stop contact or the coil stuck open: "A event",
// step 1; stop contact never opening: "B event", step 2), with the DOV of the
// last strobe as worked out by hand. A holding contact stuck open is not
// visible to this three-step test (A is held for the whole step), and the
// testbench checks that it passes. Also checked: the test length in clocks,
// and normal operation outside a test (the mode switch), against a reference
// rung computed here.
module tb_ld_basic_tester;
  localparam int unsigned SETTLE = 5;

  logic clk = 0, rst = 1, start = 0;
  logic op_a = 0, op_b = 0, ld_a, ld_b, ld_c, c, busy, done, pass, dpos, dneg;
  logic [1:0] marking, fire, step, fail_step;
  logic a_on = 0, a_off = 0, b_shut = 0, b_open = 0, c_on = 0, c_off = 0, h_off = 0, rung_rst = 1;
  logic c_ref;
  int checks = 0, failures = 0;

  ld_basic_tester #(.SETTLE(SETTLE)) dut (
    .clk(clk), .rst(rst), .start_i(start), .op_a_i(op_a), .op_b_i(op_b), .ld_a_o(ld_a), .ld_b_o(ld_b),
    .ld_c_i(ld_c), .c_o(c), .marking_o(marking), .fire_o(fire), .step_o(step), .busy_o(busy),
    .done_o(done), .pass_o(pass), .fail_step_o(fail_step), .dov_pos_o(dpos), .dov_neg_o(dneg));

  ld_rung_model rung (
    .clk(clk), .rst(rung_rst), .a_i(ld_a), .b_i(ld_b), .a_on(a_on), .a_off(a_off), .b_shut(b_shut),
    .b_open(b_open), .c_on(c_on), .c_off(c_off), .h_off(h_off), .c_o(ld_c));

  always #5 clk = ~clk;

  // Reference rung for operation mode.
  always_ff @(posedge clk) c_ref <= rst ? 1'b0 : (op_a | c_ref) & ~op_b;

  // exp_step < 0: the rung must pass.
  task automatic run_test(input int exp_step, input logic exp_pos, input logic exp_neg, input string what);
    int n;
    rung_rst = 1; @(negedge clk); rung_rst = 0;
    start = 1; @(negedge clk); start = 0;
    n = 1;
    while (!done && n < 1000) begin @(negedge clk); n++; end
    checks++;
    if (n != 1 + 3 * SETTLE + 1) begin failures++; $display("FAIL %s: test took %0d clocks", what, n); end
    checks++;
    if (exp_step < 0) begin
      if (!pass) begin failures++; $display("FAIL %s: failed at step %0d", what, fail_step); end
    end else if (pass || fail_step != 2'(exp_step)) begin
      failures++; $display("FAIL %s: pass=%b step=%0d, expected failure at %0d", what, pass, fail_step, exp_step);
    end
    // DOV of the last strobe (B event: the coil must be off).
    checks++;
    if (dpos !== exp_pos || dneg !== exp_neg) begin
      failures++; $display("FAIL %s: final DOV +%b -%b", what, dpos, dneg);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    run_test(-1, 0, 0, "fault-free rung");
    a_on = 1;   run_test(0, 0, 0, "A stuck closed");     a_on = 0;
    c_on = 1;   run_test(0, 0, 1, "coil stuck on");      c_on = 0;
    a_off = 1;  run_test(1, 0, 0, "A stuck open");       a_off = 0;
    b_open = 1; run_test(1, 0, 0, "stop contact open");  b_open = 0;
    c_off = 1;  run_test(1, 0, 0, "coil stuck off");     c_off = 0;
    b_shut = 1; run_test(2, 0, 1, "stop never opens");   b_shut = 0;
    h_off = 1;  run_test(-1, 0, 0, "holding contact open (not covered)"); h_off = 0;
    run_test(-1, 0, 0, "fault-free again");
    // Mode switch: outside a test the net follows the buttons like the rung.
    rung_rst = 1; rst = 1; @(negedge clk); rst = 0; rung_rst = 0;
    for (int n = 0; n < 500; n++) begin
      op_a = ($urandom % 8) == 0;
      op_b = ($urandom % 12) == 0;
      @(negedge clk);
      checks++;
      if (ld_a !== op_a || ld_b !== op_b || c !== c_ref || ld_c !== c_ref) begin
        failures++; $display("FAIL operation mode: a=%b b=%b c=%b rung=%b ref=%b", ld_a, ld_b, c, ld_c, c_ref);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
