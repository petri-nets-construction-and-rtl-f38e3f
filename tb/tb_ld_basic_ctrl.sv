// tb_ld_basic_ctrl: the self-holding rung C = (A + C) not B.
//
// Runs the three test events of the rung (no event, A pressed, B pressed)
// with their expected coil values, then random button activity against a
// reference written from the rung equation, one evaluation per clock.
module tb_ld_basic_ctrl;
  logic clk = 0, rst = 1, a = 0, b = 0, c;
  logic [1:0] m, fire;
  int checks = 0, failures = 0;

  ld_basic_ctrl dut (.clk(clk), .rst(rst), .a_i(a), .b_i(b), .c_o(c), .marking_o(m), .fire_o(fire));

  always #5 clk = ~clk;

  task automatic expect_c(input logic exp, input string what);
    checks++;
    if (c !== exp || m !== (exp ? 2'b10 : 2'b01)) begin
      failures++; $display("FAIL %s: c=%b marking=%b", what, c, m);
    end
  endtask

  task automatic apply(input logic av, input logic bv);
    a = av; b = bv; @(posedge clk); #1;
  endtask

  initial begin
    logic c_ref;
    repeat (2) @(posedge clk);
    rst = 0; #1;
    apply(0, 0); expect_c(0, "no event");
    apply(1, 0); expect_c(1, "A event");
    apply(0, 0); expect_c(1, "self hold");
    apply(0, 1); expect_c(0, "B event");
    apply(0, 0); expect_c(0, "stays off");
    // Random: one step of the rung per clock against its equation
    // C = (A + C) not B; with both buttons pressed the stop wins.
    c_ref = 0;
    for (int n = 0; n < 1000; n++) begin
      logic av, bv;
      av = 1'($urandom); bv = 1'($urandom);
      c_ref = (av | c_ref) & !bv;
      apply(av, bv);
      expect_c(c_ref, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
