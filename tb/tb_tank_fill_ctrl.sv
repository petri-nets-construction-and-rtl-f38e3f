// tb_tank_fill_ctrl: the two-tank filling net.
//
// Directed: m opens V1 and V2 together; each tank then runs on its own
// (h closes V and opens W, b closes W); a new m is ignored until both tanks
// are empty again (the synchronising start transition). Random: sensor
// activity against a reference of two three-step cycles joined at the start.
module tb_tank_fill_ctrl;
  import bpn_pkg::*;
  logic clk = 0, rst = 1;
  logic m = 0, h1 = 0, b1 = 0, h2 = 0, b2 = 0;
  tank_out_t v;
  logic [5:0] mk;
  logic [4:0] fire;
  int checks = 0, failures = 0;

  tank_fill_ctrl dut (.clk(clk), .rst(rst), .m_i(m), .h1_i(h1), .b1_i(b1), .h2_i(h2), .b2_i(b2),
                      .valves_o(v), .marking_o(mk), .fire_o(fire));

  always #5 clk = ~clk;

  // {v1, v2, w1, w2}
  task automatic expect_v(input logic [3:0] exp, input string what);
    checks++;
    if (v !== exp) begin failures++; $display("FAIL %s: valves=%b expected %b", what, v, exp); end
  endtask

  task automatic apply(input logic [4:0] e);  // {m, h1, b1, h2, b2}
    {m, h1, b1, h2, b2} = e; @(posedge clk); #1; {m, h1, b1, h2, b2} = '0;
  endtask

  initial begin
    int s1, s2;  // 0 empty, 1 filling, 2 emptying
    repeat (2) @(posedge clk);
    rst = 0; #1;
    checks++;
    if (mk !== 6'b001001) begin failures++; $display("FAIL initial marking %b", mk); end
    expect_v(4'b0000, "initial");
    apply(5'b10000); expect_v(4'b1100, "m: V1 V2 open");
    apply(5'b01000); expect_v(4'b0110, "h1: W1 open, V2 still open");
    apply(5'b00100); expect_v(4'b0100, "b1: tank 1 empty");
    apply(5'b10000); expect_v(4'b0100, "m ignored while tank 2 busy");
    apply(5'b00010); expect_v(4'b0001, "h2: W2 open");
    apply(5'b00001); expect_v(4'b0000, "b2: both empty");
    apply(5'b10000); expect_v(4'b1100, "m restarts");
    rst = 1; @(posedge clk); #1; rst = 0;
    s1 = 0; s2 = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [4:0] e;
      e = 5'($urandom) & 5'($urandom);
      if (e[4] && s1 == 0 && s2 == 0) begin s1 = 1; s2 = 1; end
      else begin
        if (e[3] && s1 == 1) s1 = 2; else if (e[2] && s1 == 2) s1 = 0;
        if (e[1] && s2 == 1) s2 = 2; else if (e[0] && s2 == 2) s2 = 0;
      end
      apply(e);
      expect_v({s1 == 1, s2 == 1, s1 == 2, s2 == 2}, "random");
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
