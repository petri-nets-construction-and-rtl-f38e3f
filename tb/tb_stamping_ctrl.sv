// tb_stamping_ctrl: the stamping cell net.
//
// Runs the work cycle A+, B+, (A-, B-), C+, C- and back to A+ with the
// valve outputs of every place; checks that the join t4 needs a0 and b0
// together; checks the safety stop m2 from every working place and its
// priority over a simultaneous event; then random sensor activity against
// a reference step counter.
module tb_stamping_ctrl;
  import bpn_pkg::*;
  logic clk = 0, rst = 1;
  stamp_in_t in = '0;
  stamp_out_t v;
  logic [5:0] mk;
  logic [6:0] fire;
  int checks = 0, failures = 0;

  stamping_ctrl dut (.clk(clk), .rst(rst), .in_i(in), .valves_o(v), .marking_o(mk), .fire_o(fire));

  always #5 clk = ~clk;

  // Valves {A+, A-, B+, B-, C+, C-} for places p1..p6.
  function automatic stamp_out_t valves_of(input int p);
    case (p)
      2: return 6'b100000;
      3: return 6'b001000;
      4: return 6'b010100;
      5: return 6'b000010;
      6: return 6'b000001;
      default: return 6'b000000;
    endcase
  endfunction

  task automatic expect_p(input int p, input string what);
    checks++;
    if (v !== valves_of(p) || mk !== 6'(1 << (p - 1))) begin
      failures++; $display("FAIL %s: valves=%b marking=%b expected place p%0d", what, v, mk, p);
    end
  endtask

  // {m1, m2, a0, a1, b0, b1, c0, c1}
  task automatic apply(input logic [7:0] e);
    in = stamp_in_t'(e); @(posedge clk); #1; in = '0;
  endtask

  initial begin
    int p;
    repeat (2) @(posedge clk);
    rst = 0; #1;
    expect_p(1, "initial");
    apply(8'b0000_0000); expect_p(1, "no event");
    apply(8'b1000_0000); expect_p(2, "m1");
    apply(8'b0001_0000); expect_p(3, "a1");
    apply(8'b0000_0100); expect_p(4, "b1");
    apply(8'b0010_0000); expect_p(4, "a0 alone");
    apply(8'b0000_1000); expect_p(4, "b0 alone");
    apply(8'b0010_1000); expect_p(5, "a0 and b0");
    apply(8'b0000_0001); expect_p(6, "c1");
    apply(8'b0000_0010); expect_p(2, "c0 back to A+");
    for (int q = 2; q <= 6; q++) begin
      apply(8'b0100_0000); expect_p(1, "m2 safety stop");
      apply(8'b1000_0000);
      if (q >= 3) apply(8'b0001_0000);
      if (q >= 4) apply(8'b0000_0100);
      if (q >= 5) apply(8'b0010_1000);
      if (q >= 6) apply(8'b0000_0001);
      expect_p(q, "walk to place");
    end
    apply(8'b0100_0010); expect_p(1, "m2 wins over c0");
    // Random with a reference.
    p = 1;
    for (int n = 0; n < 4000; n++) begin
      logic [7:0] e;
      stamp_in_t s;
      e = 8'($urandom) & 8'($urandom);
      s = stamp_in_t'(e);
      if (s.m2 && p != 1) p = 1;
      else case (p)
        1: if (s.m1) p = 2;
        2: if (s.a1) p = 3;
        3: if (s.b1) p = 4;
        4: if (s.a0 && s.b0) p = 5;
        5: if (s.c1) p = 6;
        6: if (s.c0) p = 2;
        default: ;
      endcase
      apply(e);
      expect_p(p, "random");
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
