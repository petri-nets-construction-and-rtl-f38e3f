// tb_yd_starter_ctrl: the Y-Delta starter model.
//
// Checks the reachability sequence idle -> star -> delta -> idle with the
// outputs of each state (PL1 | X,Y,PL2 | X,D,PL3), the star-to-delta delay
// in clocks (PRESET + 1 after the star state is entered), stop by Pb2 and
// by overload from both star and delta, and random button activity against
// a reference state machine with its own timer.
module tb_yd_starter_ctrl;
  import bpn_pkg::*;
  localparam int unsigned CLK_HZ = 8, DELAY_S = 2, PRESET = CLK_HZ * DELAY_S;

  logic clk = 0, rst = 1;
  yd_in_t in = '0;
  yd_out_t out;
  logic tdelta;
  logic [2:0] m;
  logic [3:0] fire;
  int checks = 0, failures = 0;

  yd_starter_ctrl #(.CLK_HZ(CLK_HZ), .DELAY_S(DELAY_S)) dut (
    .clk(clk), .rst(rst), .in_i(in), .out_o(out), .tdelta_o(tdelta), .marking_o(m), .fire_o(fire));

  always #5 clk = ~clk;

  // Expected outputs per state, {pl1, pl2, pl3, x, y, d}.
  localparam yd_out_t IDLE = 6'b100000, STAR = 6'b010110, DELTA = 6'b001101;

  task automatic expect_out(input yd_out_t exp, input string what);
    checks++;
    if (out !== exp) begin failures++; $display("FAIL %s: out=%b expected %b", what, out, exp); end
  endtask

  task automatic apply(input logic pb1, input logic pb2, input logic ol);
    in = '{pb1: pb1, pb2: pb2, ol: ol}; @(posedge clk); #1;
  endtask

  initial begin
    int n;
    int st, cnt;
    repeat (2) @(posedge clk);
    rst = 0; #1;
    expect_out(IDLE, "initial");
    apply(0, 0, 0); expect_out(IDLE, "no event");
    apply(1, 0, 0); expect_out(STAR, "Pb1 -> star");
    in = '0; n = 0;
    do begin @(posedge clk); #1; n++; end while (out != DELTA && n < 1000);
    checks++;
    if (n != PRESET + 1) begin failures++; $display("FAIL star time %0d clocks, expected %0d", n, PRESET + 1); end
    expect_out(DELTA, "T_delta -> delta");
    repeat (5) apply(0, 0, 0);
    expect_out(DELTA, "delta holds");
    apply(0, 1, 0); expect_out(IDLE, "Pb2 from delta");
    apply(1, 0, 0); expect_out(STAR, "start again");
    apply(0, 0, 1); expect_out(IDLE, "overload from star");
    apply(1, 0, 0);
    repeat (PRESET + 2) apply(0, 0, 0);
    expect_out(DELTA, "delta again");
    apply(0, 0, 1); expect_out(IDLE, "overload from delta");
    apply(1, 0, 0); apply(0, 1, 0); expect_out(IDLE, "Pb2 from star");
    // Random against a reference: st 0 idle, 1 star, 2 delta.
    st = 0; cnt = 0;
    for (int k = 0; k < 3000; k++) begin
      logic pb1, pb2, ol, done_ref;
      pb1 = ($urandom % 16) == 0; pb2 = ($urandom % 40) == 0; ol = ($urandom % 60) == 0;
      done_ref = (cnt > PRESET);
      case (st)
        0: if (pb1) st = 1;
        1: if (pb2 || ol) st = 0; else if (done_ref) st = 2;
        2: if (pb2 || ol) st = 0;
        default: ;
      endcase
      apply(pb1, pb2, ol);
      cnt = (st != 0) ? cnt + 1 : 0;
      expect_out(st == 0 ? IDLE : st == 1 ? STAR : DELTA, "random");
      checks++;
      if (out.y && out.d) begin failures++; $display("FAIL Y and D together"); end
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
