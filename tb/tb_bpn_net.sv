// tb_bpn_net: self-checking test of the generic Boolean Petri net engine.
//
// The net under test has a fork, a join and an OR transition:
//   t0: OR of {p1, p2, p3} -> p0   (lowest index, wins conflicts)
//   t1: p0 -> {p1, p2}             (fork)
//   t2: p1 -> p3
//   t3: {p2, p3} -> p0             (join)
// A directed part checks hand-worked markings; a random part compares every
// cycle with a reference that applies the state equation M' = M + A^T U on
// integer token counts.
module tb_bpn_net;
  localparam int NP = 4, NT = 4;
  localparam logic [NT-1:0][NP-1:0] PRE  = {4'b1100, 4'b0010, 4'b0001, 4'b1110};
  localparam logic [NT-1:0][NP-1:0] POST = {4'b0001, 4'b1000, 4'b0110, 4'b0001};

  logic clk = 0, rst = 1;
  logic [NT-1:0] ev = '0;
  logic [NP-1:0] m;
  logic [NT-1:0] fire;
  int checks = 0, failures = 0;

  bpn_net #(.NP(NP), .NT(NT), .PRE(PRE), .POST(POST), .OR_IN(4'b0001), .M0(4'b0001))
    dut (.clk(clk), .rst(rst), .ev_i(ev), .marking_o(m), .fire_o(fire));

  always #5 clk = ~clk;

  task automatic check(input logic [NP-1:0] exp_m, input string what);
    checks++;
    if (m !== exp_m) begin
      failures++;
      $display("FAIL %s: marking %b expected %b", what, m, exp_m);
    end
  endtask

  task automatic step(input logic [NT-1:0] e);
    ev = e;
    @(posedge clk); #1;
    ev = '0;
  endtask

  // Reference: token counts as integers, state equation with priority.
  int tok [NP];
  function automatic void ref_step(input logic [NT-1:0] e);
    int avail [NP];
    int delta [NP];
    foreach (tok[i]) begin avail[i] = tok[i]; delta[i] = 0; end
    for (int j = 0; j < NT; j++) begin
      bit en;
      if (j == 0) begin
        en = 0;
        for (int i = 0; i < NP; i++) if (PRE[j][i] && avail[i] > 0) en = 1;
      end else begin
        en = 1;
        for (int i = 0; i < NP; i++) if (PRE[j][i] && avail[i] == 0) en = 0;
      end
      if (en && e[j]) begin
        for (int i = 0; i < NP; i++) begin
          if (PRE[j][i] && avail[i] > 0) begin delta[i] -= 1; avail[i] = 0; end
          if (POST[j][i]) delta[i] += 1;
        end
      end
    end
    foreach (tok[i]) tok[i] += delta[i];
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst = 0; #1;
    check(4'b0001, "initial marking");
    step(4'b0010); check(4'b0110, "fork t1");
    step(4'b1000); check(4'b0110, "join t3 not enabled");
    step(4'b0100); check(4'b1100, "t2");
    step(4'b1000); check(4'b0001, "join t3");
    step(4'b0010); check(4'b0110, "fork again");
    ev = 4'b0101; #1;
    checks++;
    if (fire !== 4'b0001) begin failures++; $display("FAIL priority: fire %b", fire); end
    @(posedge clk); #1; ev = '0;
    check(4'b0001, "OR transition wins over t2");
    rst = 1; @(posedge clk); #1; rst = 0;
    check(4'b0001, "reset");

    // Random events against the reference.
    foreach (tok[i]) tok[i] = (i == 0) ? 1 : 0;
    for (int n = 0; n < 2000; n++) begin
      logic [NT-1:0] e;
      logic [NP-1:0] exp_m;
      e = NT'($urandom);
      ref_step(e);
      step(e);
      foreach (tok[i]) exp_m[i] = (tok[i] != 0);
      check(exp_m, "random");
      foreach (tok[i]) if (tok[i] > 1) begin
        failures++; $display("FAIL reference net not safe");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
