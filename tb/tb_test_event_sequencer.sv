// tb_test_event_sequencer: step timing, applied vectors and fail capture.
//
// Four steps with different hold times. For each run the testbench records
// the vector on every clock and the strobe positions and compares them with
// the step table; mismatch_i is raised at one chosen step (or none) and the
// reported first failing step is checked. Run length is 1 + sum of holds.
module tb_test_event_sequencer;
  localparam int N = 4, IW = 3;
  localparam logic [N-1:0][IW-1:0] SIN = {3'b101, 3'b010, 3'b100, 3'b001};
  localparam logic [N-1:0][31:0] SWAIT = {32'd2, 32'd7, 32'd1, 32'd3};
  localparam int TOTAL = 2 + 7 + 1 + 3;

  logic clk = 0, rst = 1, start = 0, mismatch = 0;
  logic init, strobe, busy, done, fail;
  logic [IW-1:0] pi;
  logic [1:0] fail_step, step;
  int checks = 0, failures = 0;

  test_event_sequencer #(.N_STEPS(N), .IN_W(IW), .STEP_IN(SIN), .STEP_WAIT(SWAIT)) dut (
    .clk(clk), .rst(rst), .start_i(start), .mismatch_i(mismatch), .init_o(init), .pi_o(pi),
    .strobe_o(strobe), .busy_o(busy), .done_o(done), .fail_o(fail), .fail_step_o(fail_step), .step_o(step));

  always #5 clk = ~clk;

  task automatic run(input int bad_step);  // -1: no fault
    int cyc, k, in_step, strobes;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    checks++;
    if (!init || !busy) begin failures++; $display("FAIL init pulse"); end
    @(negedge clk);
    k = 0; in_step = 0; cyc = 1; strobes = 0;
    while (busy && cyc < 100) begin
      checks++;
      if (pi !== SIN[k] || step !== 2'(k)) begin
        failures++; $display("FAIL step %0d: pi=%b step=%0d", k, pi, step);
      end
      mismatch = (k == bad_step);
      checks++;
      if (strobe !== (in_step == SWAIT[k] - 1)) begin failures++; $display("FAIL strobe at step %0d+%0d", k, in_step); end
      if (strobe) strobes++;
      @(negedge clk); cyc++;
      in_step++;
      if (in_step == SWAIT[k]) begin in_step = 0; k++; end
    end
    mismatch = 0;
    checks++;
    if (cyc != TOTAL + 1 || strobes != N || !done) begin
      failures++; $display("FAIL run length %0d strobes %0d done %b", cyc, strobes, done);
    end
    checks++;
    if (fail !== (bad_step >= 0) || (bad_step >= 0 && fail_step !== 2'(bad_step))) begin
      failures++; $display("FAIL fail=%b step=%0d for bad step %0d", fail, fail_step, bad_step);
    end
    checks++;
    if (pi !== SIN[0]) begin failures++; $display("FAIL idle vector"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    run(-1);
    for (int b = 0; b < N; b++) run(b);
    run(-1);
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
