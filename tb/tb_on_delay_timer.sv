// tb_on_delay_timer: checks the on-delay of the timer contact in clock
// cycles, its hold while the coil stays on, and its reset when the coil
// drops (also part-way through the count). PRESET = CLK_HZ * DELAY_S = 20.
module tb_on_delay_timer;
  localparam int unsigned PRESET = 20;
  logic clk = 0, rst = 1, coil = 0, done;
  int checks = 0, failures = 0;

  on_delay_timer #(.CLK_HZ(10), .DELAY_S(2)) dut (.clk(clk), .rst(rst), .coil_i(coil), .done_o(done));

  always #5 clk = ~clk;

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b expected %b", what, got, exp); end
  endtask

  task automatic measure(output int n);
    n = 0;
    coil = 1;
    do begin @(posedge clk); #1; n++; end while (!done && n < 1000);
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst = 0; #1;
    expect_bit(done, 0, "idle");
    measure(n);
    checks++;
    if (n != PRESET) begin failures++; $display("FAIL delay %0d cycles, expected %0d", n, PRESET); end
    repeat (50) begin @(posedge clk); #1; expect_bit(done, 1, "held while coil on"); end
    coil = 0; @(posedge clk); #1;
    expect_bit(done, 0, "released with coil");
    // Interrupted count starts over.
    coil = 1; repeat (PRESET - 3) @(posedge clk); #1;
    expect_bit(done, 0, "not yet");
    coil = 0; @(posedge clk); #1;
    measure(n);
    checks++;
    if (n != PRESET) begin failures++; $display("FAIL restarted delay %0d", n); end
    rst = 1; @(posedge clk); #1; rst = 0;
    expect_bit(done, 0, "reset");
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
