// tb_response_comparator: difference output vector and pass/fail.
//
// Random fault-free and tested vectors, strobed or not; the expected DOV
// (+1 where only the fault-free model is on, -1 where only the tested one
// is) and the sticky fail flag are computed in the testbench.
module tb_response_comparator;
  localparam int W = 6;
  logic clk = 0, rst = 1, strobe = 0;
  logic [W-1:0] r = '0, d = '0, pos, neg;
  logic mismatch, fail, pass;
  int checks = 0, failures = 0;

  response_comparator #(.W(W)) dut (.clk(clk), .rst(rst), .strobe_i(strobe), .ref_i(r), .dut_i(d),
    .mismatch_o(mismatch), .dov_pos_o(pos), .dov_neg_o(neg), .fail_o(fail), .pass_o(pass));

  always #5 clk = ~clk;

  initial begin
    logic [W-1:0] exp_pos, exp_neg;
    logic exp_fail;
    repeat (2) @(posedge clk);
    rst = 0; #1;
    exp_pos = '0; exp_neg = '0; exp_fail = 0;
    for (int n = 0; n < 2000; n++) begin
      if (n % 500 == 0) begin
        rst = 1; @(posedge clk); #1; rst = 0;
        exp_pos = '0; exp_neg = '0; exp_fail = 0;
      end
      r = W'($urandom);
      d = ($urandom % 3 == 0) ? W'($urandom) : r;
      strobe = 1'($urandom % 2);
      #1;
      checks++;
      if (mismatch !== (r != d)) begin failures++; $display("FAIL mismatch"); end
      if (strobe) begin
        exp_pos = r & ~d;
        exp_neg = ~r & d;
        if (r != d) exp_fail = 1;
      end
      @(posedge clk); #1;
      checks++;
      if (pos !== exp_pos || neg !== exp_neg || fail !== exp_fail || pass !== !exp_fail) begin
        failures++;
        $display("FAIL dov +%b -%b fail %b, expected +%b -%b fail %b", pos, neg, fail, exp_pos, exp_neg, exp_fail);
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
