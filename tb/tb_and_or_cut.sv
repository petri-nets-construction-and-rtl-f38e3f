// tb_and_or_cut: the example circuit p7 = p1 p2 + p3 p4 and its stuck-at
// faults.
//
// Exhaustive: every input pattern, fault-free and with each of the 14
// single stuck-at faults, against values computed here. Then the test
// patterns derived by Logic Petri net reasoning are checked to detect their
// faults: p6 stuck-at-0 by p3 p4 = 11 with p1 p2 not 11, and p4 stuck-at-1
// by p3 p4 = 10 with p1 p2 not 11.
module tb_and_or_cut;
  logic [4:1] p = '0;
  logic en = 0, val = 0;
  logic [2:0] site = '0;
  logic p7;
  logic [7:1] lines;
  int checks = 0, failures = 0;

  and_or_cut dut (.p_i(p), .fault_en_i(en), .fault_site_i(site), .fault_val_i(val), .p7_o(p7), .lines_o(lines));

  function automatic logic model(input logic [4:1] x, input bit fen, input int fs, input bit fv);
    logic [7:1] l;
    for (int k = 1; k <= 4; k++) l[k] = (fen && fs == k) ? fv : x[k];
    l[5] = (fen && fs == 5) ? fv : (l[1] && l[2]);
    l[6] = (fen && fs == 6) ? fv : (l[3] && l[4]);
    l[7] = (fen && fs == 7) ? fv : (l[5] || l[6]);
    return l[7];
  endfunction

  task automatic detects(input logic [4:1] x, input int fs, input bit fv, input string what);
    logic good, bad;
    p = x; en = 0; #1; good = p7;
    en = 1; site = 3'(fs); val = fv; #1; bad = p7;
    en = 0;
    checks++;
    if (good === bad) begin failures++; $display("FAIL %s not detected by %b", what, x); end
  endtask

  initial begin
    for (int f = 0; f <= 14; f++)
      for (int x = 0; x < 16; x++) begin
        p = 4'(x); en = (f != 0); site = 3'((f + 1) / 2); val = f[0];
        #1;
        checks++;
        if (p7 !== model(4'(x), en, (f + 1) / 2, f[0])) begin
          failures++; $display("FAIL pattern %b fault %0d: p7=%b", x, f, p7);
        end
      end
    // p6 stuck-at-0: {p1,p2} not {1,1}, {p3,p4} = {1,1}; p_i = {p4,p3,p2,p1}.
    detects(4'b1100, 6, 0, "p6 s-a-0");
    detects(4'b1101, 6, 0, "p6 s-a-0");
    detects(4'b1110, 6, 0, "p6 s-a-0");
    // p4 stuck-at-1: {p3,p4} = {1,0}.
    detects(4'b0100, 4, 1, "p4 s-a-1");
    detects(4'b0101, 4, 1, "p4 s-a-1");
    detects(4'b0110, 4, 1, "p4 s-a-1");
    // Primary inputs stuck-at-1 and p5 stuck-at-0 (fired values of Table of
    // sites): one pattern each.
    detects(4'b0010, 1, 1, "p1 s-a-1");
    detects(4'b0001, 2, 1, "p2 s-a-1");
    detects(4'b1000, 3, 1, "p3 s-a-1");
    detects(4'b0011, 5, 0, "p5 s-a-0");
    detects(4'b0000, 7, 1, "p7 s-a-1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
