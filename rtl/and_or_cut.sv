// and_or_cut: the example combinational circuit used for test generation,
// with single stuck-at fault injection.
//
// Lines are named by the places of its Logic Petri net: two AND gates
// p5 = p1 p2 and p6 = p3 p4 feed an OR gate p7 = p5 + p6. Any one line
// p1..p7 can be forced to a stuck value, which models the single stuck-at
// faults whose test patterns the Logic Petri net reasoning derives (for
// example p6 stuck-at-0 is found by p3 p4 = 11 with p1 p2 not 11). The
// gates and line names follow the document; the injection port is this
// design's own, so that test patterns can be checked against the circuit.
//
// Interface: p_i[4:1] = {p4, p3, p2, p1} primary inputs; fault_en_i,
// fault_site_i (1..7, the line), fault_val_i (stuck value); p7_o primary
// output, lines_o[7:1] every line value. Purely combinational.
module and_or_cut (
  input  logic [4:1] p_i,
  input  logic       fault_en_i,
  input  logic [2:0] fault_site_i,
  input  logic       fault_val_i,
  output logic       p7_o,
  output logic [7:1] lines_o
);

  // Value of line k after an optional stuck-at fault.
  function automatic logic line(input logic v, input logic [2:0] k,
                                input logic en, input logic [2:0] site,
                                input logic sv);
    return (en && site == k) ? sv : v;
  endfunction

  always_comb begin
    for (int unsigned k = 1; k <= 4; k++)
      lines_o[k] = line(p_i[k], 3'(k), fault_en_i, fault_site_i, fault_val_i);
    lines_o[5] = line(lines_o[1] & lines_o[2], 5, fault_en_i, fault_site_i, fault_val_i);
    lines_o[6] = line(lines_o[3] & lines_o[4], 6, fault_en_i, fault_site_i, fault_val_i);
    lines_o[7] = line(lines_o[5] | lines_o[6], 7, fault_en_i, fault_site_i, fault_val_i);
  end

  assign p7_o = lines_o[7];

endmodule
