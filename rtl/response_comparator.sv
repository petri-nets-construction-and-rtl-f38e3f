// response_comparator: response comparator of the ladder functional test.
//
// The same primary inputs drive the fault-free model (ref_i) and the ladder
// or PLC under test (dut_i). The difference output vector DOV = fault-free
// output - tested output has one entry of -1, 0 or +1 per output; it is
// returned as two bit vectors: dov_pos_o (expected on, seen off: a
// stuck-at-off symptom) and dov_neg_o (expected off, seen on: stuck-at-on).
// A non-zero DOV means a fault. The comparison and the meaning of DOV follow
// the document; sampling on a strobe and the sticky fail flag are this
// design's choices, so that a relay or PLC scan delay between the two
// responses is not taken for a fault.
//
// Interface: clk, rst (synchronous, active high, clears the result),
// strobe_i (compare now), ref_i[W], dut_i[W]; mismatch_o (combinational,
// DOV != 0 at this moment), dov_pos_o/dov_neg_o (registered at the last
// strobe), fail_o (sticky: some strobe saw DOV != 0), pass_o = !fail_o.
// Timing: results appear one clock after the strobe.
module response_comparator #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         strobe_i,
  input  logic [W-1:0] ref_i,
  input  logic [W-1:0] dut_i,
  output logic         mismatch_o,
  output logic [W-1:0] dov_pos_o,
  output logic [W-1:0] dov_neg_o,
  output logic         fail_o,
  output logic         pass_o
);

  assign mismatch_o = (ref_i != dut_i);
  assign pass_o     = !fail_o;

  always_ff @(posedge clk) begin
    if (rst) begin
      dov_pos_o <= '0;
      dov_neg_o <= '0;
      fail_o    <= 1'b0;
    end else if (strobe_i) begin
      dov_pos_o <= ref_i & ~dut_i;
      dov_neg_o <= ~ref_i & dut_i;
      if (mismatch_o) fail_o <= 1'b1;
    end
  end

endmodule
