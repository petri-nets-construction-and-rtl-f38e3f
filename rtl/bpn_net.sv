// bpn_net: generic safe Boolean Petri net (BPN) token engine.
//
// The marking M holds one bit per place. Each transition j has a set of
// input places PRE[j] and output places POST[j] (arc weight 1) and a Boolean
// event ev_i[j] (its sensor or contact equation, evaluated outside). On every
// clock edge the engine applies the state equation
//     M_k = M_{k-1} + A^T U_k,   A^T = POST - PRE,
// where U_k is the set of transitions that fire in that cycle. A transition
// fires when it is enabled (every input place marked; for a transition
// flagged in OR_IN, any input place marked) and its event is true. The
// document fires one transition per event; when two enabled transitions
// share an input place in the same cycle this engine lets the one with the
// lower index take the token (a design choice: wrappers put stop and safety
// transitions first). Firing an OR transition removes the token from every
// marked input place.
//
// Interface: clk, synchronous active-high rst (loads M0, as the reset of
// the document's HDL controllers returns the net to its initial place),
// ev_i[NT-1:0], marking_o[NP-1:0] (registered), fire_o[NT-1:0]
// (combinational, the firing vector U_k of the current cycle).
// Timing: a token moves one transition per clock; outputs decoded from
// marking_o change one cycle after the event is seen.
module bpn_net #(
  parameter int unsigned NP = 2,
  parameter int unsigned NT = 2,
  parameter logic [NT-1:0][NP-1:0] PRE   = {2'b10, 2'b01},
  parameter logic [NT-1:0][NP-1:0] POST  = {2'b01, 2'b10},
  parameter logic [NT-1:0]         OR_IN = '0,
  parameter logic [NP-1:0]         M0    = 2'b01
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [NT-1:0] ev_i,
  output logic [NP-1:0] marking_o,
  output logic [NT-1:0] fire_o
);

  logic [NP-1:0] avail;     // tokens not yet taken this cycle
  logic [NP-1:0] consumed;
  logic [NP-1:0] produced;
  logic [NP-1:0] m_next;

  always_comb begin
    avail    = marking_o;
    consumed = '0;
    produced = '0;
    fire_o   = '0;
    for (int j = 0; j < NT; j++) begin
      logic en;
      if (OR_IN[j]) en = |(PRE[j] & avail);
      else          en = ((PRE[j] & avail) == PRE[j]) && (PRE[j] != '0);
      if (en && ev_i[j]) begin
        fire_o[j] = 1'b1;
        consumed  = consumed | (PRE[j] & avail);
        produced  = produced | POST[j];
        avail     = avail & ~PRE[j];
      end
    end
    m_next = (marking_o & ~consumed) | produced;
  end

  always_ff @(posedge clk) begin
    if (rst) marking_o <= M0;
    else     marking_o <= m_next;
  end

  // Safeness (boundedness by 1): a token is never added to a place that
  // keeps its token through the same firing.
  property p_safe;
    @(posedge clk) disable iff (rst)
      ((marking_o & ~consumed) & produced) == '0;
  endproperty
  a_safe: assert property (p_safe)
    else $error("bpn_net: place would hold two tokens");

endmodule
