// yd_ladder_model: behavioural model of the Y-Delta starter relay ladder,
// the equipment that the fault-free controller is compared with. Not part
// of the design; testbenches use it as the device under test.
//
// One scan per clock, rungs evaluated in order with relay states of the
// previous scan where a rung reads a later coil:
//   M     = (Pb1 + M) not Pb2 not OL       main relay with self hold
//   Timer = M,  T_delta after PRESET scans of M
//   X     = M
//   Y     = X not T_delta not D            star contactor
//   D     = X (T_delta + D) not Y          delta contactor with self hold
//   PL1 = not M,  PL2 = Y,  PL3 = D
// Injectable faults (1 = present): f1 Pb1 stuck open, f2 contact in the D
// rung stuck open (motor cannot run), f3 contact D2 stuck open (PL3 dark),
// pb1_on Pb1 stuck closed, pb2_on the stop contact never opens.
module yd_ladder_model
  import bpn_pkg::*;
#(
  parameter int unsigned PRESET = 10
) (
  input  logic    clk,
  input  logic    rst,
  input  yd_in_t  in_i,
  input  logic    f1,
  input  logic    f2,
  input  logic    f3,
  input  logic    pb1_on,
  input  logic    pb2_on,
  output yd_out_t out_o
);
  logic m, y, d, td;
  int unsigned cnt;

  always_ff @(posedge clk) begin
    logic pb1, pb2, mn, tdn, yn, dn;
    if (rst) begin
      m <= 0; y <= 0; d <= 0; td <= 0; cnt <= 0;
    end else begin
      pb1 = (in_i.pb1 | pb1_on) & !f1;
      pb2 = in_i.pb2 & !pb2_on;
      mn  = (pb1 | m) & !pb2 & !in_i.ol;
      if (!mn) cnt <= 0; else if (cnt < PRESET) cnt <= cnt + 1;
      tdn = mn && (cnt + 1 >= PRESET);
      yn  = mn & !tdn & !d;
      dn  = mn & (tdn | d) & !yn & !f2;
      m <= mn; td <= tdn; y <= yn; d <= dn;
    end
  end

  always_comb begin
    out_o.pl1 = !m;
    out_o.pl2 = y;
    out_o.pl3 = d & !f3;
    out_o.x   = m;
    out_o.y   = y;
    out_o.d   = d;
  end
endmodule
