// on_delay_timer: the timer coil and timer contact T_delta of a ladder.
//
// While the coil input is energised the timer counts clock cycles; once it
// has counted PRESET cycles its contact closes (done_o = 1) and stays closed
// while the coil stays energised. De-energising the coil resets the count
// and opens the contact at once, as a relay timer does. The Y-Delta starter
// uses it for the star-to-delta delay; the document's controller waits
// 5 s, so PRESET defaults to 5 s at CLK_HZ, the clock frequency, which the
// document does not give (1 MHz is this design's choice).
//
// Interface: clk, synchronous active-high rst, coil_i, done_o (registered).
// Timing: done_o rises on the PRESET-th rising edge after coil_i is seen
// high (coil_i sampled high at edge 1 .. edge PRESET).
module on_delay_timer #(
  parameter int unsigned CLK_HZ  = 1_000_000,
  parameter int unsigned DELAY_S = 5,
  parameter int unsigned PRESET  = CLK_HZ * DELAY_S,
  localparam int unsigned CW     = $clog2(PRESET + 1)
) (
  input  logic clk,
  input  logic rst,
  input  logic coil_i,
  output logic done_o
);

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst || !coil_i) begin
      count  <= '0;
      done_o <= 1'b0;
    end else if (!done_o) begin
      count  <= count + 1'b1;
      done_o <= (count == CW'(PRESET - 1));
    end
  end

endmodule
