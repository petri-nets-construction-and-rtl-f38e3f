// test_event_sequencer: applies a ladder's test event sequence.
//
// A ladder with m inputs has 2(m+1) single stuck-at faults but needs only
// m+1 test events, read off the transition sequence of its Boolean Petri
// net: first "no event" (catches contacts stuck on), then each event in
// firing order (catches paths stuck off, and stop contacts stuck on). This
// block steps through that list. Step k drives the primary-input vector
// STEP_IN[k] for STEP_WAIT[k] clocks; on the last clock of the step it
// strobes the response comparator. The first step whose comparison fails is
// kept in fail_step_o: it is the index into the troubleshooting table of
// the ladder. The idea of the event sequence follows the document; the
// per-step hold time, the level-coded inputs and the start/done handshake
// are this design's choices.
//
// Interface: clk, rst (synchronous, active high), start_i (pulse, ignored
// while busy), mismatch_i (from the comparator); init_o (one-clock pulse at
// start: reset the fault-free model), pi_o (inputs for both models; STEP_IN
// [0] when idle), strobe_o, busy_o, done_o (high from the end of a run until
// the next start), fail_o, fail_step_o, step_o.
// Timing: a run takes 1 + sum(STEP_WAIT) clocks from start_i.
module test_event_sequencer #(
  parameter int unsigned N_STEPS = 3,
  parameter int unsigned IN_W    = 2,
  parameter logic [N_STEPS-1:0][IN_W-1:0] STEP_IN   = {2'b10, 2'b01, 2'b00},
  parameter logic [N_STEPS-1:0][31:0]     STEP_WAIT = {32'd4, 32'd4, 32'd4},
  localparam int unsigned SW = (N_STEPS > 1) ? $clog2(N_STEPS) : 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start_i,
  input  logic            mismatch_i,
  output logic            init_o,
  output logic [IN_W-1:0] pi_o,
  output logic            strobe_o,
  output logic            busy_o,
  output logic            done_o,
  output logic            fail_o,
  output logic [SW-1:0]   fail_step_o,
  output logic [SW-1:0]   step_o
);

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_RUN} seq_state_e;

  seq_state_e  state;
  logic [31:0] count;
  logic        last_cycle;

  assign busy_o     = (state != S_IDLE);
  assign init_o     = (state == S_INIT);
  assign last_cycle = (state == S_RUN) && (count == STEP_WAIT[step_o] - 32'd1);
  assign strobe_o   = last_cycle;
  assign pi_o       = (state == S_RUN) ? STEP_IN[step_o] : STEP_IN[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      count       <= '0;
      step_o      <= '0;
      done_o      <= 1'b0;
      fail_o      <= 1'b0;
      fail_step_o <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start_i) begin
          state       <= S_INIT;
          done_o      <= 1'b0;
          fail_o      <= 1'b0;
          fail_step_o <= '0;
        end
        S_INIT: begin
          state  <= S_RUN;
          step_o <= '0;
          count  <= '0;
        end
        S_RUN: begin
          if (last_cycle) begin
            if (mismatch_i && !fail_o) begin
              fail_o      <= 1'b1;
              fail_step_o <= step_o;
            end
            count <= '0;
            if (step_o == SW'(N_STEPS - 1)) begin
              state  <= S_IDLE;
              done_o <= 1'b1;
            end else begin
              step_o <= step_o + 1'b1;
            end
          end else begin
            count <= count + 32'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Every step must last at least one clock.
  initial for (int k = 0; k < N_STEPS; k++)
    assert (STEP_WAIT[k] != 0) else $error("test_event_sequencer: STEP_WAIT[%0d] is zero", k);

endmodule
