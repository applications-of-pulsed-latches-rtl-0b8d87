// pulsed_latch: a level-sensitive D latch used as a pulse-clocked storage
// element.
//
// A pulsed latch takes the place of an edge-triggered flip-flop: it is a
// plain transparent latch whose enable is a short pulse rather than a clock
// level. While `pulse` is high, q follows d; when the pulse falls the value is
// held. With pulses only one reference cycle wide, and the neighbouring
// latches pulsed at other times, the latch behaves as a single-latch register
// with one latch between input and output.
//
// Interface: rst_n (asynchronous, active low) forces q to RESET_VALUE;
// pulse is the latch enable; d/q are the data in and out.
// Timing: q changes only while pulse is high; d must be stable across the
// falling edge of pulse.
//
// The latch with a pulsed enable follows the pulsed-latch scheme described in
// the accompanying documentation. The reset is a choice of this design, added
// so that counters built from these latches start in a known state.
//
// Lint note: where these latches are chained into a ring, tools that treat a
// latch as combinational logic report a loop through q; the pulse scheduling
// of the enclosing block keeps such loops open (see ring_counter, lfsr).
module pulsed_latch #(
  parameter logic RESET_VALUE = 1'b0
) (
  input  logic rst_n,
  input  logic pulse,
  input  logic d,
  output logic q
);

  always_latch begin
    if (!rst_n)     q = RESET_VALUE;
    else if (pulse) q = d;
  end

endmodule
