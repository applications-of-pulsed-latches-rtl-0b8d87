// delayed_pulse_gen: clock pulse generator for pulsed-latch registers.
//
// From a fast reference clock it produces, once per operation period, a
// train of NPULSES+1 short pulses that never overlap: first the pulse T for a
// temporary latch, then pulses 1..NPULSES, each delayed from the previous one
// by one reference cycle. The pulses are the bits of a one-hot token shift
// register, so every pulse is a flip-flop output, one reference cycle wide and
// free of glitches. A period therefore lasts NPULSES+1 reference cycles,
// i.e. TCP + NPULSES*TDELAY with pulse width TCP and pulse spacing TDELAY both
// equal to one reference cycle.
//
// Interface:
//   en      - while high, a new train starts as soon as the previous one ends
//             (back to back); when low, the current train finishes and the
//             generator idles with all pulses low.
//   start   - combinational, high in the reference cycle before pulse T rises.
//   pulses  - bit 0 is pulse T, bit k is the k-th delayed pulse. At most one
//             bit is high at any time.
//   done    - one-cycle strobe in the cycle after pulse NPULSES was high,
//             i.e. once all latches of the period have closed.
//
// The idea of deriving a set of delayed, non-overlapping pulses from a
// reference clock, and the period formula, follow the described design. Its
// realisation as a synchronous token ring (in place of a delay-line pulser),
// the extra pulse T and the enable are this design's choices.
module delayed_pulse_gen #(
  parameter int unsigned NPULSES = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  output logic               start,
  output logic [NPULSES:0]   pulses,
  output logic               done
);

  // A new train may begin when no pulse, or only the last one, is active.
  assign start = en && (pulses[NPULSES-1:0] == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pulses <= '0;
      done   <= 1'b0;
    end else begin
      pulses <= {pulses[NPULSES-1:0], start};
      done   <= pulses[NPULSES];
    end
  end

  // The pulses are non-overlapping by construction.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pulses))
    else $error("delayed_pulse_gen: overlapping pulses %b", pulses);

endmodule
