// lfsr: linear feedback shift register built from pulsed D latches.
//
// WIDTH pulsed latches form a shift chain, Q of latch k feeding D of latch
// k+1. Latch 1 is loaded with the XOR of the latch outputs selected by TAPS
// (bit k-1 selects latch k); the default taps are latches 4 and 5 of a 5-latch
// chain. Each step, a clock pulse generator first opens a temporary latch
// (pulse T) that captures the feedback bit from the old state, then opens
// latch WIDTH down to latch 1, so every latch copies the old value of its
// predecessor and latch 1 takes the held feedback bit. The result equals a
// flip-flop Fibonacci LFSR: q' = {q[WIDTH-2:0], ^(q & TAPS)}.
//
// With the default taps (4 and 5) the recurrence is s(n+5) = s(n+1) + s(n),
// whose polynomial x^5 + x + 1 factors as (x^2+x+1)(x^3+x^2+1); the sequence
// is therefore not of maximal length (period 21 from the default seed).
//
// Interface: clk reference clock; rst_n asynchronous active-low reset, which
// loads SEED (q[k-1] is latch k) and stops the generator; en step enable;
// q latch outputs; dout serial output (last latch); done one-cycle strobe
// after each step.
// Timing: one step every WIDTH+1 reference cycles while en is high.
//
// The five-latch chain and the XOR of latches 4 and 5 fed back to latch 1
// follow the described LFSR. The temporary latch, the firing order, the
// seed and the TAPS parameter are this design's choices.
//
// Lint note: tools that treat latches as combinational logic report a
// combinational loop through the feedback (latch 1 .. latch WIDTH, XOR, temporary
// latch, latch 1). It stands: the generator never opens two latches of the loop at
// the same time, so no transparent path closes. Verilator also reports that
// it finds no latch in pulsed_latch for one of the instances here; the
// latches are real (yosys infers $dlatch cells for all of them).
module lfsr #(
  parameter int unsigned      WIDTH = 5,
  parameter logic [WIDTH-1:0] TAPS  = 5'b11000,
  parameter logic [WIDTH-1:0] SEED  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] q,
  output logic             dout,
  output logic             done
);

  logic [WIDTH:0]   slot;        // slot[0] = T, slot[j] = j-th pulse after T
  logic [WIDTH-1:0] clk_pulse;   // clk_pulse[k-1] enables latch k
  logic             feedback, tmp;

  delayed_pulse_gen #(.NPULSES(WIDTH)) u_gen (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .start (),
    .pulses(slot),
    .done  (done)
  );

  always_comb begin
    for (int k = 1; k <= WIDTH; k++) clk_pulse[k-1] = slot[WIDTH+1-k];
  end

  assign feedback = ^(q & TAPS);

  pulsed_latch u_tmp (.rst_n(rst_n), .pulse(slot[0]), .d(feedback), .q(tmp));

  for (genvar k = 0; k < WIDTH; k++) begin : g_latch
    pulsed_latch #(.RESET_VALUE(SEED[k])) u_pl (
      .rst_n(rst_n),
      .pulse(clk_pulse[k]),
      .d    ((k == 0) ? tmp : q[(k == 0) ? 0 : k-1]),
      .q    (q[k])
    );
  end

  assign dout = q[WIDTH-1];

endmodule
