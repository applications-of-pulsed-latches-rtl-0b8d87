// ring_counter: ring counter built from pulsed D latches.
//
// WIDTH pulsed latches are connected in series, Q of latch k feeding D of
// latch k+1, and the last latch feeds back to the first, so a single 1 (the
// token) travels round the ring one position per count period. A clock pulse
// generator derives the latch enables clk_pulse_1..clk_pulse_WIDTH from the
// reference clock; clk_pulse_k drives latch k. They fire last latch first
// (clk_pulse_WIDTH down to clk_pulse_1), so each latch copies its
// predecessor before the predecessor changes. A closed ring updated one latch
// at a time would overwrite the last latch before the first could read it,
// so one temporary latch, opened by a pulse T at the start of the period,
// keeps the old value of the last latch for latch 1.
//
// Interface: clk reference clock; rst_n asynchronous active-low reset, which
// loads INIT (q[k-1] is latch k) and stops the generator; en count enable;
// q the latch outputs; done one-cycle strobe after each count step.
// Timing: one step every WIDTH+1 reference cycles while en is high
// (TCP + WIDTH*TDELAY with TCP = TDELAY = one reference cycle).
//
// The latch chain, its feedback, the pulse-per-latch clocking and the 8-bit
// default follow the described ring counter. The temporary latch, the firing
// order and the reset value are this design's choices.
//
// Lint note: tools that treat latches as combinational logic report a
// combinational loop round the ring (latch 1 .. latch WIDTH, temporary latch,
// latch 1). It stands: the generator never opens two latches of the loop at
// the same time, so no transparent path closes. Verilator also reports that
// it finds no latch in pulsed_latch for one of the instances here; the
// latches are real (yosys infers $dlatch cells for all of them).
module ring_counter #(
  parameter int unsigned          WIDTH = 8,
  parameter logic [WIDTH-1:0]     INIT  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] q,
  output logic             done
);

  logic [WIDTH:0]   slot;        // slot[0] = T, slot[j] = j-th pulse after T
  logic [WIDTH-1:0] clk_pulse;   // clk_pulse[k-1] = clk_pulse_k of latch k
  logic             tmp;

  delayed_pulse_gen #(.NPULSES(WIDTH)) u_gen (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .start (),
    .pulses(slot),
    .done  (done)
  );

  // Latch WIDTH is pulsed first after T, latch 1 last.
  always_comb begin
    for (int k = 1; k <= WIDTH; k++) clk_pulse[k-1] = slot[WIDTH+1-k];
  end

  pulsed_latch u_tmp (.rst_n(rst_n), .pulse(slot[0]), .d(q[WIDTH-1]), .q(tmp));

  for (genvar k = 0; k < WIDTH; k++) begin : g_latch
    pulsed_latch #(.RESET_VALUE(INIT[k])) u_pl (
      .rst_n(rst_n),
      .pulse(clk_pulse[k]),
      .d    ((k == 0) ? tmp : q[(k == 0) ? 0 : k-1]),
      .q    (q[k])
    );
  end

endmodule
