// pulsed_latch_apps_top: three pulsed-latch applications side by side.
//
// Every storage element below is a level-sensitive latch opened by a short,
// non-overlapping pulse instead of an edge-triggered flip-flop. The three
// designs are independent and share only the reference clock and the reset:
//   - bdsr:         BDSR_WIDTH-bit bidirectional storage register made of
//                   bidirectional pulsed latches (one shift per BDSR_WIDTH+1
//                   reference cycles, direction from bdsr_right, serial input
//                   bdsr_din).
//   - ring_counter: RING_WIDTH-bit ring counter of pulsed latches (one token
//                   step per RING_WIDTH+1 reference cycles).
//   - lfsr:         LFSR_WIDTH-bit LFSR of pulsed latches, feedback from the
//                   XOR of the latches selected by LFSR_TAPS (one step per
//                   LFSR_WIDTH+1 reference cycles).
// Each has its own enable, its outputs and a one-cycle done strobe after
// every completed step.
//
// The sizes (4, 8 and 5 bits) and the taps (latches 4 and 5) are those of the
// described designs; placing them in one top is this design's choice.
//
// Lint note: the combinational loops and latches that tools report inside
// the three blocks are the intended pulsed latches; see each block's notes.
module pulsed_latch_apps_top #(
  parameter int unsigned           BDSR_WIDTH = 4,
  parameter int unsigned           RING_WIDTH = 8,
  parameter logic [RING_WIDTH-1:0] RING_INIT  = RING_WIDTH'(1),
  parameter int unsigned           LFSR_WIDTH = 5,
  parameter logic [LFSR_WIDTH-1:0] LFSR_TAPS  = 5'b11000,
  parameter logic [LFSR_WIDTH-1:0] LFSR_SEED  = LFSR_WIDTH'(1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // bidirectional storage register
  input  logic                  bdsr_en,
  input  logic                  bdsr_right,
  input  logic                  bdsr_din,
  output logic [BDSR_WIDTH-1:0] bdsr_q,
  output logic                  bdsr_done,
  // ring counter
  input  logic                  ring_en,
  output logic [RING_WIDTH-1:0] ring_q,
  output logic                  ring_done,
  // LFSR
  input  logic                  lfsr_en,
  output logic [LFSR_WIDTH-1:0] lfsr_q,
  output logic                  lfsr_dout,
  output logic                  lfsr_done
);

  bdsr #(.WIDTH(BDSR_WIDTH)) u_bdsr (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (bdsr_en),
    .right(bdsr_right),
    .din  (bdsr_din),
    .q    (bdsr_q),
    .done (bdsr_done)
  );

  ring_counter #(.WIDTH(RING_WIDTH), .INIT(RING_INIT)) u_ring (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (ring_en),
    .q    (ring_q),
    .done (ring_done)
  );

  lfsr #(.WIDTH(LFSR_WIDTH), .TAPS(LFSR_TAPS), .SEED(LFSR_SEED)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (lfsr_en),
    .q    (lfsr_q),
    .dout (lfsr_dout),
    .done (lfsr_done)
  );

endmodule
