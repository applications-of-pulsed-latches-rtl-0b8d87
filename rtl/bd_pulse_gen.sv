// bd_pulse_gen: bidirectional delayed pulsed clock generator.
//
// Drives a WIDTH-bit register of bidirectional pulsed latches (BD-PLs) plus
// its two temporary BD-PLs. Each shift period is WIDTH+1 reference cycles
// long and produces, for the direction chosen by `right`, one pulse T and one
// pulse per BD-PL, never overlapping and never touching the other direction's
// lines:
//   right = 1: CLK_pulse_R<T>, <WIDTH>, <WIDTH-1>, ..., <1>
//   right = 0: CLK_pulse_L<T>, <1>, <2>, ..., <WIDTH>
// Pulse <k> drives BD-PL k counted from the left. In either direction the
// latch at the downstream end is pulsed first, so every BD-PL copies its
// upstream neighbour before that neighbour is overwritten: no race through
// transparent latches. Pulse T, first, lets a temporary BD-PL sample the
// serial input, which the last pulse of the period moves into the end latch.
//
// Interface: clk reference clock; rst_n asynchronous active-low reset; en
// shift enable; right direction, sampled once when a period starts;
// clk_pulse_r_t / clk_pulse_l_t the T pulses; clk_pulse_r[k-1] /
// clk_pulse_l[k-1] the pulses <k>; done a one-cycle strobe after the last
// pulse of a period. All outputs except done are registered one-hot (or zero)
// pulses one reference cycle wide.
//
// The names CLK, Right and CLK_pulse_R/L<T>,<1>..<4> and the 4-bit default
// follow the described design. The firing order, the sampling of Right and
// the enable are this design's choices.
module bd_pulse_gen #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             right,
  output logic             clk_pulse_r_t,
  output logic [WIDTH-1:0] clk_pulse_r,
  output logic             clk_pulse_l_t,
  output logic [WIDTH-1:0] clk_pulse_l,
  output logic             done
);

  logic             start;
  logic [WIDTH:0]   slot;        // slot[0] = T, slot[k] = k-th pulse after T
  logic [WIDTH:0]   slot_next;
  logic             dir_q, dir_next;
  logic [WIDTH:0]   r_q, l_q;    // per-direction registered pulse trains

  delayed_pulse_gen #(.NPULSES(WIDTH)) u_gen (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .start (start),
    .pulses(slot),
    .done  (done)
  );

  // Same token as u_gen one cycle ahead, so the steered copies below are
  // registered too and cannot glitch when the direction changes.
  assign slot_next = {slot[WIDTH-1:0], start};
  assign dir_next  = start ? right : dir_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dir_q <= 1'b1;
      r_q   <= '0;
      l_q   <= '0;
    end else begin
      dir_q <= dir_next;
      r_q   <= dir_next ? slot_next : '0;
      l_q   <= dir_next ? '0 : slot_next;
    end
  end

  // The steered trains are exactly the generator's train, split by direction.
  a_split: assert property (@(posedge clk) disable iff (!rst_n)
                            ((r_q | l_q) == slot) && ((r_q & l_q) == '0))
    else $error("bd_pulse_gen: steered pulses differ from the pulse train");

  assign clk_pulse_r_t = r_q[0];
  assign clk_pulse_l_t = l_q[0];

  // Slot k fires BD-PL WIDTH+1-k for a right shift and BD-PL k for a left one.
  always_comb begin
    for (int k = 1; k <= WIDTH; k++) begin
      clk_pulse_r[WIDTH-k] = r_q[k];
      clk_pulse_l[k-1]     = l_q[k];
    end
  end

endmodule
