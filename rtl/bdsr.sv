// bdsr: bidirectional storage (shift) register built from bidirectional
// pulsed latches.
//
// WIDTH BD-PLs hold the data; q[0] is the leftmost. Two temporary BD-PLs sit
// at the ends, each fed from the serial input din. Every shift period
// (WIDTH+1 reference cycles) the bidirectional delayed pulsed clock generator
// first pulses the temporary BD-PL on the input side, which samples din, and
// then the data BD-PLs from the downstream end back to the input end:
//   right = 1: q[k] <- q[k-1] for k = WIDTH-1..1, then q[0] <- din
//   right = 0: q[k] <- q[k+1] for k = 0..WIDTH-2, then q[WIDTH-1] <- din
// Because every latch is opened only after its downstream neighbour has
// closed and before its upstream neighbour opens, the transparent latches
// never pass a bit through two stages in one period. A single latch per bit
// replaces the multiplexer plus master-slave flip-flop of a conventional cell.
//
// Interface: clk reference clock; rst_n asynchronous active-low reset (clears
// all latches and the generator); en shift enable (one shift per period while
// high); right direction (sampled at the start of each period); din serial
// input; q parallel contents; done one-cycle strobe after each completed shift.
// Timing: with en held high one shift completes every WIDTH+1 cycles; q is
// stable whenever done is high. din is sampled during the first cycle (pulse
// T) of the period.
//
// The structure (BD-PLs, temporary BD-PLs at both ends, the shared input IN,
// the generator with inputs CLK and Right) follows the described 4-bit
// register. The bit ordering, reset and the enable are this design's choices.
//
// Lint note: tools that treat latches as combinational logic report loops
// between neighbouring BD-PLs (QR of one feeds DR of the next, whose QL feeds
// DL of the first). They stand: at most one BD-PL is open at any time, so no
// transparent path closes.
module bdsr #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             right,
  input  logic             din,
  output logic [WIDTH-1:0] q,
  output logic             done
);

  logic             p_r_t, p_l_t;
  logic [WIDTH-1:0] p_r, p_l;
  logic             tmp_left, tmp_right;   // temporary BD-PL contents
  logic [WIDTH-1:0] qr, ql;                // outputs of the data BD-PLs

  bd_pulse_gen #(.WIDTH(WIDTH)) u_gen (
    .clk          (clk),
    .rst_n        (rst_n),
    .en           (en),
    .right        (right),
    .clk_pulse_r_t(p_r_t),
    .clk_pulse_r  (p_r),
    .clk_pulse_l_t(p_l_t),
    .clk_pulse_l  (p_l),
    .done         (done)
  );

  // Temporary BD-PL on the left: holds din for a right shift.
  bd_pl u_tmp_left (
    .rst_n(rst_n), .clk_r(p_r_t), .clk_l(1'b0),
    .dr(din), .dl(1'b0), .qr(tmp_left), .ql()
  );

  // Temporary BD-PL on the right: holds din for a left shift.
  bd_pl u_tmp_right (
    .rst_n(rst_n), .clk_r(1'b0), .clk_l(p_l_t),
    .dr(1'b0), .dl(din), .qr(), .ql(tmp_right)
  );

  for (genvar k = 0; k < WIDTH; k++) begin : g_cell
    logic dr_k, dl_k;
    assign dr_k = (k == 0)         ? tmp_left  : qr[(k == 0) ? 0 : k-1];
    assign dl_k = (k == WIDTH - 1) ? tmp_right : ql[(k == WIDTH - 1) ? k : k+1];

    bd_pl u_bdpl (
      .rst_n(rst_n), .clk_r(p_r[k]), .clk_l(p_l[k]),
      .dr(dr_k), .dl(dl_k), .qr(qr[k]), .ql(ql[k])
    );
  end

  assign q = qr;

endmodule
