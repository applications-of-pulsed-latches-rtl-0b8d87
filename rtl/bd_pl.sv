// bd_pl: bidirectional pulsed latch (BD-PL).
//
// One storage node with two pulse-selected data inputs. During a CLK_R pulse
// the latch is transparent to DR (data arriving from the left neighbour for a
// right shift); during a CLK_L pulse it is transparent to DL (data arriving
// from the right neighbour for a left shift). The stored bit leaves on QR
// towards the right neighbour and on QL towards the left neighbour, so one
// BD-PL replaces the 2:1 multiplexer and the master-slave flip-flop of a
// conventional bidirectional shift-register cell.
//
// Interface: rst_n asynchronous active-low reset to RESET_VALUE; clk_r/clk_l
// pulses; dr/dl data inputs; qr/ql outputs (same stored bit).
// Timing: the selected input must be stable until its pulse falls. The two
// pulses must never be high together (checked by an assertion); if they were,
// DR would win.
//
// Port names follow the described BD-PL symbol. The inside (a single latch
// with two selected inputs, QR and QL both carrying the stored bit) is this
// design's reading of that symbol.
//
// Lint note: in a register, neighbouring BD-PLs feed each other (QR to DR,
// QL to DL), which tools that treat latches as combinational logic report as
// a loop; only one BD-PL is ever open, so the loop never conducts.
module bd_pl #(
  parameter logic RESET_VALUE = 1'b0
) (
  input  logic rst_n,
  input  logic clk_r,
  input  logic clk_l,
  input  logic dr,
  input  logic dl,
  output logic qr,
  output logic ql
);

  logic q;

  always_latch begin
    if (!rst_n)     q = RESET_VALUE;
    else if (clk_r) q = dr;
    else if (clk_l) q = dl;
  end

  assign qr = q;
  assign ql = q;

  // The generator never enables both directions at once.
  always_comb begin
    if (rst_n) assert (!(clk_r && clk_l)) else $error("bd_pl: CLK_R and CLK_L pulses overlap");
  end

endmodule
