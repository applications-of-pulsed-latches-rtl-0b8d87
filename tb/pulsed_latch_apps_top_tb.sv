// pulsed_latch_apps_top_tb: end-to-end test of the three pulsed-latch
// applications, all at their default sizes (4-bit bidirectional storage
// register, 8-bit ring counter, 5-bit LFSR with taps 4 and 5).
//
// All three run at once from the shared reference clock, with independent
// random enables; the register also gets a random serial input every cycle
// and a direction that changes now and then. For each application a
// cycle-level model tracks the pulse slot of the current period (a period
// starts on an edge where en is high and the previous period is idle or in
// its last slot, and lasts W+1 cycles), so the test knows when each done
// strobe is due, which direction a shift uses (sampled at the start edge) and
// which input bit it takes (the value when pulse T closes). Every cycle the
// done strobes are compared with the models, and at every done and while idle the
// outputs are compared with a bit-level model of the shift, rotation or LFSR step.
//
// Each mechanism of the design is counted and must occur at least once:
// right shifts, left shifts, direction changes between shifts, back-to-back
// periods, idle (hold) cycles, the ring wrap from the last latch to the first,
// and the LFSR returning to its seed after its full period.
module pulsed_latch_apps_top_tb;
  localparam int BW = 4, RW = 8, LW = 5;

  logic          clk = 0, rst_n;
  logic          bdsr_en, bdsr_right, bdsr_din, bdsr_done;
  logic [BW-1:0] bdsr_q;
  logic          ring_en, ring_done;
  logic [RW-1:0] ring_q;
  logic          lfsr_en, lfsr_dout, lfsr_done;
  logic [LW-1:0] lfsr_q;

  int checks = 0, failures = 0;

  pulsed_latch_apps_top dut (
    .clk(clk), .rst_n(rst_n),
    .bdsr_en(bdsr_en), .bdsr_right(bdsr_right), .bdsr_din(bdsr_din),
    .bdsr_q(bdsr_q), .bdsr_done(bdsr_done),
    .ring_en(ring_en), .ring_q(ring_q), .ring_done(ring_done),
    .lfsr_en(lfsr_en), .lfsr_q(lfsr_q), .lfsr_dout(lfsr_dout), .lfsr_done(lfsr_done)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- period models --------------------------------------------------------
  logic [BW-1:0] b_model;
  logic [RW-1:0] r_model;
  logic [LW-1:0] l_model;
  int   b_slot = -1, r_slot = -1, l_slot = -1;
  logic b_exp_done = 0, r_exp_done = 0, l_exp_done = 0;
  logic b_dir, b_bit, b_last_dir = 1'b1;
  int   n_right = 0, n_left = 0, n_switch = 0, n_b2b = 0, n_idle = 0;
  int   n_wrap = 0, n_lfsr_period = 0, n_ring = 0, n_lfsr = 0;

  function automatic int next_slot(input int s, input logic en, input int w);
    if (s == -1 || s == w) return en ? 0 : -1;
    return s + 1;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_slot <= -1; r_slot <= -1; l_slot <= -1;
      b_exp_done <= 0; r_exp_done <= 0; l_exp_done <= 0;
    end else begin
      b_exp_done <= (b_slot == BW);
      r_exp_done <= (r_slot == RW);
      l_exp_done <= (l_slot == LW);
      if ((b_slot == -1 || b_slot == BW) && bdsr_en) begin
        b_dir <= bdsr_right;
        if (b_slot == BW) n_b2b++;
      end
      if (b_slot == 0) b_bit <= bdsr_din;      // pulse T closes on this edge
      // The last pulse of a period closes on this edge: the shift is complete.
      // (b_dir still holds this period's direction here.)
      if (b_slot == BW) begin
        b_model <= b_dir ? {b_model[BW-2:0], b_bit} : {b_bit, b_model[BW-1:1]};
        if (b_dir) n_right++; else n_left++;
        if (b_dir != b_last_dir) n_switch++;
        b_last_dir <= b_dir;
      end
      if (b_slot == -1 && !bdsr_en && !ring_en && !lfsr_en) n_idle++;
      if ((r_slot == RW) && ring_en) n_b2b++;
      b_slot <= next_slot(b_slot, bdsr_en, BW);
      r_slot <= next_slot(r_slot, ring_en, RW);
      l_slot <= next_slot(l_slot, lfsr_en, LW);
    end
  end

  // ---- data models and checks -------------------------------------------------

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (bdsr_done !== b_exp_done || ring_done !== r_exp_done || lfsr_done !== l_exp_done) begin
        failures++;
        $display("FAIL t=%0t done strobes %b%b%b expected %b%b%b", $time,
                 bdsr_done, ring_done, lfsr_done, b_exp_done, r_exp_done, l_exp_done);
      end
      if (ring_done) begin
        if (r_model[RW-1]) n_wrap++;
        r_model = {r_model[RW-2:0], r_model[RW-1]};
        n_ring++;
      end
      if (lfsr_done) begin
        l_model = {l_model[LW-2:0], l_model[3] ^ l_model[4]};
        n_lfsr++;
        if (l_model == 5'b00001) n_lfsr_period++;
      end
      // Outputs are compared when they are settled: at done, or while idle.
      // Inside a period the latches change one after the other.
      if (bdsr_done || b_slot == -1) begin
        checks++;
        if (bdsr_q !== b_model) begin
          failures++;
          $display("FAIL t=%0t bdsr q=%b expected %b", $time, bdsr_q, b_model);
        end
      end
      if (ring_done || r_slot == -1) begin
        checks++;
        if (ring_q !== r_model) begin
          failures++;
          $display("FAIL t=%0t ring q=%b expected %b", $time, ring_q, r_model);
        end
      end
      if (lfsr_done || l_slot == -1) begin
        checks++;
        if (lfsr_q !== l_model || lfsr_dout !== l_model[LW-1]) begin
          failures++;
          $display("FAIL t=%0t lfsr q=%b dout=%b expected %b", $time, lfsr_q, lfsr_dout, l_model);
        end
      end
    end
  end

  task automatic need(input int count, input string what);
    checks++;
    $display("%-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    rst_n = 0; bdsr_en = 0; bdsr_right = 1; bdsr_din = 0; ring_en = 0; lfsr_en = 0;
    b_model = '0; r_model = RW'(1); l_model = LW'(1);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // quiet start
    repeat (10) @(negedge clk);
    for (int phase = 0; phase < 60; phase++) begin
      int busy;
      busy = $urandom_range(0, 4);   // 0: all idle, 4: all always on
      repeat ($urandom_range(20, 200)) begin
        @(negedge clk);
        bdsr_en  = (busy == 0) ? 1'b0 : ($urandom_range(3) < busy);
        ring_en  = (busy == 0) ? 1'b0 : ($urandom_range(3) < busy);
        lfsr_en  = (busy == 0) ? 1'b0 : ($urandom_range(3) < busy);
        bdsr_din = 1'($urandom);
        if ($urandom_range(15) == 0) bdsr_right = ~bdsr_right;
      end
    end
    @(negedge clk) bdsr_en = 0; ring_en = 0; lfsr_en = 0;
    repeat (RW + 3) @(negedge clk);
    need(n_right,       "bdsr right shifts");
    need(n_left,        "bdsr left shifts");
    need(n_switch,      "bdsr direction changes");
    need(n_b2b,         "back-to-back periods");
    need(n_idle,        "idle cycles (all held)");
    need(n_ring,        "ring counter steps");
    need(n_wrap,        "ring wraps latch 8 -> latch 1");
    need(n_lfsr,        "lfsr steps");
    need(n_lfsr_period, "lfsr full periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
