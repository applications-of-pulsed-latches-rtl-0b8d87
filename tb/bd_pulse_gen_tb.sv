// bd_pulse_gen_tb: self-checking test of the bidirectional delayed pulsed
// clock generator.
//
// A slot counter plus a direction register models the generator. Every
// cycle it checks that exactly the expected line is pulsed: in a right-shift
// period CLK_pulse_R<T> then <W>, <W-1>, ..., <1>; in a left-shift period
// CLK_pulse_L<T> then <1>, ..., <W>; and that no line of the other direction
// is ever high. The direction input is changed at random, also in mid-period,
// to check that it is sampled only when a period starts. With en held high
// one period must complete every W+1 cycles.
module bd_pulse_gen_tb;
  localparam int W = 4;
  logic         clk = 0, rst_n, en, right;
  logic         r_t, l_t, done;
  logic [W-1:0] r, l;
  int           checks = 0, failures = 0;
  int           exp_slot = -1;
  logic         exp_dir = 1'b1;
  int           dones = 0, right_periods = 0, left_periods = 0;

  bd_pulse_gen #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .right(right),
    .clk_pulse_r_t(r_t), .clk_pulse_r(r), .clk_pulse_l_t(l_t), .clk_pulse_l(l), .done(done)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exp_slot <= -1;
    end else if (exp_slot == -1 || exp_slot == W) begin
      exp_slot <= en ? 0 : -1;
      if (en) exp_dir <= right;
    end else begin
      exp_slot <= exp_slot + 1;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      logic         e_rt, e_lt;
      logic [W-1:0] e_r, e_l;
      e_rt = 0; e_lt = 0; e_r = '0; e_l = '0;
      if (exp_slot == 0) begin
        if (exp_dir) e_rt = 1; else e_lt = 1;
      end else if (exp_slot > 0) begin
        // right: downstream (highest index) BD-PL first; left: index 1 first
        if (exp_dir) e_r[W - exp_slot] = 1'b1;
        else         e_l[exp_slot - 1] = 1'b1;
      end
      checks++;
      if ({r_t, r, l_t, l} !== {e_rt, e_r, e_lt, e_l}) begin
        failures++;
        $display("FAIL t=%0t R<T>=%b R=%b L<T>=%b L=%b expected %b %b %b %b", $time,
                 r_t, r, l_t, l, e_rt, e_r, e_lt, e_l);
      end
      if (done) dones++;
      if (r_t) right_periods++;
      if (l_t) left_periods++;
    end
  end

  initial begin
    int d0;
    rst_n = 0; en = 0; right = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    en = 1; right = 1;
    d0 = dones;
    repeat (5 * (W + 1)) @(negedge clk);
    right = 0;
    repeat (5 * (W + 1)) @(negedge clk);
    en = 0;
    repeat (W + 3) @(negedge clk);
    checks++;
    if (dones - d0 != 10) begin
      failures++;
      $display("FAIL rate: %0d periods, expected 10", dones - d0);
    end
    repeat (3000) begin
      @(negedge clk);
      en    = ($urandom_range(3) != 0);
      right = 1'($urandom);
    end
    en = 0;
    repeat (W + 3) @(negedge clk);
    checks++;
    if (right_periods < 10 || left_periods < 10) begin
      failures++;
      $display("FAIL too few periods: right %0d left %0d", right_periods, left_periods);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
