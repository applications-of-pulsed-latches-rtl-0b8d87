// delayed_pulse_gen_tb: self-checking test of the delayed pulse generator.
//
// An integer slot counter models the generator: idle (-1) or slot 0..N,
// starting a new period whenever en is high and the previous period is in its
// last slot or idle. Every cycle the one-hot pulse vector, the start output
// and the done strobe are compared with the model while en is driven with
// long runs and random toggles. It also checks that, with en held high,
// exactly one period completes every N+1 reference cycles
// (TCP + N*TDELAY with TCP = TDELAY = one cycle), and that all pulses are seen
// in order T, 1, ..., N.
module delayed_pulse_gen_tb;
  localparam int N = 8;
  logic         clk = 0, rst_n, en;
  logic         start, done;
  logic [N:0]   pulses;
  int           checks = 0, failures = 0;
  int           exp_slot = -1;
  logic         exp_done = 0;
  int           dones = 0;

  delayed_pulse_gen #(.NPULSES(N)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .start(start), .pulses(pulses), .done(done)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model, updated on the same edges as the design.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exp_slot <= -1;
      exp_done <= 1'b0;
    end else begin
      exp_done <= (exp_slot == N);
      if (exp_slot == -1 || exp_slot == N) exp_slot <= en ? 0 : -1;
      else                                  exp_slot <= exp_slot + 1;
    end
  end

  // Compare in the middle of each cycle.
  always @(negedge clk) begin
    if (rst_n) begin
      logic [N:0] exp_p;
      exp_p = (exp_slot >= 0) ? (N+1)'(1) << exp_slot : '0;
      checks++;
      if (pulses !== exp_p || done !== exp_done ||
          start !== (en && (exp_slot == -1 || exp_slot == N))) begin
        failures++;
        $display("FAIL t=%0t pulses=%b exp %b done=%b exp %b start=%b", $time, pulses, exp_p,
                 done, exp_done, start);
      end
      if (done) dones++;
    end
  end

  initial begin
    int d0;
    rst_n = 0; en = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (pulses !== '0) begin failures++; $display("FAIL pulses while idle"); end
    // Rate: en held high for 10 periods.
    en = 1;
    d0 = dones;
    repeat (10 * (N + 1)) @(negedge clk);
    en = 0;
    repeat (N + 3) @(negedge clk);
    checks++;
    if (dones - d0 != 10) begin
      failures++;
      $display("FAIL rate: %0d periods in %0d cycles, expected 10", dones - d0, 10 * (N + 1));
    end
    // Random enable patterns.
    repeat (2000) begin
      @(negedge clk) en = ($urandom_range(3) != 0);
    end
    en = 0;
    repeat (N + 3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
