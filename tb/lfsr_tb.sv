// lfsr_tb: self-checking test of the pulsed-latch LFSR.
//
// The model is a flip-flop Fibonacci LFSR: latch k+1 takes latch k and latch
// 1 takes the XOR of latches 4 and 5, all from the old state. After every
// done strobe the latch outputs and the serial output are compared with it.
// The test also measures the sequence period from the default seed (21 for
// these taps, which are not primitive), checks the single-step latency and
// the rate (one step per W+1 cycles with en held high), and checks that the
// register holds while en is low.
module lfsr_tb;
  localparam int W = 5;
  logic         clk = 0, rst_n, en;
  logic [W-1:0] q;
  logic         dout, done;
  logic [W-1:0] model;
  int           checks = 0, failures = 0, steps = 0, period = 0;

  lfsr dut (.clk(clk), .rst_n(rst_n), .en(en), .q(q), .dout(dout), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && done) begin
      model = {model[3:0], model[3] ^ model[4]};
      steps++;
      if (period == 0 && model == 5'b00001) period = steps;
      checks++;
      if (q !== model || dout !== model[4]) begin
        failures++;
        $display("FAIL step %0d: q=%b dout=%b expected %b", steps, q, dout, model);
      end
    end
  end

  initial begin
    int cycles, s0;
    rst_n = 0; en = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    model = 5'b00001;
    checks++;
    if (q !== model) begin failures++; $display("FAIL seed %b", q); end
    en = 1;
    @(negedge clk) en = 0;
    cycles = 0;
    while (!done && cycles < 50) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != W + 1) begin failures++; $display("FAIL latency %0d", cycles); end
    @(negedge clk);
    s0 = steps;
    en = 1;
    repeat (40 * (W + 1) - 1) @(negedge clk);
    en = 0;
    repeat (W + 3) @(negedge clk);
    checks++;
    if (steps - s0 != 40) begin failures++; $display("FAIL rate: %0d steps", steps - s0); end
    checks++;
    if (period != 21) begin failures++; $display("FAIL period %0d, expected 21", period); end
    repeat (30) begin
      @(negedge clk);
      checks++;
      if (q !== model) begin failures++; $display("FAIL hold"); end
    end
    repeat (1000) @(negedge clk) en = 1'($urandom);
    en = 0;
    repeat (W + 3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
