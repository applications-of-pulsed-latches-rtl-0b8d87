// ring_counter_tb: self-checking test of the pulsed-latch ring counter.
//
// Two instances run side by side: one with the default single token and one
// started from an arbitrary pattern, which shows that the ring rotates any
// contents and loses no bit at the wrap from the last latch back to the first.
// After every done strobe both outputs are compared with a rotate-by-one
// model. It also checks the single-step latency (done W+1 cycles after the
// start edge), the rate with en held high (one step per W+1 cycles), that the
// token returns to latch 1 after W steps, and that the counter holds while en
// is low.
module ring_counter_tb;
  localparam int            W    = 8;
  localparam logic [W-1:0]  PATT = 8'b1011_0010;
  logic         clk = 0, rst_n, en;
  logic [W-1:0] q, q2;
  logic         done, done2;
  logic [W-1:0] model, model2;
  int           checks = 0, failures = 0, steps = 0, wraps = 0;

  ring_counter dut (.clk(clk), .rst_n(rst_n), .en(en), .q(q), .done(done));
  ring_counter #(.WIDTH(W), .INIT(PATT)) dut2 (.clk(clk), .rst_n(rst_n), .en(en), .q(q2), .done(done2));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Rotate: latch k+1 takes latch k, latch 1 takes latch W.
  function automatic logic [W-1:0] rot(input logic [W-1:0] v);
    return {v[W-2:0], v[W-1]};
  endfunction

  always @(negedge clk) begin
    if (rst_n && done) begin
      if (model[W-1]) wraps++;
      model  = rot(model);
      model2 = rot(model2);
      steps++;
      checks++;
      if (q !== model || q2 !== model2 || done2 !== done) begin
        failures++;
        $display("FAIL step %0d: q=%b exp %b, q2=%b exp %b", steps, q, model, q2, model2);
      end
    end
  end

  initial begin
    int cycles, s0;
    rst_n = 0; en = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    model = 8'b0000_0001; model2 = PATT;
    checks++;
    if (q !== model || q2 !== model2) begin
      failures++;
      $display("FAIL reset: q=%b q2=%b", q, q2);
    end
    // single step latency
    en = 1;
    @(negedge clk) en = 0;
    cycles = 0;
    while (!done && cycles < 50) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != W + 1) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycles, W + 1);
    end
    @(negedge clk);
    // rate: 3 full turns with en held high
    s0 = steps;
    en = 1;
    repeat (3 * W * (W + 1) - 1) @(negedge clk);
    en = 0;
    repeat (W + 3) @(negedge clk);
    checks++;
    if (steps - s0 != 3 * W) begin
      failures++;
      $display("FAIL rate: %0d steps, expected %0d", steps - s0, 3 * W);
    end
    checks++;
    if (q !== 8'b0000_0010) begin
      failures++;
      $display("FAIL token position after 1 + 3*W steps: %b", q);
    end
    // hold
    repeat (40) begin
      @(negedge clk);
      checks++;
      if (q !== model) begin failures++; $display("FAIL hold"); end
    end
    // random enables
    repeat (1000) @(negedge clk) en = 1'($urandom);
    en = 0;
    repeat (W + 3) @(negedge clk);
    checks++;
    if (wraps < 3) begin
      failures++;
      $display("FAIL: wrap from latch %0d to latch 1 seen only %0d times", W, wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
