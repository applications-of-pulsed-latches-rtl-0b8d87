// bdsr_tb: self-checking test of the BD-PL bidirectional storage register.
//
// A bit-array model shifts right (towards higher indices, din into q[0]) or
// left (towards lower indices, din into q[W-1]). The test runs single shifts
// (en high for one cycle) with random direction and serial input, checking
// that done arrives W+1 cycles after the edge that starts the shift and that q matches the model;
// then bursts with en held high, checking one shift per W+1 cycles; then
// checks that q holds while en is low although din and right toggle.
module bdsr_tb;
  localparam int W = 4;
  logic         clk = 0, rst_n, en, right, din;
  logic [W-1:0] q;
  logic         done;
  logic [W-1:0] model;
  int           checks = 0, failures = 0;
  int           n_right = 0, n_left = 0;

  bdsr #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .right(right), .din(din), .q(q), .done(done)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] shift(input logic [W-1:0] v, input logic r, input logic b);
    return r ? {v[W-2:0], b} : {b, v[W-1:1]};
  endfunction

  task automatic compare(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s t=%0t: q=%b expected %b", what, $time, q, model);
    end
  endtask

  // One shift: en high for a single cycle; done must follow W+1 cycles later.
  task automatic single_shift(input logic r, input logic b);
    int cycles;
    @(negedge clk);
    en = 1; right = r; din = b;
    @(negedge clk);
    en = 0;
    right = 1'($urandom);   // sampled at the start edge: must not matter now
    cycles = 0;
    while (!done && cycles < 50) begin
      @(negedge clk);
      cycles++;
      if (cycles == 1) din = 1'($urandom);   // pulse T has closed
    end
    checks++;
    if (cycles != W + 1) begin
      failures++;
      $display("FAIL latency: done after %0d cycles, expected %0d", cycles, W + 1);
    end
    model = shift(model, r, b);
    if (r) n_right++; else n_left++;
    compare("single shift");
  endtask

  initial begin
    int nd;
    rst_n = 0; en = 0; right = 1; din = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    model = '0;
    compare("reset");
    // fill with ones from the left, then walk them out to the left
    repeat (W) single_shift(1'b1, 1'b1);
    single_shift(1'b0, 1'b0);
    single_shift(1'b1, 1'b0);
    repeat (200) single_shift(1'($urandom), 1'($urandom));
    // Bursts: en held high for K periods with constant direction and input.
    for (int rep = 0; rep < 20; rep++) begin
      int k;
      logic r, b;
      k = $urandom_range(2, 6);
      r = 1'($urandom);
      b = 1'($urandom);
      @(negedge clk);
      en = 1; right = r; din = b;
      nd = 0;
      repeat (k * (W + 1)) begin
        @(negedge clk);
        if (done) nd++;
      end
      en = 0;
      repeat (W + 2) begin
        @(negedge clk);
        if (done) nd++;
      end
      checks++;
      if (nd != k) begin
        failures++;
        $display("FAIL burst: %0d shifts, expected %0d", nd, k);
      end
      repeat (k) model = shift(model, r, b);
      if (r) n_right += k; else n_left += k;
      compare("burst");
    end
    // Hold while disabled.
    repeat (30) begin
      @(negedge clk);
      right = 1'($urandom); din = 1'($urandom);
      compare("hold");
    end
    checks++;
    if (n_right == 0 || n_left == 0) begin
      failures++;
      $display("FAIL: both directions must be exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
