// pulsed_latch_tb: self-checking test of the pulsed latch.
//
// Checks the asynchronous reset value, transparency while the pulse is high
// (q follows several changes of d), and holding while the pulse is low (d
// toggles, q keeps the value present when the pulse fell). Random d/pulse
// sequences are compared with a reference that stores d at each falling
// pulse. Ends with a TB_RESULT line; a watchdog ends a hung run.
module pulsed_latch_tb;
  logic rst_n, pulse, d, q;
  int   checks = 0, failures = 0;
  logic ref_q;

  pulsed_latch #(.RESET_VALUE(1'b1)) dut (.rst_n(rst_n), .pulse(pulse), .d(d), .q(q));

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; pulse = 0; d = 0;
    #1 check(1'b1, "reset value");
    d = 1; #1 d = 0; #1 check(1'b1, "reset dominates");
    rst_n = 1; #1 check(1'b1, "hold after reset");
    // transparent while pulse high
    pulse = 1; d = 0; #1 check(1'b0, "transparent d=0");
    d = 1; #1 check(1'b1, "transparent d=1");
    d = 0; #1 check(1'b0, "transparent d=0 again");
    pulse = 0; #1 d = 1; #1 check(1'b0, "hold 0 while d=1");
    d = 0; #1 pulse = 1; d = 1; #1 pulse = 0; #1 d = 0; #1 check(1'b1, "hold 1 while d=0");
    // random sequence against a reference model
    ref_q = q;
    repeat (500) begin
      d     = 1'($urandom);
      pulse = 1'($urandom);
      #1;
      if (pulse) ref_q = d;
      check(ref_q, "random");
      pulse = 0;
      #1;
      d = ~d;
      #1 check(ref_q, "random hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
