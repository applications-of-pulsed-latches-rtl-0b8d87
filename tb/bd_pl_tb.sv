// bd_pl_tb: self-checking test of the bidirectional pulsed latch.
//
// Checks the reset value, that a CLK_R pulse loads DR and a CLK_L pulse loads
// DL (each while the other input carries the opposite value), that the latch
// holds when neither pulse is high, and that QR and QL always carry the same
// stored bit. A random sequence is compared with a reference model.
module bd_pl_tb;
  logic rst_n, clk_r, clk_l, dr, dl, qr, ql;
  int   checks = 0, failures = 0;
  logic ref_q;

  bd_pl dut (.rst_n(rst_n), .clk_r(clk_r), .clk_l(clk_l), .dr(dr), .dl(dl), .qr(qr), .ql(ql));

  task automatic check(input logic exp, input string what);
    checks++;
    if (qr !== exp || ql !== exp) begin
      failures++;
      $display("FAIL %s: qr=%b ql=%b expected %b", what, qr, ql, exp);
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
    rst_n = 0; clk_r = 0; clk_l = 0; dr = 1; dl = 1;
    #1 check(1'b0, "reset");
    rst_n = 1; #1 check(1'b0, "hold after reset");
    dr = 1; dl = 0; clk_r = 1; #1 clk_r = 0; #1 check(1'b1, "CLK_R loads DR=1");
    dr = 0; dl = 1; #1 check(1'b1, "hold");
    dr = 1; dl = 0; clk_l = 1; #1 clk_l = 0; #1 check(1'b0, "CLK_L loads DL=0");
    dr = 0; dl = 1; clk_l = 1; #1 clk_l = 0; #1 check(1'b1, "CLK_L loads DL=1");
    dr = 1; dl = 0; #1 check(1'b1, "hold 1");
    dr = 0; dl = 1; clk_r = 1; #1 clk_r = 0; #1 check(1'b0, "CLK_R loads DR=0");
    ref_q = 1'b0;
    repeat (500) begin
      dr = 1'($urandom);
      dl = 1'($urandom);
      case ($urandom_range(2))
        0: begin clk_r = 1; ref_q = dr; end
        1: begin clk_l = 1; ref_q = dl; end
        default: ;
      endcase
      #1 check(ref_q, "random open");
      clk_r = 0; clk_l = 0;
      #1 dr = ~dr; dl = ~dl;
      #1 check(ref_q, "random hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
