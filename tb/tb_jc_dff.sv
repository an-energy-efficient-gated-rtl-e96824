// tb_jc_dff - self-checking testbench of the stage flip-flop.
//
// Drives random data at a 1 GHz clock and compares q and qn after every
// rising edge with a reference value kept by the testbench. Also pulls the
// active-low reset between clock edges and checks that the outputs clear at
// once, without waiting for an edge, and stay cleared while reset is held.

module tb_jc_dff;
  timeunit 1ns;
  timeprecision 1ps;

  logic ck;
  logic rn;
  logic d  = 1'b0;
  logic q, qn;

  int checks   = 0;
  int failures = 0;
  logic ref_q;

  jc_dff dut (.ck(ck), .rn(rn), .d(d), .q(q), .qn(qn));

  initial ck = 1'b0;
  always #0.5 ck = ~ck;

  task automatic check(input logic exp_q, input string what);
    checks++;
    if (q !== exp_q || qn !== ~exp_q) begin
      failures++;
      $display("FAIL %s: q=%0b qn=%0b expected q=%0b at %0t", what, q, qn, exp_q, $time);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = 1'b0;
    // a real falling edge on reset, so that the asynchronous reset fires
    rn = 1'b1;
    #0.2 rn = 1'b0;
    repeat (3) @(posedge ck);
    #0.1 check(1'b0, "held in reset");
    // ensure a 1 is presented while reset is still low
    d = 1'b1;
    @(posedge ck);
    #0.1 check(1'b0, "edge ignored in reset");
    @(negedge ck) rn = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge ck);
      d = 1'($urandom_range(0, 1));
      ref_q = d;
      @(posedge ck);
      #0.1 check(ref_q, "capture");
      if (n % 50 == 25) begin
        // asynchronous clear between edges
        if (!q) begin
          @(negedge ck) d = 1'b1;
          @(posedge ck);
          #0.1 check(1'b1, "set before clear");
        end
        #0.2 rn = 1'b0;
        #0.01 check(1'b0, "asynchronous clear");
        @(posedge ck);
        #0.1 check(1'b0, "clear held over edge");
        @(negedge ck) rn = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
