// tb_jc_gated_cell - self-checking testbench of one gated counter stage.
//
// Inputs d and ddr_en change shortly after each rising clock edge, as they
// do inside the counter. For every clock period the testbench works out
// whether the stage must be clocked (ddr_en = 0: d = 1 and q = 0, the NAND
// path; ddr_en = 1: d = 0 and q = 1, the OR path) and checks:
//   - gclk is high through the whole high phase of clk (no glitch while the
//     inputs change) and follows clk in the low phase only when enabled,
//   - gclk has exactly one rising edge in an enabled period and none in a
//     gated one, and that edge coincides with the rising edge of clk,
//   - q takes d at an enabled edge and holds otherwise, with q_n = ~q.
// Both clock paths and both transitions are counted and must each occur.

module tb_jc_gated_cell;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk;
  logic clear_n;
  logic d       = 1'b0;
  logic ddr_en  = 1'b0;
  logic q, q_n, gclk;

  int checks   = 0;
  int failures = 0;
  int gclk_edges = 0;
  int n_nand_steps = 0, n_or_steps = 0, n_gated = 0;
  realtime last_clk_rise = 0.0;

  jc_gated_cell dut (
    .clk(clk), .clear_n(clear_n), .d(d), .ddr_en(ddr_en),
    .q(q), .q_n(q_n), .gclk(gclk)
  );

  initial clk = 1'b0;
  always #0.5 clk = ~clk;

  always @(posedge clk) last_clk_rise = $realtime;

  always @(posedge gclk) begin
    gclk_edges++;
    if (clear_n) begin
      checks++;
      if ($realtime != last_clk_rise) begin
        failures++;
        $display("FAIL gclk edge at %0t not on a clk edge", $realtime);
      end
    end
  end

  task automatic expect_true(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t (d=%0b ddr_en=%0b q=%0b gclk=%0b)", what, $time, d, ddr_en, q, gclk);
    end
  endtask

  initial begin
    #50000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic en, q_before;
    int   edges_before;
    // a real falling edge on clear, so that the asynchronous clear fires
    clear_n = 1'b1;
    #0.2 clear_n = 1'b0;
    repeat (2) @(posedge clk);
    #0.1 expect_true(q == 1'b0 && q_n == 1'b1, "cleared");
    @(negedge clk) clear_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      // change inputs just after the rising edge, while clk is high
      #0.05;
      if (n % 4 == 0) begin
        // bias towards the enabling combinations
        ddr_en = q;
        d      = ~q;
      end else begin
        ddr_en = 1'($urandom_range(0, 1));
        d      = 1'($urandom_range(0, 1));
      end
      #0.1 expect_true(gclk == 1'b1, "gclk high while clk high");
      en = ddr_en ? (!d && q) : (d && !q);
      @(negedge clk);
      #0.1 expect_true(gclk == !en, "gclk in low phase");
      q_before     = q;
      edges_before = gclk_edges;
      @(posedge clk);
      #0.1;
      expect_true(gclk_edges - edges_before == (en ? 1 : 0), "one gclk edge per enabled period");
      expect_true(q == (en ? d : q_before), "q update");
      expect_true(q_n == ~q, "q_n complement");
      if (en && !ddr_en) n_nand_steps++;
      else if (en)       n_or_steps++;
      else               n_gated++;
    end
    checks++;
    if (n_nand_steps == 0 || n_or_steps == 0 || n_gated == 0) begin
      failures++;
      $display("FAIL mechanism missing: nand=%0d or=%0d gated=%0d", n_nand_steps, n_or_steps, n_gated);
    end
    $display("mechanisms: NAND-path steps=%0d OR-path steps=%0d gated periods=%0d",
             n_nand_steps, n_or_steps, n_gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
