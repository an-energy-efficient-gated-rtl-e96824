// tb_gated_johnson_counter - end-to-end test of the counter at its default
// size (5 bits, 16 stages) and a 1 GHz count clock.
//
// A reference count k (0 .. 31) is kept by the testbench and turned into the
// expected thermometer code independently of the design. At every clock step
// the testbench checks:
//   - j equals the code of k,
//   - exactly one stage received a gated-clock edge, on the clk edge (the
//     redundant clocking of the other 15 stages is gone),
//   - the clocked stage is the one the count step changes.
// It also measures the cycle counts: the ones phase lasts N_CELLS clocks and
// one full count cycle 2*N_CELLS clocks. Counted mechanisms, each of which
// must occur: clear, ones fed through the NAND path, zeroes fed through the
// OR path, overflow (the last stage fills and the path select switches to
// the OR path), wrap-around (the last stage empties and the select goes
// back), and an asynchronous clear in the middle of a count.
module tb_gated_johnson_counter;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N_CELLS = 16;
  localparam int N_STATES = 2 * N_CELLS;

  logic clk;
  logic clear_n;
  logic [N_CELLS-1:0] j, gclk;

  gated_johnson_counter dut (.clk(clk), .clear_n(clear_n), .j(j), .gclk(gclk));

  int checks = 0, failures = 0;
  int k = 0;                       // reference count
  int edges [N_CELLS];
  realtime last_clk_rise = 0.0;
  int n_clear = 0, n_ones = 0, n_zeroes = 0, n_overflow = 0, n_wrap = 0, n_async_clear = 0;
  int step = 0, last_overflow_step = -1, last_wrap_step = -1;

  initial clk = 1'b0;
  always #0.5 clk = ~clk;
  always @(posedge clk) last_clk_rise = $realtime;

  for (genvar i = 0; i < N_CELLS; i++) begin : g_edge
    initial edges[i] = 0;
    always @(posedge gclk[i]) begin
      edges[i]++;
      if (clear_n && $realtime != last_clk_rise) begin
        failures++;
        $display("FAIL gclk[%0d] edge at %0t is not on a clk edge", i, $realtime);
      end
    end
  end

  function automatic logic [N_CELLS-1:0] therm(input int cnt);
    logic [N_CELLS-1:0] v = '0;
    for (int b = 0; b < N_CELLS; b++)
      v[b] = (cnt <= N_CELLS) ? (b < cnt) : (b >= cnt - N_CELLS);
    return v;
  endfunction

  task automatic expect_eq(input logic [N_CELLS-1:0] got, input logic [N_CELLS-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (k=%0d) at %0t", what, got, exp, k, $time);
    end
  endtask

  task automatic expect_true(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (k=%0d) at %0t", what, k, $time);
    end
  endtask

  // one count step: rising edge, then checks in the following high phase
  task automatic count_step();
    int edges_before [N_CELLS];
    int total, which;
    logic sel_before;
    int k_next;
    // called after a rising edge or in a low phase: snapshot, then next edge
    for (int i = 0; i < N_CELLS; i++) edges_before[i] = edges[i];
    sel_before = j[N_CELLS-1];
    @(posedge clk);
    #0.1;
    step++;
    total = 0;
    which = -1;
    for (int i = 0; i < N_CELLS; i++) begin
      total += edges[i] - edges_before[i];
      if (edges[i] != edges_before[i]) which = i;
    end
    k_next = (k + 1) % N_STATES;
    expect_true(total == 1, $sformatf("exactly one stage clocked (got %0d)", total));
    expect_true(which == (k % N_CELLS), $sformatf("clocked stage %0d", which));
    if (!sel_before) n_ones++; else n_zeroes++;
    k = k_next;
    expect_eq(j, therm(k), "count");
    if (!sel_before && j[N_CELLS-1]) begin
      n_overflow++;
      if (last_overflow_step >= 0)
        expect_true(step - last_overflow_step == N_STATES, "overflow period");
      last_overflow_step = step;
      if (last_wrap_step >= 0)
        expect_true(step - last_wrap_step == N_CELLS, "ones phase length");
    end
    if (sel_before && !j[N_CELLS-1]) begin
      n_wrap++;
      if (last_wrap_step >= 0)
        expect_true(step - last_wrap_step == N_STATES, "full cycle length");
      last_wrap_step = step;
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
    // a real falling edge on clear, so that the asynchronous clear fires
    clear_n = 1'b1;
    #0.2 clear_n = 1'b0;
    repeat (3) @(posedge clk);
    #0.1 expect_eq(j, '0, "cleared");
    n_clear++;
    @(negedge clk) clear_n = 1'b1;
    k = 0;
    last_wrap_step = 0;   // the cleared state starts a cycle
    repeat (3 * N_STATES) count_step();
    expect_eq(j, '0, "back to zero after three cycles");
    // run into the zeroes phase and clear asynchronously in mid-count
    repeat (N_CELLS + 5) count_step();
    #0.2 clear_n = 1'b0;
    #0.01 expect_eq(j, '0, "asynchronous clear");
    n_async_clear++;
    n_clear++;
    @(posedge clk);
    #0.1 expect_eq(j, '0, "clear held over edge");
    @(negedge clk) clear_n = 1'b1;
    k = 0;
    step = 0;
    last_overflow_step = -1;
    last_wrap_step = 0;
    repeat (N_STATES + 3) count_step();

    $display("mechanisms: clear=%0d async_clear=%0d ones_steps=%0d zeroes_steps=%0d overflow=%0d wrap=%0d",
             n_clear, n_async_clear, n_ones, n_zeroes, n_overflow, n_wrap);
    checks++;
    if (n_clear == 0 || n_async_clear == 0 || n_ones == 0 || n_zeroes == 0 ||
        n_overflow == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
