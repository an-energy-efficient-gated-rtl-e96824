// tb_jc_res_check - checker used by tb_counter_resolutions: runs one counter
// of N_BITS resolution (2**(N_BITS-1) stages) through two full count cycles
// on its own 1 GHz clock and compares every step with a reference count.
// Per step it checks the thermometer code, that exactly one stage received a
// gated-clock edge, and it checks the full cycle length of 2**N_BITS clocks.
// Reports its totals on checks/failures and raises done when finished.
module tb_jc_res_check #(
  parameter int unsigned N_BITS = 5
) (
  output logic done,
  output int   checks,
  output int   failures
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N_CELLS  = 2 ** (N_BITS - 1);
  localparam int N_STATES = 2 * N_CELLS;

  logic clk;
  logic clear_n;
  logic [N_CELLS-1:0] j, gclk;
  int   edges [N_CELLS];

  gated_johnson_counter #(.N_BITS(N_BITS)) dut (
    .clk(clk), .clear_n(clear_n), .j(j), .gclk(gclk)
  );

  initial clk = 1'b0;
  always #0.5 clk = ~clk;

  for (genvar i = 0; i < N_CELLS; i++) begin : g_edge
    initial edges[i] = 0;
    always @(posedge gclk[i]) edges[i]++;
  end

  function automatic logic [N_CELLS-1:0] therm(input int cnt);
    logic [N_CELLS-1:0] v = '0;
    for (int b = 0; b < N_CELLS; b++)
      v[b] = (cnt <= N_CELLS) ? (b < cnt) : (b >= cnt - N_CELLS);
    return v;
  endfunction

  initial begin
    int k, total, prev_total, zero_seen;
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    clear_n  = 1'b1;
    #0.2 clear_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) clear_n = 1'b1;
    k = 0;
    zero_seen = 0;
    prev_total = 0;
    for (int i = 0; i < N_CELLS; i++) prev_total += edges[i];
    for (int s = 1; s <= 2 * N_STATES; s++) begin
      @(posedge clk);
      #0.1;
      k = (k + 1) % N_STATES;
      total = 0;
      for (int i = 0; i < N_CELLS; i++) total += edges[i];
      checks += 2;
      if (total - prev_total != 1) begin
        failures++;
        $display("FAIL N_BITS=%0d step %0d: %0d stages clocked", N_BITS, s, total - prev_total);
      end
      if (j !== therm(k)) begin
        failures++;
        $display("FAIL N_BITS=%0d step %0d: j=%b expected %b", N_BITS, s, j, therm(k));
      end
      if (j == '0) begin
        checks++;
        if (s != (zero_seen + 1) * N_STATES) begin
          failures++;
          $display("FAIL N_BITS=%0d: back at zero after %0d steps", N_BITS, s);
        end
        zero_seen++;
      end
      prev_total = total;
    end
    checks++;
    if (zero_seen != 2) begin
      failures++;
      $display("FAIL N_BITS=%0d: %0d full cycles instead of 2", N_BITS, zero_seen);
    end
    $display("N_BITS=%0d (%0d stages, %0d states): %0d steps, one stage clocked per step",
             N_BITS, N_CELLS, N_STATES, 2 * N_STATES);
    done = 1'b1;
  end

endmodule
