// jc_gated_cell - one stage of the clock-gated Johnson counter.
//
// Each stage stores one bit of the thermometer code in a jc_dff and makes its
// own local clock gclk from the main clock, so that a stage whose next value
// equals its present value sees no clock edge at all. Two gating paths exist,
// one for each half of the Johnson cycle:
//   Y (NAND path, ddr_en = 0, ones are being fed):
//       y = ~(clk_n & d & q_n)  -> follows clk only while d = 1 and q = 0
//   X (OR path,   ddr_en = 1, zeroes are being fed):
//       x = clk | d | q_n       -> follows clk only while d = 0 and q = 1
// A multiplexer driven by ddr_en hands one of them to the flip-flop as gclk.
// The NAND path receives the inverted clock, so both paths carry the clock in
// the same polarity, and both are forced high while clk is high. Data, q and
// ddr_en only change just after a rising clock edge, i.e. while clk is high,
// so neither the enables nor the path switch can glitch gclk.
//
// Interface: clk, clear_n (low = asynchronous clear, q = 0, q_n = 1), d (bit
// from the previous stage), ddr_en (path select, the last stage's q in the
// counter); outputs q, q_n and gclk (observable local clock).
// Timing: when enabled, q takes d at the rising edge of clk; otherwise q
// holds and gclk stays high for the whole clock period.
//
// The OR, NAND and MUX structure, the inverted clock on the NAND path, the
// select signal and the three inputs of the gating logic (clock, d and q_n)
// follow the counter's description. Combining d and q_n in three-input gates
// so that exactly the stage that changes is clocked is this design's reading.
module jc_gated_cell (
  input  logic clk,
  input  logic clear_n,
  input  logic d,
  input  logic ddr_en,
  output logic q,
  output logic q_n,
  output logic gclk
);

  logic clk_n;
  logic x;  // OR path: clock for 1 -> 0 transitions
  logic y;  // NAND path: clock for 0 -> 1 transitions

  always_comb begin
    clk_n = ~clk;
    x     = clk | d | q_n;
    y     = ~(clk_n & d & q_n);
    gclk  = ddr_en ? x : y;
  end

  jc_dff u_dff (
    .ck (gclk),
    .rn (clear_n),
    .d  (d),
    .q  (q),
    .qn (q_n)
  );

endmodule
