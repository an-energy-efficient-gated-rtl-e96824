// gated_johnson_counter - 5-bit clock-gated Johnson (twisted-ring) counter.
//
// N_CELLS = 2**(N_BITS-1) jc_gated_cell stages are chained: stage i takes the
// q of stage i-1, and stage 0 takes the inverted output of the last stage.
// The q of the last stage also drives the ddr_en input of every stage. After
// clear all stages are 0 and ddr_en = 0: ones are fed in through the NAND
// gating path, one stage per clock. When the last stage fills (overflow),
// ddr_en rises, the OR path takes over and zeroes are fed in until the last
// stage empties again. One full cycle therefore has 2*N_CELLS = 2**N_BITS
// states, which is why a chain of 16 stages gives 5 bits of resolution.
// Because each stage's clock is gated by its own data, exactly one stage
// receives a clock edge per count step, whatever the resolution.
//
// Interface: clk (count clock), clear_n (low = asynchronous clear of all
// stages); outputs j (thermometer code J0..J(N_CELLS-1)) and gclk (the local
// clock of every stage, for observation).
// Timing: the count advances by one state on every rising edge of clk while
// clear_n is high; the output of a stage changes right after that edge.
// j encodes the count k (0 .. 2*N_CELLS-1) as: k <= N_CELLS -> the lowest k
// bits are 1; k > N_CELLS -> the lowest k-N_CELLS bits are 0, the rest 1.
//
// The chain, the feedback, the clock-path select taken from the last stage
// and the 16-stage / 5-bit default follow the counter's description; no
// binary decoding of the thermometer code is part of it.
//
// clear_n is used only as an asynchronous clear in the circuit; its one
// synchronous-looking use is the "disable iff" of the state assertion below,
// which lint tools may report as a net used both ways.
module gated_johnson_counter #(
  parameter  int unsigned N_BITS  = 5,
  localparam int unsigned N_CELLS = 2 ** (N_BITS - 1)
) (
  input  logic               clk,
  input  logic               clear_n,
  output logic [N_CELLS-1:0] j,
  output logic [N_CELLS-1:0] gclk
);

  if (N_BITS < 2) begin : g_bad_size
    $error("gated_johnson_counter: N_BITS must be at least 2");
  end

  logic [N_CELLS-1:0] q_n;
  logic [N_CELLS-1:0] d;
  logic               ddr_en;

  assign ddr_en = j[N_CELLS-1];
  assign d      = {j[N_CELLS-2:0], q_n[N_CELLS-1]};

  // In every legal Johnson state exactly one stage holds a value different
  // from its input: the one stage the gating lets the clock reach.
  a_one_stage_enabled : assert property (
    @(posedge clk) disable iff (!clear_n) $onehot(d ^ j)
  ) else $error("gated_johnson_counter: illegal state %b", j);

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    jc_gated_cell u_cell (
      .clk     (clk),
      .clear_n (clear_n),
      .d       (d[i]),
      .ddr_en  (ddr_en),
      .q       (j[i]),
      .q_n     (q_n[i]),
      .gclk    (gclk[i])
    );
  end

endmodule
