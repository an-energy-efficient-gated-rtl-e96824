// jc_dff - storage element of one counter stage.
//
// A rising-edge D flip-flop with an active-low asynchronous reset and both
// output polarities. In silicon this is a master-slave flip-flop built from
// tri-state inverters, inverters, transmission gates and a NAND that forces the
// reset, with the incoming clock CK buffered locally into CLK_B and CLK; at the
// register-transfer level that whole structure reduces to one always_ff.
//
// Interface: ck (clock), rn (reset, low = clear), d; outputs q and qn = ~q.
// Timing: d is captured on the rising edge of ck; rn low forces q = 0 and
// qn = 1 at once, independent of the clock.
//
// The pin set (D, CK, RN, Q, QN) and the clear-to-zero behaviour follow the
// counter's description; the rising active edge is a choice of this design,
// made so that the gated clocks of jc_gated_cell, which idle high, are glitch
// free at the edge that matters.
module jc_dff (
  input  logic ck,
  input  logic rn,
  input  logic d,
  output logic q,
  output logic qn
);

  always_ff @(posedge ck or negedge rn) begin
    if (!rn) q <= 1'b0;
    else     q <= d;
  end

  assign qn = ~q;

endmodule
