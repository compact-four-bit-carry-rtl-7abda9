// Reduced carry propagation circuit of the four-bit look-ahead gate.
//
// A four-input dynamic AND (domino) gate: a precharged node with the series
// chain P4.P3.P2.P1 above the clocked foot; its output inverter drives the
// gates of the two bypass transistors of the look-ahead gate. When all four
// propagate signals are true the bypass joins the carry-in transistor
// directly to the C4 and C4bar output nodes, so the carry into a slice
// reaches its carry-out without passing through the four-transistor
// propagate chain. This speeds the carry through slices in series.
//
// Interface: clk (low = precharge, high = evaluate), p[3:0] = P4..P1 (bit k
// is P_{k+1}); byp is high when all four are true during evaluate.
// Timing: combinational in the evaluate phase, 0 while clk is low.
// The four-input domino AND and its role follow the published circuit; where
// exactly the bypass transistors attach (carry-in transistor to the C4 nodes)
// and bringing the enable out as a port are this design's choices.
module carry_bypass (
  input  logic       clk,
  input  logic [3:0] p,
  output logic       byp
);

  logic node;   // dynamic node, 0 when discharged

  assign node = !(clk & p[3] & p[2] & p[1] & p[0]);
  assign byp  = !node;

endmodule
