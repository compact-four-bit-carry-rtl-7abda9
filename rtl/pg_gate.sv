// Generate / propagate / kill gate for one bit position of the dual-rail adder.
//
// A dynamic DCVS gate with three precharged nodes sharing one clocked foot
// transistor. In the evaluate phase the node under the series pair A_i.B_i
// discharges when both operand bits are 1 (generate G_i), the node under
// Abar_i.Bbar_i discharges when both are 0 (kill N_i), and the node under the
// cross-coupled A/Abar, B/Bbar branches discharges when the bits differ
// (propagate P_i). G_i, N_i and P_i are the inverted nodes; Pbar_i is the
// NAND of the G and N nodes, i.e. G_i + N_i, so no fourth tree is needed.
//
// Interface: clk (low = precharge, high = evaluate), dual-rail operand bit
// (a, a_n) and (b, b_n); outputs g, p, p_n, n.
// Timing: combinational within the evaluate phase; all outputs are 0 while
// clk is low. Exactly one of g, n, p is high in evaluate, and p_n = !p.
//
// The node functions and the NAND for Pbar_i follow the gate's structure; the
// kill signal is N_i = Abar_i.Bbar_i, the reading under which the look-ahead
// equations hold (N_i.P_i = 0). Operand rails are assumed to be monotonic
// during evaluate, as in any domino cascade, so the dynamic nodes are
// modelled by their logic functions.
module pg_gate (
  input  logic clk,
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  output logic g,
  output logic p,
  output logic p_n,
  output logic n
);

  // Dynamic nodes: 1 = still precharged, 0 = discharged.
  logic node_g, node_n, node_p;

  always_comb begin
    node_g = !(clk & a   & b);
    node_n = !(clk & a_n & b_n);
    node_p = !(clk & ((a_n & b) | (a & b_n)));
  end

  // Output inverters and the NAND forming Pbar_i.
  assign g   = !node_g;
  assign n   = !node_n;
  assign p   = !node_p;
  assign p_n = !(node_g & node_n);

endmodule
