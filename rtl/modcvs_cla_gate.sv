// Four-bit carry look-ahead gate in multi-output DCVS logic.
//
// One dynamic gate produces all four carries and their complements. The
// true tree implements C_i = G_i + P_i C_{i-1}; the complement tree uses the
// kill signal N_i instead of G_i: Cbar_i = N_i + P_i Cbar_{i-1}. Both trees
// are a chain P4-P3-P2-P1 above the carry-in transistor (C0, or C0bar), with
// a generate (G_i, or N_i) pull-down at every node of the chain; the node
// above P_i is the dynamic node of carry i, so the four carries share their
// transistors. Because G_i.P_i = 0 and N_i.P_i = 0 the two terms of each
// carry are mutually exclusive, which prevents false discharges of the
// lower nodes. The carry bypass (a four-input domino AND of the P_i)
// shorts the carry-in transistor to the C4/C4bar nodes when all P_i are true.
//
// Interface: clk (low = precharge, high = evaluate); g, n, p = G4..G1,
// N4..N1, P4..P1 (index k is bit k+1); dual-rail carry-in (c0, c0_n);
// dual-rail carries c[3:0] = C4..C1 and c_n[3:0]; byp is the bypass enable
// brought out for observation.
// Timing: combinational in the evaluate phase; all outputs are 0 while clk
// is low. Inputs must be monotonic during evaluate.
// The tree structure, the kill-based complement carry and the bypass follow
// the published gate; the bit indexing and the logic-level modelling of the
// dynamic nodes are this design's own.
module modcvs_cla_gate (
  input  logic       clk,
  input  logic [3:0] g,
  input  logic [3:0] n,
  input  logic [3:0] p,
  input  logic       c0,
  input  logic       c0_n,
  output logic [3:0] c,
  output logic [3:0] c_n,
  output logic       byp
);

  carry_bypass u_bypass (
    .clk (clk),
    .p   (p),
    .byp (byp)
  );

  // Conduction to ground from the node above P_{k+1} (k = 0..3) through the
  // shared chain: either the node's own generate transistor or the chain
  // below it. Index -1 of the chain is the carry-in transistor.
  logic [3:0] path_t, path_f;

  always_comb begin
    logic below_t, below_f;
    below_t = c0;
    below_f = c0_n;
    for (int k = 0; k < 4; k++) begin
      path_t[k] = g[k] | (p[k] & below_t);
      path_f[k] = n[k] | (p[k] & below_f);
      below_t   = path_t[k];
      below_f   = path_f[k];
    end
    // The bypass transistors give the C4 nodes a direct path to the
    // carry-in transistor.
    path_t[3] = path_t[3] | (byp & c0);
    path_f[3] = path_f[3] | (byp & c0_n);
  end

  // Dynamic nodes discharge only during evaluate; the output inverters give
  // the carries.
  assign c   = {4{clk}} & path_t;
  assign c_n = {4{clk}} & path_f;

endmodule
