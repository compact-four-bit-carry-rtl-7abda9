// Four-bit dual-rail carry look-ahead adder in multi-output DCVS logic.
//
// Three kinds of precharged gate, all clocked by the same clk, form one
// domino cascade that evaluates in a single evaluate phase:
//   - four generate/propagate/kill gates (pg_gate) turn the dual-rail
//     operand bits into G_i, N_i, P_i and Pbar_i;
//   - one multi-output look-ahead gate (modcvs_cla_gate) produces all four
//     dual-rail carries C1..C4 from G, N, P and the dual-rail carry-in;
//   - four sum gates (dcvs_sum_xor) give S_i = C_{i-1} xor P_i.
// Only G, N and P (plus the carry-in pair) enter the look-ahead gate; Pbar
// goes to the sum gates only.
//
// Interface: clk (low = precharge, high = evaluate); dual-rail operands
// (a, a_n) and (b, b_n), bit 0 = bit 1 of the paper's numbering; dual-rail
// carry-in (ci, ci_n); dual-rail sum (s, s_n); dual-rail carry-out
// (co, co_n) = C4; byp = the slice's carry bypass enable.
// Timing: all outputs are 0 while clk is low and valid in the same evaluate
// phase in which the inputs are valid (no register stage). Input rails must
// be 0 during precharge and rise at most once during evaluate.
// The choice of gates follows the published adder; the single shared clock,
// the port layout and the rail assertions are this design's own.
module modcvs_cla_adder4
  import modcvs_pkg::*;
(
  input  logic                  clk,
  input  logic [SLICE_BITS-1:0] a,
  input  logic [SLICE_BITS-1:0] a_n,
  input  logic [SLICE_BITS-1:0] b,
  input  logic [SLICE_BITS-1:0] b_n,
  input  logic                  ci,
  input  logic                  ci_n,
  output logic [SLICE_BITS-1:0] s,
  output logic [SLICE_BITS-1:0] s_n,
  output logic                  co,
  output logic                  co_n,
  output logic                  byp
);

  logic [SLICE_BITS-1:0] g, p, p_n, n;
  logic [SLICE_BITS-1:0] c, c_n;          // C4..C1 and complements
  logic [SLICE_BITS-1:0] cin, cin_n;      // C_{i-1} seen by each sum gate

  for (genvar i = 0; i < SLICE_BITS; i++) begin : g_pg
    pg_gate u_pg (
      .clk (clk),
      .a   (a[i]),
      .a_n (a_n[i]),
      .b   (b[i]),
      .b_n (b_n[i]),
      .g   (g[i]),
      .p   (p[i]),
      .p_n (p_n[i]),
      .n   (n[i])
    );
  end

  modcvs_cla_gate u_cla (
    .clk  (clk),
    .g    (g),
    .n    (n),
    .p    (p),
    .c0   (ci),
    .c0_n (ci_n),
    .c    (c),
    .c_n  (c_n),
    .byp  (byp)
  );

  assign cin   = {c[SLICE_BITS-2:0],   ci};
  assign cin_n = {c_n[SLICE_BITS-2:0], ci_n};

  for (genvar i = 0; i < SLICE_BITS; i++) begin : g_sum
    dcvs_sum_xor u_sum (
      .clk (clk),
      .p   (p[i]),
      .p_n (p_n[i]),
      .c   (cin[i]),
      .c_n (cin_n[i]),
      .s   (s[i]),
      .s_n (s_n[i])
    );
  end

  assign co   = c[SLICE_BITS-1];
  assign co_n = c_n[SLICE_BITS-1];

  // Dual-rail discipline: no carry or sum pair may have both rails high.
  always_comb begin
    for (int i = 0; i < SLICE_BITS; i++) begin
      assert (rails_exclusive(c[i], c_n[i]))
        else $error("carry %0d rails high together", i + 1);
      assert (rails_exclusive(s[i], s_n[i]))
        else $error("sum %0d rails high together", i);
    end
  end

endmodule
