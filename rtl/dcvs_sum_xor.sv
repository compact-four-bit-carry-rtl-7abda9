// Dual-rail sum gate (DCVS exclusive-OR) of one bit position.
//
// Two cross-coupled precharged trees over one clocked foot transistor: one
// branch pair is selected by P_i, the other by Pbar_i, and each is split by
// the dual-rail carry C_{i-1} / Cbar_{i-1}. The node feeding the S_i
// inverter discharges for P_i.Cbar_{i-1} + Pbar_i.C_{i-1}, the node feeding
// the Sbar_i inverter for P_i.C_{i-1} + Pbar_i.Cbar_{i-1}, giving
// S_i = C_{i-1} xor P_i.
//
// Interface: clk (low = precharge, high = evaluate); dual-rail propagate
// (p, p_n) and carry-in (c, c_n); dual-rail sum (s, s_n).
// Timing: combinational in the evaluate phase, both rails 0 while clk is low.
// The gate's inputs, outputs and function follow the published circuit; the
// node functions are written from the sum equation rather than traced
// transistor by transistor.
module dcvs_sum_xor (
  input  logic clk,
  input  logic p,
  input  logic p_n,
  input  logic c,
  input  logic c_n,
  output logic s,
  output logic s_n
);

  logic node_s, node_sn;   // dynamic nodes, 0 when discharged

  assign node_s  = !(clk & ((p & c_n) | (p_n & c)));
  assign node_sn = !(clk & ((p & c)   | (p_n & c_n)));

  assign s   = !node_s;
  assign s_n = !node_sn;

endmodule
