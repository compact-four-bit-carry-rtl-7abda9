// Wide dual-rail adder made of four-bit MODCVS look-ahead slices in series.
//
// NSLICES four-bit adders (modcvs_cla_adder4) are chained: the dual-rail
// carry-out C4/C4bar of slice k drives the carry-in C0/C0bar of slice k+1.
// All slices share clk, so the whole adder is one domino cascade that
// evaluates in a single evaluate phase. Inside each slice the generate,
// propagate and kill signals are formed in parallel, and a slice whose four
// propagate signals are all true passes its carry-in straight to its
// carry-out through the bypass, so the worst-case carry (a carry rippling
// through all 32 bits) crosses one bypass per slice.
//
// Interface: clk (low = precharge, high = evaluate); dual-rail operands
// (a, a_n), (b, b_n) of WIDTH = 4*NSLICES bits; dual-rail carry-in (ci,
// ci_n); dual-rail sum (s, s_n) and carry-out (co, co_n); byp[k] = bypass
// enable of slice k.
// Timing: outputs are 0 while clk is low and valid in the evaluate phase in
// which the inputs are valid.
// The default of 8 slices gives the 32-bit adder; the series connection of
// slices follows the text, the port layout is this design's own.
module modcvs_cla_adder32
  import modcvs_pkg::*;
#(
  parameter int unsigned NSLICES = WIDE_SLICES,
  localparam int unsigned WIDTH  = NSLICES * SLICE_BITS
) (
  input  logic               clk,
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   a_n,
  input  logic [WIDTH-1:0]   b,
  input  logic [WIDTH-1:0]   b_n,
  input  logic               ci,
  input  logic               ci_n,
  output logic [WIDTH-1:0]   s,
  output logic [WIDTH-1:0]   s_n,
  output logic               co,
  output logic               co_n,
  output logic [NSLICES-1:0] byp
);

  // Dual-rail carry between slices: index k is the carry into slice k.
  logic [NSLICES:0] c, c_n;

  assign c[0]   = ci;
  assign c_n[0] = ci_n;

  for (genvar k = 0; k < NSLICES; k++) begin : g_slice
    localparam int unsigned LO = k * SLICE_BITS;
    modcvs_cla_adder4 u_add (
      .clk  (clk),
      .a    (a  [LO +: SLICE_BITS]),
      .a_n  (a_n[LO +: SLICE_BITS]),
      .b    (b  [LO +: SLICE_BITS]),
      .b_n  (b_n[LO +: SLICE_BITS]),
      .ci   (c[k]),
      .ci_n (c_n[k]),
      .s    (s  [LO +: SLICE_BITS]),
      .s_n  (s_n[LO +: SLICE_BITS]),
      .co   (c[k+1]),
      .co_n (c_n[k+1]),
      .byp  (byp[k])
    );
  end

  assign co   = c[NSLICES];
  assign co_n = c_n[NSLICES];

  // Dual-rail discipline of the carry-out.
  always_comb begin
    assert (rails_exclusive(co, co_n))
      else $error("carry-out rails high together");
  end

endmodule
