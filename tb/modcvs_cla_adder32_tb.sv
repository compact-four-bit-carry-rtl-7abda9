// End-to-end testbench of modcvs_cla_adder32 at its default size (32 bits,
// eight four-bit slices in series).
// Each operation takes one clock cycle: all input rails low in precharge,
// then the dual-rail operands and carry-in rise in evaluate. Within that
// same evaluate phase the sum and carry-out rails are compared with the
// integer sum a + b + ci and its complement, and each slice's bypass enable
// with "all four propagate bits of the slice true"; in precharge every
// output must be 0. The vectors are the worst-case carry operands
// (A = FFFFFFFF, B = 0, carry-in 0 and 1), patterns that make each slice
// generate, kill or propagate, and random operands. The testbench counts how
// often each mechanism happened (bypass in every slice, a carry into every
// slice, a carry through all 32 bits, carry-out, precharge) and fails if one
// never did.
module modcvs_cla_adder32_tb;

  localparam int unsigned W = 32;
  localparam int unsigned K = W / 4;
  localparam int unsigned NRANDOM = 4000;

  logic         clk = 1'b0;
  logic [W-1:0] a, a_n, b, b_n;
  logic         ci, ci_n;
  logic [W-1:0] s, s_n;
  logic         co, co_n;
  logic [K-1:0] byp;

  int checks = 0, failures = 0, cycles = 0;
  int bypass_seen [K];
  int carry_into  [K];
  int full_ripple = 0, carry_out_seen = 0, precharge_seen = 0;

  modcvs_cla_adder32 dut (.*);

  task automatic check(input string what, input logic [W:0] got, input logic [W:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic add(input logic [W-1:0] av, input logic [W-1:0] bv, input logic cv);
    logic [W:0]   sum;
    logic [K-1:0] exp_byp;
    logic [W-1:0] carries;
    // precharge
    clk = 1'b0; {a, a_n, b, b_n, ci, ci_n} = '0;
    #5;
    check("precharge s/co", {co, s}, '0);
    check("precharge s_n/co_n", {co_n, s_n}, '0);
    check("precharge byp", (W+1)'(byp), '0);
    precharge_seen++;
    // evaluate
    clk = 1'b1;
    #1 {a, a_n, b, b_n, ci, ci_n} = {av, ~av, bv, ~bv, cv, !cv};
    #4;
    cycles++;
    sum     = (W+1)'(av) + (W+1)'(bv) + (W+1)'(cv);
    carries = sum[W-1:0] ^ av ^ bv;          // carry into each bit position
    for (int k = 0; k < K; k++) begin
      exp_byp[k] = ((av ^ bv) >> (4 * k)) % 16 == 15;
      if (byp[k]) bypass_seen[k]++;
      if (carries[4 * k]) carry_into[k]++;
    end
    check($sformatf("sum %h+%h+%0b", av, bv, cv), {co, s}, sum);
    check($sformatf("sum_n %h+%h+%0b", av, bv, cv), {co_n, s_n}, ~sum);
    check($sformatf("byp %h^%h", av, bv), (W+1)'(byp), (W+1)'(exp_byp));
    if (co) carry_out_seen++;
    if (cv && (av ^ bv) == '1 && co) full_ripple++;
  endtask

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    #((NRANDOM + 200) * 10);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (bypass_seen[k]) begin bypass_seen[k] = 0; carry_into[k] = 0; end
    // worst-case carry operands
    add('1, '0, 1'b0);
    add('1, '0, 1'b1);
    add('0, '1, 1'b1);
    // corner cases: all generate, all kill, carry-out with zero sum
    add('1, '1, 1'b0);
    add('1, '1, 1'b1);
    add('0, '0, 1'b0);
    add('0, '0, 1'b1);
    add(32'h8000_0000, 32'h8000_0000, 1'b0);
    // one generating bit below a propagating run, for every position
    for (int i = 0; i < W; i++)
      add(W'('1) << i, W'(1) << i, 1'b0);
    // one propagating slice at a time, fed a carry by the slice below
    for (int k = 1; k < K; k++)
      add((32'hF << (4 * k)) | 32'h8, 32'h8, 1'b0);
    for (int r = 0; r < NRANDOM; r++)
      add($urandom, $urandom, 1'($urandom));

    for (int k = 0; k < K; k++) begin
      need($sformatf("bypass in slice %0d", k), bypass_seen[k]);
      need($sformatf("carry into slice %0d", k), carry_into[k]);
    end
    need("carry through all bits", full_ripple);
    need("carry-out", carry_out_seen);
    need("precharge", precharge_seen);
    $display("mechanisms: full ripple %0d, carry-out %0d, precharge %0d, operations %0d",
             full_ripple, carry_out_seen, precharge_seen, cycles);
    for (int k = 0; k < K; k++)
      $display("  slice %0d: bypass %0d, carry in %0d", k, bypass_seen[k], carry_into[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
