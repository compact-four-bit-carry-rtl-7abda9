// Self-checking testbench of modcvs_cla_adder4.
// Exhaustive: every pair of four-bit operands with both carry-in values is
// applied as dual-rail inputs in one clock cycle (precharge, then evaluate).
// The sum and carry-out rails are compared with the integer sum a + b + ci
// within the same evaluate phase (the adder has no register stage), and all
// outputs must be 0 in precharge. The operand pattern used for the
// worst-case carry (A = F, B = 0, carry-in 0 and 1) is included.
module modcvs_cla_adder4_tb;

  logic       clk = 1'b0;
  logic [3:0] a, a_n, b, b_n;
  logic       ci, ci_n;
  logic [3:0] s, s_n;
  logic       co, co_n, byp;
  int         checks = 0, failures = 0;
  int         bypass_seen = 0, ripple_seen = 0;

  modcvs_cla_adder4 dut (.*);

  task automatic check(input string what, input logic [4:0] got, input logic [4:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic cycle(input logic [3:0] av, input logic [3:0] bv, input logic cv);
    logic [4:0] sum;
    clk = 1'b0; {a, a_n, b, b_n, ci, ci_n} = '0;
    #5;
    check("precharge s/co", {co, s}, 5'b0);
    check("precharge s_n/co_n", {co_n, s_n}, 5'b0);
    check("precharge byp", {4'b0, byp}, 5'b0);
    clk = 1'b1;
    #1 {a, a_n, b, b_n, ci, ci_n} = {av, ~av, bv, ~bv, cv, !cv};
    #4;
    sum = 5'(av) + 5'(bv) + 5'(cv);
    check($sformatf("sum %h+%h+%0b", av, bv, cv), {co, s}, sum);
    check($sformatf("sum_n %h+%h+%0b", av, bv, cv), {co_n, s_n}, ~sum);
    check($sformatf("byp %h^%h", av, bv), {4'b0, byp}, {4'b0, (av ^ bv) == 4'hf});
    if (byp) bypass_seen++;
    if (byp && cv && co) ripple_seen++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worst-case operands first
    cycle(4'hf, 4'h0, 1'b0);
    cycle(4'hf, 4'h0, 1'b1);
    for (int av = 0; av < 16; av++)
      for (int bv = 0; bv < 16; bv++)
        for (int cv = 0; cv < 2; cv++)
          cycle(4'(av), 4'(bv), cv[0]);
    checks++;
    if (bypass_seen == 0 || ripple_seen == 0) begin
      failures++;
      $display("FAIL bypass or full carry propagation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
