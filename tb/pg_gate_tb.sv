// Self-checking testbench of pg_gate.
// Runs every operand-bit pair through one precharge and one evaluate phase.
// In precharge all four outputs must be 0; in evaluate G, P, Pbar and N are
// compared with values computed here from the integer operand bits.
module pg_gate_tb;

  logic clk = 1'b0;
  logic a, a_n, b, b_n;
  logic g, p, p_n, n;
  int   checks = 0, failures = 0;

  pg_gate dut (.*);

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic cycle(input logic av, input logic bv);
    // precharge: inputs low
    clk = 1'b0; {a, a_n, b, b_n} = '0;
    #5;
    check("precharge g", g, 1'b0);
    check("precharge p", p, 1'b0);
    check("precharge p_n", p_n, 1'b0);
    check("precharge n", n, 1'b0);
    // evaluate: inputs rise on their valid rails
    clk = 1'b1;
    #1 {a, a_n, b, b_n} = {av, !av, bv, !bv};
    #4;
    check("g", g, av && bv);
    check("n", n, !av && !bv);
    check("p", p, av != bv);
    check("p_n", p_n, av == bv);
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++)
      for (int v = 0; v < 4; v++) cycle(v[1], v[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
