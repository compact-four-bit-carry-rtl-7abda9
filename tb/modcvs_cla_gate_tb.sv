// Self-checking testbench of modcvs_cla_gate.
// For every pair of four-bit operands and both carry-in values, the
// generate, kill and propagate inputs are formed here from the operands and
// applied in an evaluate phase. Each carry C_i is compared with the carry
// into bit i+1 of the integer sum a + b + c0, each Cbar_i with its
// complement, and the bypass enable with "all propagate bits true". All
// outputs must be 0 in precharge.
module modcvs_cla_gate_tb;

  logic       clk = 1'b0;
  logic [3:0] g, n, p;
  logic       c0, c0_n;
  logic [3:0] c, c_n;
  logic       byp;
  int         checks = 0, failures = 0;
  int         bypass_seen = 0;

  modcvs_cla_gate dut (.*);

  task automatic check(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  task automatic cycle(input logic [3:0] av, input logic [3:0] bv, input logic cv);
    logic [3:0] exp_c;
    clk = 1'b0; {g, n, p, c0, c0_n} = '0;
    #5;
    check("precharge c", c, 4'b0);
    check("precharge c_n", c_n, 4'b0);
    check("precharge byp", {3'b0, byp}, 4'b0);
    clk = 1'b1;
    #1;
    g = av & bv; n = ~av & ~bv; p = av ^ bv; c0 = cv; c0_n = !cv;
    #4;
    for (int i = 0; i < 4; i++) begin
      int unsigned lo_sum;
      lo_sum   = (32'(av) & ((32'd2 << i) - 1)) + (32'(bv) & ((32'd2 << i) - 1)) + 32'(cv);
      exp_c[i] = lo_sum[i+1];
    end
    check($sformatf("c a=%h b=%h c0=%0b", av, bv, cv), c, exp_c);
    check($sformatf("c_n a=%h b=%h c0=%0b", av, bv, cv), c_n, ~exp_c);
    check($sformatf("byp a=%h b=%h", av, bv), {3'b0, byp}, {3'b0, (av ^ bv) == 4'hf});
    if (byp) bypass_seen++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int av = 0; av < 16; av++)
      for (int bv = 0; bv < 16; bv++)
        for (int cv = 0; cv < 2; cv++)
          cycle(4'(av), 4'(bv), cv[0]);
    checks++;
    if (bypass_seen == 0) begin
      failures++;
      $display("FAIL bypass never enabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
