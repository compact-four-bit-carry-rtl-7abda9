// Self-checking testbench of dcvs_sum_xor.
// All four (P_i, C_{i-1}) combinations, as dual-rail inputs, are applied in
// an evaluate phase; the sum rails are compared with P xor C and its
// complement. Both rails must be 0 in precharge.
module dcvs_sum_xor_tb;

  logic clk = 1'b0;
  logic p, p_n, c, c_n;
  logic s, s_n;
  int   checks = 0, failures = 0;

  dcvs_sum_xor dut (.*);

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
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
      for (int v = 0; v < 4; v++) begin
        clk = 1'b0; {p, p_n, c, c_n} = '0;
        #5;
        check("precharge s", s, 1'b0);
        check("precharge s_n", s_n, 1'b0);
        clk = 1'b1;
        #1 {p, p_n, c, c_n} = {v[1], !v[1], v[0], !v[0]};
        #4;
        check($sformatf("s p=%0b c=%0b", v[1], v[0]), s, v[1] ^ v[0]);
        check($sformatf("s_n p=%0b c=%0b", v[1], v[0]), s_n, !(v[1] ^ v[0]));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
