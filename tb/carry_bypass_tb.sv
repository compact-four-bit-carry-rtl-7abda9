// Self-checking testbench of carry_bypass.
// Every pattern of the four propagate inputs is applied in an evaluate
// phase; the bypass enable must be high only for P4..P1 = 1111, and low
// throughout precharge.
module carry_bypass_tb;

  logic       clk = 1'b0;
  logic [3:0] p;
  logic       byp;
  int         checks = 0, failures = 0;

  carry_bypass dut (.*);

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
    for (int v = 0; v < 16; v++) begin
      clk = 1'b0; p = 4'(v);      // precharge, even with inputs high
      #5 check($sformatf("precharge p=%b", p), byp, 1'b0);
      clk = 1'b1;
      #5 check($sformatf("evaluate p=%b", p), byp, v == 15);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
