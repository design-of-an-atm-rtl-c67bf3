// Testbench for priority_decoder: every code against its one-hot threshold,
// including the worked cases 15 -> 1000_0000_0000_0000 (all slots) and
// 11 -> 0000_1000_0000_0000 (first twelve slots).
module tb_priority_decoder;
  logic [3:0]  prio;
  logic [15:0] p_mask;
  int checks = 0, failures = 0;

  priority_decoder dut (.prio, .p_mask);

  task automatic check(input logic [15:0] exp);
    checks++;
    if (p_mask !== exp) begin
      failures++;
      $display("FAIL prio=%0d p_mask=%b exp=%b", prio, p_mask, exp);
    end
  endtask

  initial begin
    prio = 4'd15; #1 check(16'b1000_0000_0000_0000);
    prio = 4'd11; #1 check(16'b0000_1000_0000_0000);
    prio = 4'd6;  #1 check(16'b0000_0000_0100_0000);
    for (int v = 0; v < 16; v++) begin
      logic [15:0] exp;
      exp = 16'd1;
      for (int k = 0; k < v; k++) exp = exp * 2;
      prio = 4'(v); #1 check(exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
