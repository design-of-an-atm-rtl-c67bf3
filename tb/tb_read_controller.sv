// Testbench for read_controller: the pointer starts on unit #1, moves one
// unit left per slot_end only, and wraps from #16 to #1.
module tb_read_controller;
  logic        clk = 0, rst_n = 0, slot_end = 0;
  logic [15:0] ptr;
  int checks = 0, failures = 0;
  int pos = 0;

  read_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 200; c++) begin
      slot_end = ($urandom_range(0, 2) == 0);
      @(posedge clk); #1;
      if (slot_end) pos = (pos + 1) % 16;
      checks++;
      if (ptr !== (16'(1) << pos)) begin
        failures++;
        $display("FAIL ptr=%h exp unit %0d", ptr, pos + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
