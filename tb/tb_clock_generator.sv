// Testbench for clock_generator: register A moves one place per clock and
// marks the last clock of every 16-clock slot; register B moves one place
// per slot, at the slot boundary, and wraps after 16 slots.
module tb_clock_generator;
  logic        clk = 0, rst_n = 0;
  logic [15:0] phase, fair_ptr;
  logic        slot_end;
  int checks = 0, failures = 0;

  clock_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 16*20; c++) begin
      logic [15:0] exp_phase, exp_ptr;
      exp_phase = 16'(1) << (c % 16);
      exp_ptr   = 16'(1) << ((c / 16) % 16);
      checks++;
      if (phase !== exp_phase || fair_ptr !== exp_ptr || slot_end !== (c % 16 == 15)) begin
        failures++;
        $display("FAIL clk %0d phase=%h ptr=%h slot_end=%b", c, phase, fair_ptr, slot_end);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
