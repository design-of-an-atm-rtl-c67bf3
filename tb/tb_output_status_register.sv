// Testbench for output_status_register: the returned array is stored at
// slot_end only, shifted one place towards slot 1 with a 0 entering slot 16.
module tb_output_status_register;
  logic        clk = 0, rst_n = 0, slot_end = 0;
  logic [15:0] ret, status;
  logic [15:0] model = '0;
  int checks = 0, failures = 0;

  output_status_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    ret = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 300; c++) begin
      slot_end = (c % 4 == 3);
      ret = model | 16'($urandom);       // the column only adds bookings
      @(posedge clk); #1;
      if (slot_end) model = ret >> 1;
      checks++;
      if (status !== model) begin
        failures++;
        $display("FAIL status=%b exp=%b", status, model);
      end
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
