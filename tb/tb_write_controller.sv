// Testbench for write_controller: for every pointer position a random
// schedule word is shifted in, slot 16 first, over 16 clocks. The final
// contents must hold slot 1 at the unit left of the pointer (pointer #N,
// entry #N+1), slot k at entry+k-1 and slot 16 on the pointed unit; the
// worked example of entry #3 is among them.
module tb_write_controller;
  logic        clk = 0, rst_n = 0;
  logic [15:0] ptr;
  logic        sched_in;
  logic [15:0] wc, wc_next;
  int checks = 0, failures = 0;

  write_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    ptr = 16'd1; sched_in = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int rep = 0; rep < 3; rep++)
      for (int pn = 0; pn < 16; pn++) begin
        logic [15:0] s, exp;
        int entry;
        s   = 16'($urandom);
        ptr = 16'(1) << pn;
        entry = (pn + 1) % 16;
        for (int k = 0; k < 16; k++) exp[(entry + k) % 16] = s[k];
        for (int b = 15; b >= 0; b--) begin
          sched_in = s[b];
          if (b == 0) begin
            #1 checks++;
            if (wc_next !== exp) begin
              failures++;
              $display("FAIL wc_next ptr #%0d s=%b got %b exp %b", pn + 1, s, wc_next, exp);
            end
          end
          @(posedge clk); #1;
        end
        checks++;
        if (wc !== exp) begin
          failures++;
          $display("FAIL wc ptr #%0d s=%b got %b exp %b", pn + 1, s, wc, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
