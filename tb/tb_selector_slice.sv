// Testbench for selector_slice: each slot a one-hot (or empty) input
// address is shifted in, input 16 first; from the next slot on, the slice
// must pass exactly the addressed input's cell, and nothing while the
// address is being shifted in for the slot after.
module tb_selector_slice;
  localparam int CW = 424;
  logic          clk = 0, rst_n = 0, slot_end = 0, ia_in = 0;
  logic [CW-1:0] cells [16];
  logic [15:0]   cells_valid;
  logic [CW-1:0] cell_out;
  logic          cell_out_valid;
  logic [15:0]   cfg;
  logic [15:0]   cur = '0;
  int checks = 0, failures = 0;

  selector_slice dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int j = 0; j < 16; j++) cells[j] = '0;
    cells_valid = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 100; s++) begin
      logic [15:0] nxt;
      nxt = ($urandom_range(0, 4) == 0) ? 16'h0 : 16'd1 << $urandom_range(0, 15);
      for (int c = 0; c < 16; c++) begin
        slot_end = (c == 15);
        ia_in = nxt[15-c];
        for (int j = 0; j < 16; j++) cells[j] = {14{$urandom}};
        cells_valid = '1;
        #1;
        checks++;
        if (cur == 0) begin
          if (cell_out_valid !== 1'b0) begin failures++; $display("FAIL idle output"); end
        end else begin
          int j;
          j = $clog2(cur);
          if (cell_out !== cells[j] || cell_out_valid !== 1'b1) begin
            failures++;
            $display("FAIL slot %0d input %0d", s, j + 1);
          end
        end
        @(posedge clk); #1;
      end
      cur = nxt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
