// Testbench for crosspoint_switch: each slot every output gets a random
// input (or none) by serial address; several outputs often pick the same
// input, which is multicast. In the following slot every output must carry
// its chosen input's cell.
module tb_crosspoint_switch;
  localparam int CW = 424;
  logic          clk = 0, rst_n = 0, slot_end = 0;
  logic [15:0]   ia_in = '0;
  logic [CW-1:0] cells_in [16], cells_out [16];
  logic [15:0]   cells_in_valid, cells_out_valid;
  int            cur [16];
  int checks = 0, failures = 0, multicast = 0;

  crosspoint_switch dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int j = 0; j < 16; j++) begin cells_in[j] = '0; cur[j] = -1; end
    cells_in_valid = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 60; s++) begin
      int nxt [16];
      int hits [16];
      for (int j = 0; j < 16; j++) hits[j] = 0;
      for (int o = 0; o < 16; o++) begin
        nxt[o] = ($urandom_range(0, 5) == 0) ? -1 : $urandom_range(0, 15);
        if (nxt[o] >= 0) hits[nxt[o]]++;
      end
      for (int j = 0; j < 16; j++) if (hits[j] > 1) multicast++;
      for (int c = 0; c < 16; c++) begin
        slot_end = (c == 15);
        for (int o = 0; o < 16; o++) ia_in[o] = (nxt[o] == 15 - c);
        for (int j = 0; j < 16; j++) cells_in[j] = {14{$urandom}};
        #1;
        for (int o = 0; o < 16; o++) begin
          checks++;
          if (cur[o] < 0 ? (cells_out_valid[o] !== 1'b0)
                         : (cells_out_valid[o] !== 1'b1 || cells_out[o] !== cells_in[cur[o]])) begin
            failures++;
            $display("FAIL slot %0d output %0d", s, o + 1);
          end
        end
        @(posedge clk); #1;
      end
      cur = nxt;
    end
    checks++;
    if (multicast < 10) failures++;
    $display("multicast=%0d", multicast);
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
