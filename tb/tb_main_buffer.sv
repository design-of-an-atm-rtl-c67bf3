// Testbench for main_buffer. Every 16-clock slot a new cell is offered as
// #3 and a schedule word, drawn so that no future slot is booked twice, is
// shifted in slot 16 first. The model keeps, per future slot, the cell due
// then: a cell booked for future slot k+1 in the slot ending at edge E must
// be in temporary buffer #4 during the slot k+1 slots after E (one slot
// after its unit is pointed). Multicast bookings (several bits) and empty
// schedules (cell dropped) both occur.
module tb_main_buffer;
  localparam int CW = 424;
  logic          clk = 0, rst_n = 0, slot_end = 0, sched_in = 0;
  logic [CW-1:0] cell_in = '0, cell_out;
  logic          cell_out_valid, stored;
  logic [15:0]   ptr;
  logic [CW-1:0] due [40];          // due[d]: cell expected in #4 d slots ahead
  logic          due_v [40];
  logic [15:0]   busy = '0;         // future slots already booked
  int checks = 0, failures = 0, multicast = 0, dropped = 0, delivered = 0;

  main_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int d = 0; d < 40; d++) due_v[d] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 200; s++) begin
      logic [15:0] sch;
      cell_in = {14{$urandom}};
      sch = 16'($urandom) & 16'($urandom) & 16'($urandom) & ~busy;
      if (s % 9 == 0) sch = 16'h0;
      if ($countones(sch) > 1) multicast++;
      if (sch == 0) dropped++;
      for (int c = 0; c < 16; c++) begin
        slot_end = (c == 15);
        sched_in = sch[15-c];
        #1;
        if (c == 15) chk(stored === (sch != 0), "stored flag");
        @(posedge clk); #1;
      end
      // edge E has passed: shift the expectations, then add the new ones
      chk(cell_out_valid === due_v[0] && (!due_v[0] || cell_out === due[0]),
          $sformatf("slot %0d #4 valid=%b exp %b", s, cell_out_valid, due_v[0]));
      if (due_v[0]) delivered++;
      for (int d = 0; d < 39; d++) begin due[d] = due[d+1]; due_v[d] = due_v[d+1]; end
      due_v[39] = 0;
      busy = (busy | sch) >> 1;
      for (int k = 0; k < 16; k++)
        if (sch[k]) begin due[k] = cell_in; due_v[k] = 1; end
    end
    chk(multicast > 5 && dropped > 5 && delivered > 50, "multicast, drops and deliveries seen");
    $display("multicast=%0d dropped=%0d delivered=%0d", multicast, dropped, delivered);
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
