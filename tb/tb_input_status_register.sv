// Testbench for input_status_register. Every 16-clock slot it shifts in a
// random output address (output 16 first) and a priority code (in the last
// four clocks, most significant bit first), and offers a random schedule on
// e_bus that avoids the slots already busy. It checks that the request and
// decoded threshold appear after the slot, that the status array takes the
// OR with the schedule shifted one place, and that the schedule comes back
// serially, slot 16 first, during the next slot.
module tb_input_status_register;
  logic        clk = 0, rst_n = 0, slot_end = 0;
  logic        oa_in = 0, prio_in = 0, sched_out;
  logic [15:0] e_bus = '0, req, p_mask, status;
  logic [15:0] m_status = '0, m_sched = '0;
  int checks = 0, failures = 0;

  input_status_register dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 40; s++) begin
      logic [15:0] oa, e;
      logic [3:0]  pr;
      oa = 16'($urandom);
      pr = 4'($urandom);
      e  = 16'($urandom) & ~m_status & 16'($urandom);
      e_bus = e;
      for (int c = 0; c < 16; c++) begin
        slot_end = (c == 15);
        oa_in    = oa[15-c];
        prio_in  = (c >= 12) ? pr[15-c] : 1'b0;
        #1 chk(sched_out === m_sched[15-c], "schedule bit");
        @(posedge clk); #1;
      end
      m_sched  = e;
      m_status = (m_status | e) >> 1;
      chk(req === oa, $sformatf("req %h exp %h", req, oa));
      chk(p_mask === (16'd1 << pr), "p_mask");
      chk(status === m_status, $sformatf("status %b exp %b", status, m_status));
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
