// Testbench for elementary_scheduler. Each 16-clock slot gets random inputs
// (plus the worked example: input 0000_0000_0111_1101 against output
// 1111_0000_0000_1111 books slot 8, also with threshold 12, but nothing with
// threshold 7; and the 7-slot example: input 0010011 against output 0000101
// books the fourth slot). The combinational outputs are compared with a first-fit
// search written here; the schedule register is modelled and the input
// address bit must leave the chain one slot after its booking falls due,
// with random bits shifted through the chain in between.
module tb_elementary_scheduler;
  logic        clk = 0, rst_n = 0, slot_end = 0;
  logic        en, fairness, ia_shift_in = 0, ia_shift_out;
  logic [15:0] p_mask, in_status, x_in, f, x_out, t, e;
  logic [15:0] m_sr = '0;
  logic        m_hold = 0, m_ia = 0;
  int checks = 0, failures = 0, booked = 0, blocked_by_prio = 0;

  elementary_scheduler dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] first_fit(logic enable, logic [3:0] thr,
                                            logic [15:0] ins, logic [15:0] outs);
    if (!enable) return '0;
    for (int k = 0; k <= thr; k++)
      if (!ins[k] && !outs[k]) return 16'd1 << k;
    return '0;
  endfunction

  initial begin
    en = 0; fairness = 0; p_mask = 16'h8000; in_status = '0; x_in = '0; f = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 300; s++) begin
      logic [3:0]  thr;
      logic [15:0] exp_e, xt;
      if (s < 3) begin
        en = 1; fairness = 0;
        in_status = 16'b0000_0000_0111_1101;
        x_in      = 16'b1111_0000_0000_1111;
        thr       = (s == 0) ? 4'd15 : (s == 1) ? 4'd11 : 4'd6;
      end else if (s == 3) begin
        en = 1; fairness = 0;
        in_status = 16'b0010011;
        x_in      = 16'b0000101;
        thr       = 4'd6;
      end else begin
        en = ($urandom_range(0, 3) != 0);
        fairness = ($urandom_range(0, 3) == 0);
        thr = 4'($urandom);
        in_status = 16'($urandom) | 16'($urandom);
        x_in      = 16'($urandom) | 16'($urandom);
      end
      p_mask = 16'd1 << thr;
      f = 16'($urandom);
      exp_e = first_fit(en, thr, in_status, x_in);
      if (s == 0 || s == 1) chk(exp_e == 16'h0080, "worked example books slot 8");
      if (s == 2) chk(exp_e == 16'h0000, "worked example blocked at threshold 7");
      if (s == 3) chk(exp_e == 16'h0008, "7-slot example books slot 4");
      if (exp_e != 0) booked++;
      if (en && exp_e == 0 && first_fit(1'b1, 4'd15, in_status, x_in) != 0) blocked_by_prio++;
      xt = x_in | exp_e;
      for (int c = 0; c < 16; c++) begin
        slot_end = (c == 15);
        ia_shift_in = 1'($urandom);
        #1;
        if (c == 0) begin
          chk(e === exp_e, $sformatf("slot %0d e=%b exp %b", s, e, exp_e));
          chk(x_out === (fairness ? f : xt), "x_out");
          chk(t === (fairness ? xt : 16'h0), "t");
        end
        @(posedge clk); #1;
        if (slot_end) begin
          logic [15:0] nx;
          nx     = m_sr | exp_e;
          m_ia   = m_hold;
          m_hold = nx[0];
          m_sr   = nx >> 1;
        end else m_ia = ia_shift_in;
        chk(ia_shift_out === m_ia, $sformatf("slot %0d clk %0d ia_shift_out", s, c));
      end
    end
    chk(booked > 50 && blocked_by_prio > 5, "bookings and threshold blocks both seen");
    $display("booked=%0d blocked_by_priority=%0d", booked, blocked_by_prio);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
