// Testbench for input_port_controller. The testbench plays the scheduler:
// it reads each slot's serial output address and priority, checks them
// against the routing table, and two slots later shifts back a random
// schedule that books only free slots (sometimes several: multicast;
// sometimes none: the cell must be dropped). Idle cells and unrouted cells
// are mixed in. A cell taken at the end of slot q and booked for future
// slot k+1 must leave on cell_out during slot q+5+k, with its header
// rewritten (new VPI/VCI, HEC recomputed here by polynomial division).
module tb_input_port_controller;
  import atm_pkg::*;
  localparam int CW = 424, SLOTS = 200;
  logic          clk = 0, rst_n = 0, slot_end;
  logic          cfg_we = 0;
  logic [5:0]    cfg_addr = '0;
  route_t        cfg_data = '0;
  logic [CW-1:0] cell_in = '0;
  logic          cell_in_valid = 0;
  logic          oa_out, prio_out, sched_in = 0;
  logic [CW-1:0] cell_out;
  logic          cell_out_valid, idle_drop, unsched_drop, stored;

  route_t        tbl [64];
  logic [CW-1:0] raw  [SLOTS];       // cell taken at end of slot q
  logic [CW-1:0] sent [SLOTS];       // the same cell with its header updated
  route_t        rt   [SLOTS];
  logic          isuser [SLOTS], isidle [SLOTS];
  logic [15:0]   sch  [SLOTS + 8];   // schedule word shifted in during slot s
  logic [CW-1:0] exp_cell [SLOTS + 40];
  logic          exp_v    [SLOTS + 40];
  logic [15:0]   busy = '0;
  logic [15:0]   oa_cap;
  logic [15:0]   pr_cap;
  int checks = 0, failures = 0, n_idle = 0, n_drop = 0, n_multi = 0, n_out = 0;

  input_port_controller dut (.*);

  logic cyc_end = 0;
  assign slot_end = cyc_end;

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_hec(logic [31:0] h);
    logic [39:0] r;
    r = {h, 8'h00};
    for (int b = 39; b >= 8; b--)
      if (r[b]) r[b -: 9] = r[b -: 9] ^ 9'b1_0000_0111;
    return r[7:0] ^ 8'h55;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int s = 0; s < SLOTS + 40; s++) exp_v[s] = 0;
    for (int s = 0; s < SLOTS + 8; s++) sch[s] = '0;
    for (int a = 0; a < 64; a++) begin
      tbl[a] = route_t'({$urandom, $urandom});
      if (a % 9 == 0) tbl[a].out_mask = '0;
      @(negedge clk);
      cfg_we = 1; cfg_addr = 6'(a); cfg_data = tbl[a];
    end
    @(negedge clk) cfg_we = 0;
    // cells, taken at the end of slot q
    for (int q = 0; q < SLOTS; q++) begin
      logic [39:0] h, nh;
      logic [CW-1:0] c;
      c = {14{$urandom}};
      isidle[q] = (q % 6 == 5);
      if (isidle[q]) h = {32'h1, 8'h52};
      else h = {4'($urandom), 8'($urandom), 16'($urandom), 3'($urandom), 1'b0, 8'h0};
      c[CW-1 -: 40] = h;
      rt[q] = isidle[q] ? '0 : tbl[h[17:12]];
      nh = {h[39:36], rt[q].new_vpi, rt[q].new_vci, h[11:8], 8'h0};
      nh[7:0] = ref_hec(nh[39:8]);
      isuser[q] = !isidle[q] && q < SLOTS - 25;
      raw[q]  = c;
      sent[q] = c;
      sent[q][CW-1 -: 40] = nh;
      if (!isuser[q]) rt[q] = '0;
    end
    @(posedge clk); #1 rst_n = 1;
    for (int s = 0; s < SLOTS + 8; s++) begin
      for (int c = 0; c < 16; c++) begin
        cyc_end = (c == 15);
        // cell taken at the end of slot s
        cell_in_valid = (s < SLOTS) && (isuser[s] || isidle[s]);
        if (s < SLOTS) cell_in = raw[s];
        sched_in = sch[s][15-c];
        #1;
        if (c == 0) begin
          chk(cell_out_valid === exp_v[s] && (!exp_v[s] || cell_out === exp_cell[s]),
              $sformatf("slot %0d cell_out valid=%b exp %b", s, cell_out_valid, exp_v[s]));
          if (exp_v[s]) n_out++;
        end
        if (c == 15) begin
          chk(idle_drop === (s < SLOTS && isidle[s]), "idle drop flag");
          chk(unsched_drop === (s >= 3 && s - 3 < SLOTS && isuser[s-3] && sch[s] == 0), "unscheduled drop flag");
        end
        oa_cap[15-c] = oa_out;
        pr_cap[15-c] = prio_out;
        @(posedge clk); #1;
      end
      // the request of the cell taken at the end of slot s-1
      if (s >= 1 && s - 1 < SLOTS) begin
        int q;
        logic [15:0] pick;
        q = s - 1;
        chk(oa_cap === rt[q].out_mask, $sformatf("slot %0d output address %h exp %h", s, oa_cap, rt[q].out_mask));
        chk(pr_cap === {12'h0, rt[q].prio}, "priority code");
        // compare in slot s+1, schedule shifted in during slot s+2
        pick = (rt[q].out_mask == 0) ? '0 : (16'($urandom) & 16'($urandom) & ~busy);
        if ($urandom_range(0, 3) == 0) pick = pick & 16'(1 << $urandom_range(0, 15));
        if (isuser[q] && pick == 0) n_drop++;
        if (isidle[q]) n_idle++;
        if ($countones(pick) > 1) n_multi++;
        sch[s + 2] = pick;
        for (int k = 0; k < 16; k++)
          if (pick[k]) begin exp_cell[q + 5 + k] = sent[q]; exp_v[q + 5 + k] = 1; end
        busy = (busy | pick) >> 1;
      end else busy = busy >> 1;
    end
    $display("idle=%0d dropped=%0d multicast=%0d delivered=%0d", n_idle, n_drop, n_multi, n_out);
    chk(n_drop > 3 && n_multi > 3 && n_out > 50, "drops, multicast and deliveries seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((SLOTS + 20) * 16 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
