// Worst-case scheduling load for atm_switch at its default size: in one slot
// every input port receives a cell addressed to all 16 outputs, so all 256
// elementary schedulers are enabled together and the blocking chains run
// the full length of every column. Starting from empty status arrays, the
// row at distance k below the fairness pointer must get future slot k+1 at
// every output, so each input broadcasts in its own slot and every returned
// output status array ends with all 16 bits set. In the slot after that a
// second broadcast from every input meets outputs that are booked for 15
// slots: only the first row in line gets slot 16, the other 15 cells are
// dropped unscheduled. The testbench checks the schedules of every row
// (e_bus), the returned output status of every column (ret), the store and
// drop flags, and every cell at every output in every slot (header
// rewritten, with its HEC), against values worked out in closed form here.
module tb_broadcast_burst;
  import atm_pkg::*;
  localparam int N = 16, CW = 424, Q = 4, SLOTS = Q + 30;

  logic          clk = 0, rst_n = 0;
  logic          cfg_we = 0;
  logic [3:0]    cfg_port = '0;
  logic [5:0]    cfg_addr = '0;
  route_t        cfg_data = '0;
  logic [CW-1:0] cells_in [N], cells_out [N];
  logic [N-1:0]  cells_in_valid = '0, cells_out_valid;
  logic          slot_end;
  logic [N-1:0]  fair_ptr, idle_drop, unsched_drop, stored;

  route_t        tbl [N];
  logic [CW-1:0] raw [2][N], upd [2][N];
  int checks = 0, failures = 0, n_full = 0, n_sat_drop = 0, n_bcast = 0;

  atm_switch dut (.*);

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
    int entry1, entry2;
    // comparison slot m starts at the row below the pointer of slot m
    entry1 = ((Q + 2) % N + 1) % N;
    entry2 = (entry1 + 1) % N;
    for (int p = 0; p < N; p++) begin
      tbl[p] = '{out_mask: '1, prio: 4'd15, new_vpi: 8'($urandom), new_vci: 16'($urandom)};
      for (int a = 0; a < 64; a++) begin
        @(negedge clk);
        cfg_we = 1; cfg_port = 4'(p); cfg_addr = 6'(a); cfg_data = tbl[p];
      end
      cells_in[p] = '0;
    end
    @(negedge clk) cfg_we = 0;
    for (int b = 0; b < 2; b++)
      for (int r = 0; r < N; r++) begin
        logic [39:0] h, nh;
        raw[b][r] = {14{$urandom}};
        h = {4'($urandom), 8'($urandom), 16'($urandom), 3'($urandom), 1'b0, 8'h0};
        raw[b][r][CW-1 -: 40] = h;
        nh = {h[39:36], tbl[r].new_vpi, tbl[r].new_vci, h[11:8], 8'h0};
        nh[7:0] = ref_hec(nh[39:8]);
        upd[b][r] = raw[b][r];
        upd[b][r][CW-1 -: 40] = nh;
      end
    @(posedge clk); #1 rst_n = 1;
    for (int s = 0; s < SLOTS; s++) begin
      for (int c = 0; c < N; c++) begin
        for (int r = 0; r < N; r++) begin
          cells_in_valid[r] = (s == Q || s == Q + 1);
          cells_in[r]       = (s == Q) ? raw[0][r] : (s == Q + 1) ? raw[1][r] : '0;
        end
        #1;
        if (c == 0) begin
          int k;
          logic          ev;
          logic [CW-1:0] ec;
          // expected fabric output: burst 1 row entry1+k in slot Q+5+k,
          // burst 2 row entry2 in slot Q+1+5+15
          k = s - (Q + 5);
          ev = (k >= 0 && k < N) || (s == Q + 21);
          ec = (s == Q + 21) ? upd[1][entry2] : (k >= 0 && k < N) ? upd[0][(entry1 + k) % N] : '0;
          for (int o = 0; o < N; o++)
            chk(cells_out_valid[o] === ev && (!ev || cells_out[o] === ec),
                $sformatf("slot %0d output %0d valid=%b exp %b", s, o + 1, cells_out_valid[o], ev));
          if (ev && cells_out_valid == '1) n_bcast++;
          if (s == Q + 2) begin
            for (int j = 0; j < N; j++)
              chk(dut.u_sched.e_bus[(entry1 + j) % N] === N'(1) << j,
                  $sformatf("burst 1: row %0d schedule %h", (entry1 + j) % N + 1,
                            dut.u_sched.e_bus[(entry1 + j) % N]));
            for (int o = 0; o < N; o++) begin
              chk(dut.u_sched.ret[o] === '1, $sformatf("burst 1: output %0d status %h", o + 1, dut.u_sched.ret[o]));
              if (dut.u_sched.ret[o][N-1]) n_full++;
            end
          end
          if (s == Q + 3) begin
            for (int r = 0; r < N; r++)
              chk(dut.u_sched.e_bus[r] === ((r == entry2) ? N'(1) << (N - 1) : '0),
                  $sformatf("burst 2: row %0d schedule %h", r + 1, dut.u_sched.e_bus[r]));
            for (int o = 0; o < N; o++)
              chk(dut.u_sched.ret[o] === '1, $sformatf("burst 2: output %0d status %h", o + 1, dut.u_sched.ret[o]));
          end
        end
        if (c == N - 1) begin
          for (int r = 0; r < N; r++) begin
            logic es, ed;
            es = (s == Q + 3) || (s == Q + 4 && r == entry2);
            ed = (s == Q + 4 && r != entry2);
            chk(stored[r] === es && unsched_drop[r] === ed && idle_drop[r] === 1'b0,
                $sformatf("slot %0d port %0d stored=%b dropped=%b", s, r + 1, stored[r], unsched_drop[r]));
            if (unsched_drop[r]) n_sat_drop++;
          end
        end
        @(posedge clk); #1;
      end
    end
    $display("full_output_arrays=%0d broadcast_slots=%0d saturation_drops=%0d", n_full, n_bcast, n_sat_drop);
    chk(n_full == N, "every output status array filled to slot 16 in one comparison");
    chk(n_bcast == N + 1, "a broadcast in each of the 17 booked slots");
    chk(n_sat_drop == N - 1, "15 cells dropped when the outputs are full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((SLOTS + 10) * N + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
