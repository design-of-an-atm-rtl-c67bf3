// End-to-end testbench for atm_switch at its default size (16 ports, 16
// slots, 424-bit cells). Every input port gets its own routing table; cells
// arrive at random, about three in four slots per port, some of them idle
// cells, some with no route, some multicast, some of low priority. A model
// written here runs the time-slot algorithm on status arrays (first fit per
// output, rows from the one below the rotating fairness pointer, 4-bit
// thresholds) and predicts, for every output and every slot, which cell
// must come out of the fabric with which rewritten header. A cell taken at
// the end of slot q and booked for future slot k+1 must be at the output
// during slot q+5+k. The drop and store flags of every port are checked
// too. Each mechanism (unicast, multicast in one slot and over several slots, output
// contention, priority drop, unscheduled drop, idle-cell drop, fairness
// rotation) is counted, and one that never happens counts as a failure.
module tb_atm_switch;
  import atm_pkg::*;
  localparam int N = 16, CW = 424, SLOTS = 160;

  logic          clk = 0, rst_n = 0;
  logic          cfg_we = 0;
  logic [3:0]    cfg_port = '0;
  logic [5:0]    cfg_addr = '0;
  route_t        cfg_data = '0;
  logic [CW-1:0] cells_in [N], cells_out [N];
  logic [N-1:0]  cells_in_valid = '0, cells_out_valid;
  logic          slot_end;
  logic [N-1:0]  fair_ptr, idle_drop, unsched_drop, stored;

  route_t        tbl [N][64];
  logic [CW-1:0] raw  [SLOTS][N];
  logic [CW-1:0] upd  [SLOTS][N];
  logic          vld  [SLOTS][N];
  logic          idl  [SLOTS][N];
  route_t        rt   [SLOTS][N];
  logic [N-1:0]  m_in [N], m_out [N];
  logic [CW-1:0] exp_cell [SLOTS + 40][N];
  logic          exp_v    [SLOTS + 40][N];
  logic          exp_store [SLOTS + 8][N];
  logic          exp_drop  [SLOTS + 8][N];
  int checks = 0, failures = 0;
  int n_unicast = 0, n_multicast = 0, n_same_slot_mc = 0, n_spread_mc = 0, n_contention = 0;
  int n_prio_drop = 0, n_unsched = 0, n_idle = 0, n_delivered = 0;
  int win_row [N];

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

  // Comparison slot m handles the cells taken at the end of slot m-2.
  task automatic compare(input int m);
    logic [N-1:0] erow [N];
    int q, entry;
    int ncols [N];
    q = m - 2;
    entry = (m % N + 1) % N;
    for (int r = 0; r < N; r++) begin erow[r] = '0; ncols[r] = 0; end
    for (int c = 0; c < N; c++) begin
      logic [N-1:0] x;
      int nreq, first;
      x = m_out[c]; nreq = 0; first = -1;
      for (int k = 0; k < N; k++) begin
        int r, got;
        r = (entry + k) % N;
        if (rt[q][r].out_mask[c]) begin
          nreq++;
          got = -1;
          for (int j = 0; j <= rt[q][r].prio; j++)
            if (!m_in[r][j] && !x[j]) begin got = j; break; end
          if (got >= 0) begin
            x[got] = 1'b1;
            erow[r][got] = 1'b1;
            ncols[r]++;
            exp_cell[q + 5 + got][c] = upd[q][r];
            exp_v[q + 5 + got][c] = 1'b1;
            if (first < 0) first = r;
          end else begin
            for (int j = rt[q][r].prio + 1; j < N; j++)
              if (!m_in[r][j] && !x[j]) begin n_prio_drop++; break; end
          end
        end
      end
      if (nreq > 1) begin n_contention++; if (first >= 0) win_row[first]++; end
      m_out[c] = x >> 1;
    end
    for (int r = 0; r < N; r++) begin
      int nout;
      nout = $countones(rt[q][r].out_mask);
      if (vld[q][r] && !idl[q][r]) begin
        exp_store[m + 1][r] = (erow[r] != 0);
        exp_drop[m + 1][r]  = (erow[r] == 0);
        if (erow[r] == 0) n_unsched++;
        else if (nout == 1) n_unicast++;
        else n_multicast++;
        if ($countones(erow[r]) > 1) n_spread_mc++;
        if (ncols[r] > $countones(erow[r])) n_same_slot_mc++;
      end
      m_in[r] = (m_in[r] | erow[r]) >> 1;
    end
  endtask

  initial begin
    for (int r = 0; r < N; r++) begin m_in[r] = '0; m_out[r] = '0; win_row[r] = 0; cells_in[r] = '0; end
    for (int s = 0; s < SLOTS + 40; s++)
      for (int c = 0; c < N; c++) exp_v[s][c] = 0;
    for (int s = 0; s < SLOTS + 8; s++)
      for (int r = 0; r < N; r++) begin exp_store[s][r] = 0; exp_drop[s][r] = 0; end
    // routing tables: mostly unicast, some multicast, some unrouted
    for (int p = 0; p < N; p++)
      for (int a = 0; a < 64; a++) begin
        route_t e;
        int kind;
        e = route_t'({$urandom, $urandom});
        kind = $urandom_range(0, 19);
        e.out_mask = (kind == 0) ? '0 :
                     (kind < 15) ? (N'(1) << $urandom_range(0, N-1)) :
                                   (N'(1) << $urandom_range(0, N-1)) | (N'(1) << $urandom_range(0, N-1))
                                   | (N'(1) << $urandom_range(0, N-1));
        e.prio = ($urandom_range(0, 3) == 0) ? 4'($urandom_range(0, 7)) : 4'd15;
        tbl[p][a] = e;
        @(negedge clk);
        cfg_we = 1; cfg_port = 4'(p); cfg_addr = 6'(a); cfg_data = e;
      end
    @(negedge clk) cfg_we = 0;
    // traffic
    for (int q = 0; q < SLOTS; q++)
      for (int r = 0; r < N; r++) begin
        logic [39:0] h, nh;
        logic [CW-1:0] c;
        c = {14{$urandom}};
        vld[q][r] = (q < SLOTS - 30) && ($urandom_range(0, 3) != 0);
        idl[q][r] = ($urandom_range(0, 9) == 0);
        h = idl[q][r] ? {32'h1, 8'h52}
                      : {4'($urandom), 8'($urandom), 16'($urandom), 3'($urandom), 1'b0, 8'h0};
        c[CW-1 -: 40] = h;
        raw[q][r] = c;
        rt[q][r] = (vld[q][r] && !idl[q][r]) ? tbl[r][h[17:12]] : '0;
        nh = {h[39:36], rt[q][r].new_vpi, rt[q][r].new_vci, h[11:8], 8'h0};
        nh[7:0] = ref_hec(nh[39:8]);
        upd[q][r] = c;
        upd[q][r][CW-1 -: 40] = nh;
      end
    @(posedge clk); #1 rst_n = 1;
    for (int s = 0; s < SLOTS + 25; s++) begin
      for (int c = 0; c < N; c++) begin
        for (int r = 0; r < N; r++) begin
          cells_in[r]       = (s < SLOTS) ? raw[s][r] : '0;
          cells_in_valid[r] = (s < SLOTS) && vld[s][r];
        end
        #1;
        if (c == 0) begin
          chk(fair_ptr == (N'(1) << (s % N)), "fairness pointer");
          for (int o = 0; o < N; o++) begin
            chk(cells_out_valid[o] === exp_v[s][o] && (!exp_v[s][o] || cells_out[o] === exp_cell[s][o]),
                $sformatf("slot %0d output %0d valid=%b exp %b", s, o + 1, cells_out_valid[o], exp_v[s][o]));
            if (exp_v[s][o]) n_delivered++;
          end
        end
        if (c == N - 1) begin
          chk(slot_end === 1'b1, "slot_end");
          for (int r = 0; r < N; r++) begin
            chk(idle_drop[r] === (s < SLOTS && vld[s][r] && idl[s][r]), "idle drop flag");
            chk(stored[r] === exp_store[s][r], $sformatf("slot %0d port %0d stored", s, r + 1));
            chk(unsched_drop[r] === exp_drop[s][r], $sformatf("slot %0d port %0d dropped", s, r + 1));
            if (s < SLOTS && vld[s][r] && idl[s][r]) n_idle++;
          end
        end
        @(posedge clk); #1;
      end
      if (s + 1 >= 2 && s - 1 < SLOTS) compare(s + 1);
    end
    begin
      int rows_won;
      rows_won = 0;
      for (int r = 0; r < N; r++) if (win_row[r] > 0) rows_won++;
      $display("delivered=%0d unicast=%0d multicast=%0d multicast_in_one_slot=%0d multicast_over_slots=%0d contention=%0d",
               n_delivered, n_unicast, n_multicast, n_same_slot_mc, n_spread_mc, n_contention);
      $display("priority_drops=%0d unscheduled_drops=%0d idle_drops=%0d rows_winning_contention=%0d",
               n_prio_drop, n_unsched, n_idle, rows_won);
      chk(n_unicast > 0, "unicast happened");
      chk(n_multicast > 0, "multicast happened");
      chk(n_same_slot_mc > 0, "multicast to several outputs in one slot happened");
      chk(n_spread_mc > 0, "multicast over several slots happened");
      chk(n_contention > 0, "output contention happened");
      chk(n_prio_drop > 0, "priority threshold drop happened");
      chk(n_unsched > 0, "unscheduled drop happened");
      chk(n_idle > 0, "idle cell drop happened");
      chk(rows_won == N, "every input first in some contended output (fairness rotation)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((SLOTS + 40) * N + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
