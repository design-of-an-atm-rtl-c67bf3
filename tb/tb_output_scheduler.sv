// Testbench for output_scheduler: random multicast requests with random
// priorities from all 16 inputs, against a model of the time-slot algorithm
// written here at the level of status arrays (first-fit per column, rows
// visited from the row below the fairness pointer, which advances one row
// per slot). Checked every clock: the serial schedule returned to each
// input in the slot after the comparison, and the serial input address of
// every output, which must carry booking (row r, slot k) of comparison slot
// m during slot m+2+k. Counts contention, multicast, threshold drops and
// which rows win contention, and fails if any never happens.
module tb_output_scheduler;
  localparam int N = 16;
  localparam int SLOTS = 120;
  logic         clk = 0, rst_n = 0;
  logic [N-1:0] oa_in = '0, prio_in = '0, sched_out, ia_out, fair_ptr;
  logic         slot_end;

  logic [N-1:0] m_in [N], m_out [N];
  logic [N-1:0] req  [SLOTS+2][N];
  logic [3:0]   thr  [SLOTS+2][N];
  logic [N-1:0] sch  [SLOTS+4][N];     // schedule word expected in slot s
  logic [N-1:0] iaw  [SLOTS+40][N];    // input address expected in slot s, per output
  int checks = 0, failures = 0;
  int contention = 0, multicast = 0, prio_drop = 0, booked = 0;
  int win_row [N];

  output_scheduler dut (.*);

  always #5 clk = ~clk;

  // One comparison slot of the algorithm.
  task automatic compare(input int s);
    logic [N-1:0] erow [N];
    int entry;
    entry = (s % N + 1) % N;
    for (int r = 0; r < N; r++) erow[r] = '0;
    for (int c = 0; c < N; c++) begin
      logic [N-1:0] x;
      int nreq, first_winner;
      x = m_out[c];
      nreq = 0; first_winner = -1;
      for (int k = 0; k < N; k++) begin
        int r;
        r = (entry + k) % N;
        if (req[s][r][c]) begin
          int got;
          nreq++;
          got = -1;
          for (int j = 0; j <= thr[s][r]; j++)
            if (!m_in[r][j] && !x[j]) begin got = j; break; end
          if (got >= 0) begin
            x[got] = 1'b1;
            erow[r][got] = 1'b1;
            iaw[s + 2 + got][c][r] = 1'b1;
            booked++;
            if (first_winner < 0) first_winner = r;
          end else begin
            for (int j = thr[s][r] + 1; j < N; j++)
              if (!m_in[r][j] && !x[j]) begin prio_drop++; break; end
          end
        end
      end
      if (nreq > 1) begin
        contention++;
        if (first_winner >= 0) win_row[first_winner]++;
      end
      m_out[c] = x >> 1;
    end
    for (int r = 0; r < N; r++) begin
      if ($countones(erow[r]) > 1) multicast++;
      sch[s + 1][r] = erow[r];
      m_in[r] = (m_in[r] | erow[r]) >> 1;
    end
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int r = 0; r < N; r++) begin m_in[r] = '0; m_out[r] = '0; win_row[r] = 0; end
    for (int s = 0; s < SLOTS + 40; s++)
      for (int c = 0; c < N; c++) iaw[s][c] = '0;
    for (int s = 0; s < SLOTS + 4; s++)
      for (int r = 0; r < N; r++) sch[s][r] = '0;
    for (int s = 0; s < SLOTS + 2; s++)
      for (int r = 0; r < N; r++) begin
        int kind;
        kind = $urandom_range(0, 9);
        req[s][r] = (s >= SLOTS - 4) ? '0 :
                    (kind < 3) ? '0 :
                    (kind < 8) ? (N'(1) << $urandom_range(0, N-1)) :
                                 (N'($urandom) & N'($urandom));
        thr[s][r] = ($urandom_range(0, 2) == 0) ? 4'($urandom) : 4'd15;
      end
    @(posedge clk); #1 rst_n = 1;
    // slot s: inputs shift in the request compared in slot s+1
    for (int s = 0; s < SLOTS; s++) begin
      for (int c = 0; c < N; c++) begin
        for (int r = 0; r < N; r++) begin
          oa_in[r]   = req[s+1][r][N-1-c];
          prio_in[r] = (c >= N - 4) ? thr[s+1][r][N-1-c] : 1'b0;
        end
        #1;
        chk(fair_ptr == (N'(1) << (s % N)), "fairness pointer");
        chk(slot_end == (c == N - 1), "slot_end");
        for (int r = 0; r < N; r++)
          chk(sched_out[r] === sch[s][r][N-1-c],
              $sformatf("slot %0d clk %0d schedule of input %0d", s, c, r + 1));
        for (int o = 0; o < N; o++)
          chk(ia_out[o] === iaw[s][o][N-1-c],
              $sformatf("slot %0d clk %0d input address of output %0d", s, c, o + 1));
        @(posedge clk); #1;
      end
      compare(s + 1);
    end
    begin
      int rows_won;
      rows_won = 0;
      for (int r = 0; r < N; r++) if (win_row[r] > 0) rows_won++;
      $display("booked=%0d contention=%0d multicast=%0d priority_drops=%0d rows_winning_contention=%0d",
               booked, contention, multicast, prio_drop, rows_won);
      chk(contention > 0, "contention happened");
      chk(multicast > 0, "multicast happened");
      chk(prio_drop > 0, "priority threshold drop happened");
      chk(rows_won == N, "every row first in some contended column (fairness)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (SLOTS * N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
