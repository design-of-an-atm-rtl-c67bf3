// output_scheduler: time-slot scheduler of the 16x16 input-buffered switch.
//
// An N x N array of elementary schedulers: row r belongs to input r, column
// c to output c. Each input port controller shifts in, during one slot, the
// multicast output address and 4-bit priority of its newest cell (import).
// In the next slot the requests are compared (compare): every row sees its
// own input status array, and each column's output status array ripples
// from row to row, so that requested rows book, in turn, the first future
// slot in which both their input and that output are free and which lies
// within their priority threshold. The ORed bookings of a row (e_bus) update
// its input status array and are shifted back to the controller during the
// third slot (export); a controller that gets an all-zero schedule drops the
// cell. Each column also keeps, per row, the booked slots, and when a booked
// slot comes due its column of bits is shifted out, row N first, as the
// one-hot input address of that output's selector in the switch fabric.
//
// Fairness: the row that sees a column's array first would always win. The
// clock generator's slot-rotating pointer picks a row each slot; the row
// below it is the entry row, and the array goes round the ring of rows back
// to the pointed row, which returns it to the output status register. Over
// 16 slots every row is first equally often.
//
// The ring of rows is a closed combinational path in the netlist and lint
// tools report it as such; it is opened in exactly one row every slot by the
// one-hot fairness pointer, so no signal ever depends on itself.
//
// Timing: all words are serial, one bit per clock, N clocks per slot, most
// significant bit first; every register updates at the edge ending a slot.
// A status bit k seen in the compare slot m stands for switch slot m+3+k.
// The schedule word leaves during slot m+1 and the input address during
// slot m+2; the switch latches it at the end of m+2 and connects in m+3.
module output_scheduler #(
  parameter int unsigned N = 16            // ports = time slots = clocks per slot
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] oa_in,              // serial output address, per input
  input  logic [N-1:0] prio_in,            // serial priority code, per input
  output logic [N-1:0] sched_out,          // serial schedule, per input
  output logic [N-1:0] ia_out,             // serial input address, per output
  output logic         slot_end,           // last clock of each slot
  output logic [N-1:0] fair_ptr            // pointed row (for observation)
);
  logic [N-1:0] req      [N];              // [row] output address
  logic [N-1:0] p_mask   [N];              // [row]
  logic [N-1:0] in_stat  [N];              // [row]
  logic [N-1:0] e_bus    [N];              // [row]
  logic [N-1:0] out_stat [N];              // [col]
  logic [N-1:0] ret      [N];              // [col]

  logic [N-1:0] x_out [N][N];              // [row][col]
  logic [N-1:0] t     [N][N];
  logic [N-1:0] e     [N][N];
  logic         ia    [N][N];              // input-address chain

  clock_generator #(.N(N)) u_clk (
    .clk, .rst_n, .phase(), .slot_end, .fair_ptr
  );

  for (genvar r = 0; r < N; r++) begin : g_row
    input_status_register #(.T(N)) u_isr (
      .clk, .rst_n, .slot_end,
      .oa_in     (oa_in[r]),
      .prio_in   (prio_in[r]),
      .e_bus     (e_bus[r]),
      .req       (req[r]),
      .p_mask    (p_mask[r]),
      .status    (in_stat[r]),
      .sched_out (sched_out[r])
    );

    for (genvar c = 0; c < N; c++) begin : g_col
      elementary_scheduler #(.T(N)) u_es (
        .clk, .rst_n, .slot_end,
        .en           (req[r][c]),
        .p_mask       (p_mask[r]),
        .in_status    (in_stat[r]),
        .x_in         (x_out[(r+N-1)%N][c]),
        .f            (out_stat[c]),
        .fairness     (fair_ptr[r]),
        .x_out        (x_out[r][c]),
        .t            (t[r][c]),
        .e            (e[r][c]),
        .ia_shift_in  (r == 0 ? 1'b0 : ia[(r+N-1)%N][c]),
        .ia_shift_out (ia[r][c])
      );
    end

    always_comb begin
      e_bus[r] = '0;
      for (int c = 0; c < N; c++) e_bus[r] |= e[r][c];
    end
  end

  for (genvar c = 0; c < N; c++) begin : g_out
    always_comb begin
      ret[c] = '0;
      for (int r = 0; r < N; r++) ret[c] |= t[r][c];
    end

    output_status_register #(.T(N)) u_osr (
      .clk, .rst_n, .slot_end,
      .ret    (ret[c]),
      .status (out_stat[c])
    );

    assign ia_out[c] = ia[N-1][c];
  end

  // Exactly one row returns each column.
  a_one_entry: assert property (@(posedge clk) disable iff (!rst_n) $onehot(fair_ptr));
endmodule
