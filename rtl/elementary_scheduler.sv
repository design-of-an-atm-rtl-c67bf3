// elementary_scheduler: the scheduling cell of one input-output pair.
//
// Sixteen comparison units, one per future time slot, are chained through
// their active-low blocking signals. The first unit is enabled by this
// output's bit of the input's output address (en); each later unit only
// works if no earlier slot was found and the priority threshold was not
// passed, so at most one slot is scheduled: the first one in which both the
// input (in_status) and the output (x_in) are free. The output status array
// enters from the row above (x_in) and leaves, updated, to the row below
// (x_out); in the pointed row it is returned to the output status register
// on t instead, and the array from the register (f) is sent down (see
// comparison_unit). All of this settles within one time slot.
//
// Registers, all updated at the edge that ends a slot (slot_end high):
//  * schedule register sr: the slots this pair has booked. It takes
//    sr | e and shifts one place towards slot 1, a 0 entering slot 16.
//  * ia_hold: the bit shifted out of sr (the pair's booking for the slot
//    that has just become due).
//  * ia_sr: one stage of the column's parallel-in serial-out input-address
//    register. It loads ia_hold at slot_end and otherwise shifts
//    ia_shift_in to ia_shift_out every clock.
// ia_hold is this design's choice: it delays the input address by one slot
// so that the address reaches the switch in the same slot as the cell,
// which needs one extra slot in the input port controller's buffers.
module elementary_scheduler #(
  parameter int unsigned T = 16                // time slots
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         slot_end,               // last clock of the slot
  input  logic         en,                     // output requested by this input
  input  logic [T-1:0] p_mask,                 // decoded priority threshold
  input  logic [T-1:0] in_status,              // input status array
  input  logic [T-1:0] x_in,                   // output status from row above
  input  logic [T-1:0] f,                      // output status from register
  input  logic         fairness,               // this row returns the column
  output logic [T-1:0] x_out,                  // output status to row below
  output logic [T-1:0] t,                      // returned output status
  output logic [T-1:0] e,                      // schedule made this slot
  input  logic         ia_shift_in,            // input-address chain
  output logic         ia_shift_out
);
  logic [T:0]   up;        // up[k] enables unit k (active low)
  logic [T-1:0] sr;        // schedule register
  logic [T-1:0] sr_next;
  logic         ia_hold;

  assign up[0] = ~en;

  for (genvar k = 0; k < T; k++) begin : g_unit
    comparison_unit u_cu (
      .i        (in_status[k]),
      .x        (x_in[k]),
      .p        (p_mask[k]),
      .up       (up[k]),
      .f        (f[k]),
      .fairness (fairness),
      .e_tmp    (e[k]),
      .down     (up[k+1]),
      .x_out    (x_out[k]),
      .t        (t[k])
    );
  end

  assign sr_next = sr | e;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr           <= '0;
      ia_hold      <= 1'b0;
      ia_shift_out <= 1'b0;
    end else if (slot_end) begin
      sr           <= {1'b0, sr_next[T-1:1]};
      ia_hold      <= sr_next[0];
      ia_shift_out <= ia_hold;
    end else begin
      ia_shift_out <= ia_shift_in;
    end
  end

  // At most one slot is booked per request.
  a_one_schedule: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(e));
  // A slot is booked only where both ports were free.
  a_free_slot: assert property (@(posedge clk) disable iff (!rst_n) (e & (in_status | x_in)) == '0);
endmodule
