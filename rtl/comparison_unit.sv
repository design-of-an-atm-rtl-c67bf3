// comparison_unit: one time slot of an elementary scheduler.
//
// Compares the input status bit i and output status bit x of one future time
// slot. The enable chain is active low, as in the original circuit: up = 0
// means this unit may schedule, up = 1 means an earlier unit already found a
// slot, the output was not requested, or the priority threshold was passed.
//   e_tmp = ~(i | x) & ~up         schedule made in this slot
//   x_tmp = (~i & ~up) | x         updated output status (equals x | e_tmp)
//   down  = ~(i | x) | p | up      blocks all later units
// p is this slot's bit of the decoded priority threshold: the unit itself may
// still schedule, but no later slot may be used.
// The fairness switch chooses where the updated status goes. With fairness = 0
// the unit passes x_tmp down the column (x_out) and returns nothing (t = 0).
// With fairness = 1 this row is the pointed row: x_tmp is returned to the
// output status register on t, and the array f coming from the register is
// passed down instead, so that the next row becomes the entry row. The
// original uses a tri-state return bus; here the returns of all rows are
// ORed, so an idle unit drives 0. Purely combinational.
// In the array the x_out of the last row feeds the x of the first, so the
// column is a closed ring through this unit's x -> x_out path, which lint
// tools report as a combinational loop. It is never live: exactly one row
// has fairness = 1 and there x_out takes f from a register, cutting the ring.
// The ring is the original's own structure: it lets any row be the entry row
// without a multiplexer at every row, so it stands.
module comparison_unit (
  input  logic i,          // input status (1 = input already busy)
  input  logic x,          // output status arriving from the row above
  input  logic p,          // priority threshold bit of this slot
  input  logic up,         // enable from the previous slot, active low
  input  logic f,          // output status from the output status register
  input  logic fairness,   // 1: this row returns the column to the register
  output logic e_tmp,      // schedule made in this slot
  output logic down,       // enable to the next slot, active low
  output logic x_out,      // output status to the row below
  output logic t           // output status returned to the register
);
  logic x_tmp;

  always_comb begin
    e_tmp = ~(i | x) & ~up;
    x_tmp = (~i & ~up) | x;
    down  = ~(i | x) | p | up;
    x_out = fairness ? f : x_tmp;
    t     = fairness ? x_tmp : 1'b0;
  end
endmodule
