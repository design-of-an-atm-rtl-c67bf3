// output_status_register: the per-output status array of the scheduler.
//
// Bit k = 1 means the output already receives a cell in future slot k+1.
// The array is sent into the column of elementary schedulers (status, to
// every row's f input; only the entry row uses it) and comes back updated on
// ret, the OR of the rows' return lines, of which only the pointed row
// drives anything. At slot_end the returned array is stored shifted one
// place towards slot 1, with a 0 entering at slot 16.
module output_status_register #(
  parameter int unsigned T = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         slot_end,
  input  logic [T-1:0] ret,                      // updated array from the column
  output logic [T-1:0] status                    // array sent into the column
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        status <= '0;
    else if (slot_end) status <= {1'b0, ret[T-1:1]};
  end

  // The column only ever adds bookings.
  a_monotonic: assert property (@(posedge clk) disable iff (!rst_n)
                                slot_end |-> (status & ~ret) == '0);
endmodule
