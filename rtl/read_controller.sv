// read_controller: the rotating read pointer of an input port controller's
// main buffer.
//
// A circular one-hot register, reset to 0000_0000_0000_0001 (memory unit #1).
// At every slot_end the token moves one place to the left (#N to #N+1, #16
// back to #1). The memory unit under the pointer is the one whose cell is
// read out this slot; once it is read it becomes the unit of the sixteenth
// future slot, and the unit to its left is the one for the first future
// slot, which is why the write controller enters the schedule there.
module read_controller #(
  parameter int unsigned T = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         slot_end,
  output logic [T-1:0] ptr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        ptr <= T'(1);
    else if (slot_end) ptr <= {ptr[T-2:0], ptr[T-1]};
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(ptr));
endmodule
