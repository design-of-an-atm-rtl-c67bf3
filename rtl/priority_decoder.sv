// priority_decoder: 4-to-16 decoder of the priority threshold.
//
// A cell's priority reaches the scheduler as a 4-bit number v. The comparison
// units need it as a one-hot array whose set bit marks the last time slot the
// cell may use: bit v set means slots 1..v+1 are allowed, so v = 15 (array
// 1000_0000_0000_0000) gives a high-priority cell all sixteen slots and
// v = 11 (0000_1000_0000_0000) gives the first twelve. Purely combinational.
module priority_decoder #(
  parameter int unsigned T = 16          // time slots, one output bit each
) (
  input  logic [$clog2(T)-1:0] prio,     // threshold code
  output logic [T-1:0]         p_mask    // one-hot threshold array
);
  always_comb begin
    p_mask = '0;
    p_mask[prio] = 1'b1;
  end
endmodule
