// write_controller: serial-in, parallel-out register with a movable entry
// point, which turns a schedule word into the write enables of the main
// buffer's memory units.
//
// The schedule arrives from the scheduler one bit per clock, slot 16 first.
// Every clock the register shifts one place to the left (#N to #N+1, #16 to
// #1), except at the entry bit, which takes the incoming bit instead. The
// entry bit is the one to the left of the read pointer (pointer on #N gives
// entry #N+1). After the sixteen clocks of a slot, the bit of future slot 1
// sits in the entry bit, slot 2 to its left, and slot 16 right of it, on the
// unit the read pointer is on: every memory unit is lined up with the slot
// it will be read in. wc_next is the register's next value; at the last
// clock of the slot it is the complete word and the main buffer uses it as
// its write enables at that edge.
module write_controller #(
  parameter int unsigned T = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [T-1:0] ptr,                 // read pointer, one-hot
  input  logic         sched_in,            // serial schedule
  output logic [T-1:0] wc,                  // register
  output logic [T-1:0] wc_next              // value after this clock
);
  logic [T-1:0] entry;

  assign entry = {ptr[T-2:0], ptr[T-1]};

  always_comb begin
    for (int j = 0; j < T; j++)
      wc_next[j] = entry[j] ? sched_in : wc[(j+T-1)%T];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wc <= '0;
    else        wc <= wc_next;
  end
endmodule
