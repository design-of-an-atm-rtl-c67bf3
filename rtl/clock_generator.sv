// clock_generator: slot timing of the output scheduler.
//
// Two rotating one-hot 16-bit registers, both reset to 0000_0000_0000_0001.
// Register A advances every clock, so its token marks the clock phase within
// the 16-clock time slot: phase[0] (A1) is high in the first clock of a slot
// and phase[15] in the last. slot_end = phase[15] is the enable of every
// per-slot register in the switch: they all update at the edge that closes
// the slot, which is also the edge at which A1 rises again. Register B
// advances once per slot at that same edge; its token is the fairness
// pointer, telling which row of elementary schedulers returns the output
// status arrays (the row below it receives them first).
// Clock buffering and distribution of the original are physical and not
// modelled.
module clock_generator #(
  parameter int unsigned N = 16          // clocks per slot and rows
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [N-1:0] phase,            // register A, one-hot clock phase
  output logic         slot_end,         // last clock of the slot
  output logic [N-1:0] fair_ptr          // register B, one-hot pointed row
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= N'(1);
      fair_ptr <= N'(1);
    end else begin
      phase <= {phase[N-2:0], phase[N-1]};
      if (phase[N-1]) fair_ptr <= {fair_ptr[N-2:0], fair_ptr[N-1]};
    end
  end

  assign slot_end = phase[N-1];
endmodule
