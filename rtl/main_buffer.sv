// main_buffer: the cell store of an input port controller.
//
// T memory units, each holding one cell and a valid bit. A unit stands for
// a future time slot, and which slot it stands for moves with the read
// pointer (read_controller). A cell is only stored if the scheduler booked
// it into at least one slot; it is then written, in the same edge, into
// every unit whose schedule bit is set, so a multicast cell booked into
// several slots has several copies. Cells never booked are not written and
// are thereby dropped.
//
// Timing: the cell to store (cell_in, from temporary buffer #3) must be held
// during the slot in which the schedule is shifted in on sched_in; the write
// happens at the slot_end edge, with wc_next of the write controller as the
// write enables. At every slot_end the unit under the read pointer is copied
// to temporary buffer #4 (cell_out, cell_out_valid) and marked empty; #4
// holds the cell for the whole next slot, the slot in which the switch
// fabric is configured for it. The unit being read at an edge may be written
// at the same edge (it is then the unit of slot 16), the read gets the old
// cell.
module main_buffer
  import atm_pkg::*;
#(
  parameter int unsigned T  = 16,
  parameter int unsigned CW = CELL_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          slot_end,
  input  logic          sched_in,           // serial schedule, slot 16 first
  input  logic [CW-1:0] cell_in,            // temporary buffer #3
  output logic [CW-1:0] cell_out,           // temporary buffer #4
  output logic          cell_out_valid,
  output logic          stored,             // pulse: cell_in written (slot_end)
  output logic [T-1:0]  ptr                 // read pointer (for observation)
);
  logic [T-1:0]  wc, wc_next, we;
  logic [CW-1:0] mem [T];
  logic [T-1:0]  valid;
  logic [CW-1:0] rd_cell;
  logic          rd_valid;

  read_controller #(.T(T)) u_rd (.clk, .rst_n, .slot_end, .ptr);

  write_controller #(.T(T)) u_wr (.clk, .rst_n, .ptr, .sched_in, .wc, .wc_next);

  assign we     = slot_end ? wc_next : '0;
  assign stored = |we;

  always_comb begin
    rd_cell  = '0;
    rd_valid = 1'b0;
    for (int j = 0; j < T; j++)
      if (ptr[j]) begin
        rd_cell  = mem[j];
        rd_valid = valid[j];
      end
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < T; j++)
      if (we[j]) mem[j] <= cell_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid          <= '0;
      cell_out       <= '0;
      cell_out_valid <= 1'b0;
    end else if (slot_end) begin
      valid          <= (valid & ~ptr) | we;
      cell_out       <= rd_cell;
      cell_out_valid <= rd_valid;
    end
  end

  // The schedule never books a slot whose unit still holds a cell.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
                                   (we & valid & ~ptr) == '0);
endmodule
