// atm_switch: 16x16 input-buffered ATM switch with a time-slot scheduler.
//
// Cells wait in their input port controller (IPC) instead of at the outputs.
// Each IPC asks the output scheduler for its newest cell; the scheduler books
// the first future slot, out of the next 16, in which both the input and
// each requested output are free, and tells the IPC which slots it got. The
// IPC stores the cell in the memory units of those slots and sends it into
// the crosspoint fabric in each of them, while the scheduler sends the
// fabric's selector of each booked output the input address for that slot.
// Since a slot is only booked when both ends are free, the fabric never sees
// a collision. Multicast cells ask for several outputs at once; a cell may
// go to all of them in one slot or in different slots. A 4-bit priority
// limits how far ahead a cell may be booked; a cell that gets no slot is
// dropped.
//
// All blocks share the scheduler's slot timing: a slot is N clocks (40 ns
// at the original 400 MHz), every serial word is one slot long and every
// per-slot register updates at the edge that ends a slot (slot_end). A cell
// taken at the end of slot 0 is in the fabric, at the earliest, in slot 4
// (four slots of latency) and at the latest in slot 19.
//
// The output port controllers behind cells_out are not part of this design.
module atm_switch
  import atm_pkg::*;
#(
  parameter int unsigned N  = 16,               // ports = slots = clocks per slot
  parameter int unsigned CW = CELL_BITS,
  parameter int unsigned RB = 6                 // routing-table index bits
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // routing-table write, to the IPC selected by cfg_port
  input  logic                 cfg_we,
  input  logic [$clog2(N)-1:0] cfg_port,
  input  logic [RB-1:0]        cfg_addr,
  input  route_t               cfg_data,
  // cells from the lines, taken at slot_end
  input  logic [CW-1:0]        cells_in [N],
  input  logic [N-1:0]         cells_in_valid,
  // cells to the output port controllers, valid for a whole slot
  output logic [CW-1:0]        cells_out [N],
  output logic [N-1:0]         cells_out_valid,
  // slot timing and events
  output logic                 slot_end,
  output logic [N-1:0]         fair_ptr,
  output logic [N-1:0]         idle_drop,
  output logic [N-1:0]         unsched_drop,
  output logic [N-1:0]         stored
);
  logic [N-1:0]  oa, prio, sched, ia;
  logic [CW-1:0] ipc_cell [N];
  logic [N-1:0]  ipc_valid;

  output_scheduler #(.N(N)) u_sched (
    .clk, .rst_n,
    .oa_in     (oa),
    .prio_in   (prio),
    .sched_out (sched),
    .ia_out    (ia),
    .slot_end,
    .fair_ptr
  );

  for (genvar r = 0; r < N; r++) begin : g_ipc
    input_port_controller #(.N(N), .CW(CW), .RB(RB)) u_ipc (
      .clk, .rst_n, .slot_end,
      .cfg_we         (cfg_we && cfg_port == r),
      .cfg_addr, .cfg_data,
      .cell_in        (cells_in[r]),
      .cell_in_valid  (cells_in_valid[r]),
      .oa_out         (oa[r]),
      .prio_out       (prio[r]),
      .sched_in       (sched[r]),
      .cell_out       (ipc_cell[r]),
      .cell_out_valid (ipc_valid[r]),
      .idle_drop      (idle_drop[r]),
      .unsched_drop   (unsched_drop[r]),
      .stored         (stored[r])
    );
  end

  crosspoint_switch #(.N(N), .CW(CW)) u_fabric (
    .clk, .rst_n, .slot_end,
    .ia_in           (ia),
    .cells_in        (ipc_cell),
    .cells_in_valid  (ipc_valid),
    .cells_out,
    .cells_out_valid
  );

endmodule
