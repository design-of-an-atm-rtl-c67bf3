// crosspoint_switch: N x N broadcast-and-select switch fabric.
//
// Every input cell is broadcast to all N selector slices; slice c takes its
// serial input address on ia_in[c] and, for one slot after each slot_end,
// connects the addressed input to output c. Several slices selecting the
// same input multicast that cell. The fabric is configured once per slot,
// for all outputs at the same edge.
module crosspoint_switch
  import atm_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned CW = CELL_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          slot_end,
  input  logic [N-1:0]  ia_in,                  // serial input address per output
  input  logic [CW-1:0] cells_in [N],
  input  logic [N-1:0]  cells_in_valid,
  output logic [CW-1:0] cells_out [N],
  output logic [N-1:0]  cells_out_valid
);
  for (genvar c = 0; c < N; c++) begin : g_slice
    selector_slice #(.N(N), .CW(CW)) u_slice (
      .clk, .rst_n, .slot_end,
      .ia_in          (ia_in[c]),
      .cells          (cells_in),
      .cells_valid    (cells_in_valid),
      .cell_out       (cells_out[c]),
      .cell_out_valid (cells_out_valid[c]),
      .cfg            ()
    );
  end
endmodule
