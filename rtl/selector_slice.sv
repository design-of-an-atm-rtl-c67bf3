// selector_slice: one output of the broadcast-and-select switch fabric.
//
// The one-hot input address for the next slot is shifted in on ia_in, one
// bit per clock, input N first. At slot_end the complete word is copied into
// the configuration latch, and during the following slot the N:1
// multiplexer passes the cell of the addressed input to the output. With no
// bit set the output carries no cell. All slices load at the same edge, so
// the whole fabric is reconfigured once per slot.
module selector_slice
  import atm_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned CW = CELL_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          slot_end,
  input  logic          ia_in,                  // serial input address
  input  logic [CW-1:0] cells [N],              // broadcast cell inputs
  input  logic [N-1:0]  cells_valid,
  output logic [CW-1:0] cell_out,
  output logic          cell_out_valid,
  output logic [N-1:0]  cfg                     // configuration latch
);
  logic [N-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr  <= '0;
      cfg <= '0;
    end else begin
      sr <= {sr[N-2:0], ia_in};
      if (slot_end) cfg <= {sr[N-2:0], ia_in};
    end
  end

  always_comb begin
    cell_out       = '0;
    cell_out_valid = 1'b0;
    for (int j = 0; j < N; j++)
      if (cfg[j]) begin
        cell_out       = cell_out | cells[j];
        cell_out_valid = cell_out_valid | cells_valid[j];
      end
  end

  // An output is connected to at most one input, and that input has a cell:
  // the address and its cell arrive in the same slot.
  a_onehot_addr: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(cfg));
  a_cell_present: assert property (@(posedge clk) disable iff (!rst_n) (|cfg) |-> cell_out_valid);
endmodule
