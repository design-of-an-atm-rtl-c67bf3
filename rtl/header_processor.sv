// header_processor: first stage of an input port controller.
//
// Looks at the 5-octet header of each arriving cell (the top 40 bits of the
// cell word). Idle cells, inserted by the physical layer and recognised by
// the header octets 00 00 00 01 (GFC, VPI, VCI and PT zero, CLP one), are
// dropped at once. For a user cell the low RB bits of the VCI index a
// routing table whose entry gives the multicast output address, the 4-bit
// priority threshold and the outgoing VPI/VCI; the header is rewritten with
// the new labels and a recomputed HEC. The routing table is written through
// the cfg_* port, one entry per clock; an entry with an all-zero output
// address routes nowhere and the cell is then dropped by the scheduler.
// The idle pattern, the table, its size and the label translation are this
// design's own choices: only the function of the block is given.
// Combinational from cell_in to the outputs; the table write is clocked.
module header_processor
  import atm_pkg::*;
#(
  parameter int unsigned CW = CELL_BITS,
  parameter int unsigned RB = 6                 // routing table index bits
) (
  input  logic          clk,
  input  logic          cfg_we,
  input  logic [RB-1:0] cfg_addr,
  input  route_t        cfg_data,
  input  logic [CW-1:0] cell_in,
  input  logic          cell_in_valid,
  output logic          user,                   // a user cell to be switched
  output logic          idle_drop,              // an idle cell was discarded
  output route_t        route,                  // its routing entry
  output logic [CW-1:0] cell_out                // cell with updated header
);
  route_t   table_q [2**RB];
  atm_hdr_t hdr, hdr_new;
  logic     idle;

  always_ff @(posedge clk)
    if (cfg_we) table_q[cfg_addr] <= cfg_data;

  always_comb begin
    hdr       = atm_hdr_t'(cell_in[CW-1 -: HDR_BITS]);
    idle      = (hdr[HDR_BITS-1:8] == 32'h0000_0001);
    user      = cell_in_valid & ~idle;
    idle_drop = cell_in_valid & idle;
    route     = user ? table_q[hdr.vci[RB-1:0]] : '0;
    hdr_new     = hdr;
    hdr_new.vpi = route.new_vpi;
    hdr_new.vci = route.new_vci;
    hdr_new.hec = atm_hec(hdr_new[HDR_BITS-1:8]);
    cell_out  = {hdr_new, cell_in[CW-HDR_BITS-1:0]};
  end
endmodule
