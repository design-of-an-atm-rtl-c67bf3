// input_port_controller: input side of one switch port.
//
// A cell (one CELL_BITS word with a valid flag) is taken at the edge that
// ends a slot. The header processor drops idle cells and finds the output
// address and priority of user cells. The cell then moves one temporary
// buffer per slot, #1, #2, #3, while the scheduler works on its request:
//   slot 1: cell in #1; its output address (16 bits, output 16 first) and
//           priority (4 bits, most significant first, in clocks 13..16)
//           are shifted to the scheduler on oa_out and prio_out;
//   slot 2: cell in #2; the scheduler compares status arrays;
//   slot 3: cell in #3; its schedule is shifted back on sched_in;
//   end of slot 3: the cell is written into every main-buffer unit whose
//           schedule bit is set, or dropped if none is.
// A cell booked for future slot k+1 (schedule bit k) is read into temporary
// buffer #4 at the end of slot 4+k and leaves on cell_out during slot 5+k,
// the slot in which the switch fabric connects this input to the booked
// output. One new cell can enter every slot; there is no back-pressure.
module input_port_controller
  import atm_pkg::*;
#(
  parameter int unsigned N  = 16,               // outputs = slots = clocks per slot
  parameter int unsigned CW = CELL_BITS,
  parameter int unsigned RB = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          slot_end,
  // routing table
  input  logic          cfg_we,
  input  logic [RB-1:0] cfg_addr,
  input  route_t        cfg_data,
  // cells from the line
  input  logic [CW-1:0] cell_in,
  input  logic          cell_in_valid,
  // scheduler interface, serial
  output logic          oa_out,
  output logic          prio_out,
  input  logic          sched_in,
  // to the switch fabric
  output logic [CW-1:0] cell_out,
  output logic          cell_out_valid,
  // events, one-clock pulses at slot_end
  output logic          idle_drop,
  output logic          unsched_drop,
  output logic          stored
);
  logic          user;
  route_t        route;
  logic [CW-1:0] hp_cell;
  logic          hp_idle;
  logic [CW-1:0] buf1, buf2, buf3;
  logic          v1, v2, v3;
  logic [N-1:0]  oa_sr, pr_sr;

  header_processor #(.CW(CW), .RB(RB)) u_hp (
    .clk, .cfg_we, .cfg_addr, .cfg_data,
    .cell_in, .cell_in_valid,
    .user, .idle_drop(hp_idle), .route, .cell_out(hp_cell)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      buf1 <= '0; buf2 <= '0; buf3 <= '0;
      oa_sr <= '0; pr_sr <= '0;
    end else if (slot_end) begin
      buf1  <= hp_cell; v1 <= user;
      buf2  <= buf1;    v2 <= v1;
      buf3  <= buf2;    v3 <= v2;
      oa_sr <= route.out_mask[N-1:0];
      pr_sr <= N'(route.prio);
    end else begin
      oa_sr <= {oa_sr[N-2:0], 1'b0};
      pr_sr <= {pr_sr[N-2:0], 1'b0};
    end
  end

  assign oa_out   = oa_sr[N-1];
  assign prio_out = pr_sr[N-1];

  main_buffer #(.T(N), .CW(CW)) u_mb (
    .clk, .rst_n, .slot_end, .sched_in,
    .cell_in (buf3),
    .cell_out, .cell_out_valid, .stored, .ptr()
  );

  assign idle_drop    = slot_end & hp_idle;
  assign unsched_drop = slot_end & v3 & ~stored;

  // Only cells that are in #3 get a schedule.
  a_sched_for_cell: assert property (@(posedge clk) disable iff (!rst_n) stored |-> v3);
endmodule
