// input_status_register: the per-input part of the output scheduler.
//
// Holds, for one input port:
//  * the output-address register: a 16-bit serial-in register that takes the
//    input port controller's multicast output address, most significant bit
//    (output 16) first, one bit per clock. At slot_end the complete word
//    becomes the request (req) for the next slot's comparison.
//  * the priority register: the 4-bit threshold code arrives serially, most
//    significant bit first, in the last four clocks of the slot, and is
//    decoded by a 4:16 decoder into p_mask.
//  * the input status array: bit k = 1 means the input already sends a cell
//    in future slot k+1. At slot_end it takes status | e_bus (the OR of this
//    row's schedules) and shifts one place towards slot 1, a 0 entering at
//    slot 16.
//  * the schedule status register: loads e_bus at slot_end and shifts it to
//    the input port controller during the following slot, most significant
//    bit (slot 16) first, one bit per clock on sched_out.
// Request, threshold and schedule words are thus one slot each, which makes
// the scheduler a three-slot pipeline (import, compare, export).
module input_status_register #(
  parameter int unsigned T = 16                  // time slots (and clocks per slot)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         slot_end,
  input  logic         oa_in,                    // serial output address
  input  logic         prio_in,                  // serial priority code
  input  logic [T-1:0] e_bus,                    // OR of the row's schedules
  output logic [T-1:0] req,                      // output address for this slot
  output logic [T-1:0] p_mask,                   // decoded threshold for this slot
  output logic [T-1:0] status,                   // input status array
  output logic         sched_out                 // serial schedule to the IPC
);
  localparam int unsigned PW = $clog2(T);

  logic [T-1:0]  oa_sr;
  logic [PW-1:0] pr_sr;
  logic [PW-1:0] prio_q;
  logic [T-1:0]  ss;
  logic [T-1:0]  status_or;

  assign status_or = status | e_bus;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oa_sr  <= '0;
      pr_sr  <= '0;
      req    <= '0;
      prio_q <= '0;
      status <= '0;
      ss     <= '0;
    end else begin
      oa_sr <= {oa_sr[T-2:0], oa_in};
      pr_sr <= {pr_sr[PW-2:0], prio_in};
      if (slot_end) begin
        req    <= {oa_sr[T-2:0], oa_in};
        prio_q <= {pr_sr[PW-2:0], prio_in};
        status <= {1'b0, status_or[T-1:1]};
        ss     <= e_bus;
      end else begin
        ss     <= {ss[T-2:0], 1'b0};
      end
    end
  end

  assign sched_out = ss[T-1];

  priority_decoder #(.T(T)) u_dec (.prio(prio_q), .p_mask(p_mask));

  // A schedule never books a slot the input already uses.
  a_no_double_booking: assert property (@(posedge clk) disable iff (!rst_n)
                                        slot_end |-> (status & e_bus) == '0);
endmodule
