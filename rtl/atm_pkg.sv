// atm_pkg: sizes and types shared by the 16x16 time-scheduling ATM switch.
//
// A time slot is the time to pass one 53-octet cell through the switch
// fabric; every slot is divided into SLOT_CLKS clock cycles, which is also
// the number of bits of every serial request, schedule and input-address
// word. The status arrays cover NSLOTS future time slots. All three numbers
// are 16 in the original design (16 ports, 16 scheduled slots, 16 clocks of
// 2.5 ns in a 40 ns slot). A cell is carried as one CELL_BITS-wide word per
// slot; the bit-serial line format of a real port is outside this design.
package atm_pkg;

  localparam int unsigned NPORTS    = 16;   // switch ports
  localparam int unsigned NSLOTS    = 16;   // future time slots scheduled
  localparam int unsigned SLOT_CLKS = 16;   // clocks per time slot
  localparam int unsigned CELL_BITS = 424;  // 53 octets
  localparam int unsigned HDR_BITS  = 40;   // 5-octet cell header

  // UNI cell header fields, most significant first as sent on the line.
  typedef struct packed {
    logic [3:0]  gfc;
    logic [7:0]  vpi;
    logic [15:0] vci;
    logic [2:0]  pt;
    logic        clp;
    logic [7:0]  hec;
  } atm_hdr_t;

  // Result of the header look-up: where the cell goes and how far ahead it
  // may be scheduled, plus the outgoing virtual path/channel labels.
  typedef struct packed {
    logic [NPORTS-1:0] out_mask;   // multicast output address, bit k = output k+1
    logic [3:0]        prio;       // threshold: last usable slot index (15 = all)
    logic [7:0]        new_vpi;
    logic [15:0]       new_vci;
  } route_t;

  // Header error control, ITU-T I.432: CRC-8 with x^8+x^2+x+1 over the first
  // four header octets, XOR 0x55.
  function automatic logic [7:0] atm_hec(input logic [31:0] h);
    logic [7:0] crc;
    crc = 8'h00;
    for (int b = 31; b >= 0; b--) begin
      logic fb;
      fb  = crc[7] ^ h[b];
      crc = {crc[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return crc ^ 8'h55;
  endfunction

endpackage
