// mbs_pkg: constants and types shared by the modified Banyan switch.
//
// A packet travels bit-serially, one bit per clock, in a fixed-length slot of
// PKT_LEN clocks. Bit 0 of a slot is the activity bit (1 = packet present),
// bits 1..4 are the routing header sent MSB first: the path bit that steers the
// extra first stage, then destination bits d2, d1, d0. The data field follows,
// MSB first. The five header bits, the activity bit leading and the MSB-to-LSB
// order follow the packet layout of the design; the data length, the position
// of the path bit and the slot framing are choices of this implementation.
package mbs_pkg;

  localparam int unsigned N_PORTS  = 8;   // inputs and outputs of the switch
  localparam int unsigned ADDR_W   = 3;   // destination address bits (log2 N_PORTS)
  localparam int unsigned HDR_W    = 5;   // activity bit + path bit + 3 destination bits
  localparam int unsigned SRC_W    = 3;   // input number carried with a packet for grant return

  // One link of the switch fabric during a slot. The header fields are stable
  // for the whole slot; dbit is the serial bit crossing the link this clock.
  typedef struct packed {
    logic              valid;  // a packet occupies the link this slot
    logic [SRC_W-1:0]  src;    // input port the packet came from
    logic              path;   // path bit: output of the first (extra) stage
    logic [ADDR_W-1:0] dest;   // destination output, MSB first
    logic              dbit;   // serial packet bit on the link this clock
  } link_t;

  localparam link_t LINK_IDLE = '{valid: 1'b0, src: '0, path: 1'b0, dest: '0, dbit: 1'b0};

endpackage
