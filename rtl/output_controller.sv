// output_controller: last column of the switch, with buffered output ports.
//
// Four oc_cell elements take link pairs (2k, 2k+1) from the switch network
// and deliver them to output ports 2k and 2k+1 by destination bit d0. Each of
// the eight ports owns a one-packet buffer, so when two packets reach the same
// port in one slot, one leaves at once and the other leaves in the next slot.
// acc[l] says that the packet on input link l was taken; links whose packets
// were refused must be resent by their input controller.
//
// Outputs are bit-serial, one bit per clock, aligned with the slot: bit 0 of a
// slot is the activity bit of the packet on the port (0 when idle).
module output_controller
  import mbs_pkg::*;
#(
  parameter int unsigned PKT_LEN = 13
) (
  input  logic                cp,
  input  logic                rst_n,
  input  logic                slot_end,
  input  link_t               in_links [N_PORTS],
  input  logic                prio,
  output logic [N_PORTS-1:0]  dout,     // serial output ports 0..7
  output logic [N_PORTS-1:0]  acc,      // per input link: packet taken
  output logic [N_PORTS-1:0]  stored,   // per port: packet enters the buffer
  output logic [N_PORTS-1:0]  refused   // per port: a packet was refused
);

  for (genvar k = 0; k < N_PORTS / 2; k++) begin : g_cell
    oc_cell #(.PKT_LEN(PKT_LEN)) u_cell (
      .cp      (cp),
      .rst_n   (rst_n),
      .slot_end(slot_end),
      .in0     (in_links[2*k]),
      .in1     (in_links[2*k+1]),
      .prio    (prio),
      .out0    (dout[2*k]),
      .out1    (dout[2*k+1]),
      .acc0    (acc[2*k]),
      .acc1    (acc[2*k+1]),
      .stored  (stored[2*k+1:2*k]),
      .refused (refused[2*k+1:2*k])
    );
  end

endmodule
