// oc_buffer: one-packet buffer of the output controller.
//
// Holds a single packet that lost an output port to another packet, and plays
// it back in the following slot. The packet is stored bit-serially: a
// PKT_LEN-bit shift register moves one place every clock, so a packet written
// bit by bit during one slot (wr high for the whole slot) comes out on dout in
// the same bit order during the next slot. `full` is updated at the end of each
// slot and says that dout carries a buffered packet during the current slot.
// A buffer that is read and written in the same slot streams the old packet
// out while the new one streams in. The design gives the buffer's role (hold
// one packet when two arrive for one port); the serial shift-register form is
// this implementation's.
//
// Timing: the bit written in slot position k appears on dout in slot position
// k of the next slot, PKT_LEN clocks later.
module oc_buffer #(
  parameter int unsigned PKT_LEN = 13
) (
  input  logic cp,
  input  logic rst_n,
  input  logic slot_end,   // last clock of a slot
  input  logic wr,         // store this slot's packet (stable for the slot)
  input  logic din,        // serial bit of the packet being stored
  output logic dout,       // serial bit of the stored packet
  output logic full        // a stored packet is being played back this slot
);

  logic [PKT_LEN-1:0] sr;

  always_ff @(posedge cp or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      full <= 1'b0;
    end else begin
      sr <= {sr[PKT_LEN-2:0], wr & din};
      if (slot_end) full <= wr;
    end
  end

  assign dout = full & sr[PKT_LEN-1];

endmodule
