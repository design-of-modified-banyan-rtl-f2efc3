// oc_cell: one 2x2 element of the output controller with its two buffers.
//
// The cell delivers packets to output ports 2k (out0) and 2k+1 (out1),
// steering each input link by destination bit d0 like a switching element
// (switcho). Each port has an oc_buffer. For each port, per slot:
//   * buffer empty, one packet for the port: it goes straight out;
//   * buffer empty, two packets for the port: the winner goes out and the
//     other is stored in the buffer and sent in the next slot;
//   * buffer full: the buffered packet goes out first; one newly arriving
//     packet is stored in its place and a second one is refused.
// acc0/acc1 say whether each input's packet was taken (sent or stored); a
// refused packet stays in its input controller and is sent again. `prio`
// picks the winner (0 = in0) when both inputs want the same port.
// Sending the older, buffered packet first and refusing rather than dropping
// a third packet are this implementation's choices; the design gives a
// one-packet buffer that holds one of two packets arriving for one port.
//
// Control is combinational from the link headers, which are stable during a
// slot; the output bits are combinational from the link bits and the buffers.
module oc_cell
  import mbs_pkg::*;
#(
  parameter int unsigned PKT_LEN = 13
) (
  input  logic  cp,
  input  logic  rst_n,
  input  logic  slot_end,
  input  link_t in0,
  input  link_t in1,
  input  logic  prio,
  output logic  out0,       // serial bit of port 2k
  output logic  out1,       // serial bit of port 2k+1
  output logic  acc0,       // in0's packet was taken
  output logic  acc1,       // in1's packet was taken
  output logic  [1:0] stored,   // per port: a packet enters the buffer this slot
  output logic  [1:0] refused   // per port: a packet was refused this slot
);

  logic [1:0] full, bdout, bwr, bdin, obit;
  logic [1:0] acc_in;

  always_comb begin
    acc_in  = '0;
    bwr     = '0;
    bdin    = '0;
    obit    = '0;
    refused = '0;
    for (int j = 0; j < 2; j++) begin
      logic c0, c1, w1;   // candidates and winner (w1 = in1 wins)
      c0 = in0.valid && (in0.dest[0] == j[0]);
      c1 = in1.valid && (in1.dest[0] == j[0]);
      w1 = c1 && (!c0 || prio);
      if (full[j]) begin
        obit[j] = bdout[j];
        if (c0 || c1) begin
          bwr[j]       = 1'b1;
          bdin[j]      = w1 ? in1.dbit : in0.dbit;
          acc_in[w1]   = 1'b1;
          refused[j]   = c0 && c1;
        end
      end else if (c0 && c1) begin
        obit[j]  = w1 ? in1.dbit : in0.dbit;
        bwr[j]   = 1'b1;
        bdin[j]  = w1 ? in0.dbit : in1.dbit;
        acc_in   = 2'b11;
      end else if (c0 || c1) begin
        obit[j]    = w1 ? in1.dbit : in0.dbit;
        acc_in[w1] = 1'b1;
      end
    end
  end

  for (genvar j = 0; j < 2; j++) begin : g_buf
    oc_buffer #(.PKT_LEN(PKT_LEN)) u_buf (
      .cp      (cp),
      .rst_n   (rst_n),
      .slot_end(slot_end),
      .wr      (bwr[j]),
      .din     (bdin[j]),
      .dout    (bdout[j]),
      .full    (full[j])
    );
  end

  assign out0   = obit[0];
  assign out1   = obit[1];
  assign acc0   = acc_in[0];
  assign acc1   = acc_in[1];
  assign stored = bwr;

endmodule
