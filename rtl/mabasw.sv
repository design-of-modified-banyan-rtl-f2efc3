// mabasw: 8x8 modified Banyan packet switch (top level).
//
// Eight bit-serial input ports feed two input controllers (inputs 0-3 and
// 4-7), which queue whole packets and offer one packet per input per slot to
// the switch network. The network is a Banyan with one extra first column, so
// that every input has two paths to every output; the output controller forms
// the last column and gives every output port a one-packet buffer. Two packets
// for the same output in one slot are therefore both taken: one leaves at
// once, the other one slot later. A packet that loses an arbitration inside
// the network, or finds its output buffer already busy, is not lost: its input
// controller keeps it and offers it again in the next slot over the other
// path.
//
// Slot framing: every packet occupies PKT_LEN clocks of `cp`; `shcp` is a
// one-clock strobe on the first clock of a slot (the activity bit), needed
// once and then every PKT_LEN clocks or never again. The packet format is in
// mbs_pkg: activity bit, path bit, destination d2 d1 d0, DATA_W data bits,
// all MSB first. Inputs must be aligned to the slots.
//
// Latency: a packet received in slot n appears, unchanged apart from the path
// bit, on its output port in slot n+1 when it meets no contention; the same
// clock position within the slot (PKT_LEN clocks from input bit to output
// bit). The routing controls change only at slot boundaries, and within a slot
// the serial bits cross the network combinationally.
// The port list follows the switch's schematic symbol (data inputs, shift
// strobe, clock, data outputs); the reset and the status outputs are added.
module mabasw
  import mbs_pkg::*;
#(
  parameter int unsigned DATA_W = 8,              // data bits per packet
  parameter int unsigned DEPTH  = 4,              // packets per input FIFO
  parameter int unsigned PKT_LEN = HDR_W + DATA_W
) (
  input  logic               cp,        // bit clock
  input  logic               rst_n,     // asynchronous reset, active low
  input  logic               shcp,      // slot start strobe
  input  logic [N_PORTS-1:0] din,       // serial input ports 0..7
  output logic [N_PORTS-1:0] dout,      // serial output ports 0..7
  output logic               slot_end,  // last clock of a slot
  output logic [N_PORTS-1:0] overflow,  // per input: arriving packet dropped, FIFO full
  output logic [N_PORTS-1:0] retry,     // per input: offered packet refused, resent
  output logic [N_PORTS-1:0] stored,    // per output: a packet enters its buffer
  output logic [N_PORTS-1:0] refused    // per output: a packet was refused there
);

  localparam int unsigned POS_W = $clog2(PKT_LEN);

  // ---------------------------------------------------------------- framing
  logic [POS_W-1:0] pos_q, pos;
  logic             framed, prio, path_slot;

  always_comb begin
    pos       = shcp ? '0 : pos_q;
    slot_end  = (framed || shcp) && (pos == POS_W'(PKT_LEN - 1));
    path_slot = (framed || shcp) && (pos == POS_W'(1));
  end

  always_ff @(posedge cp or negedge rst_n) begin
    if (!rst_n) begin
      pos_q  <= '0;
      framed <= 1'b0;
      prio   <= 1'b0;
    end else begin
      pos_q <= (pos == POS_W'(PKT_LEN - 1)) ? '0 : pos + 1'b1;
      if (shcp) framed <= 1'b1;
      if (slot_end) prio <= !prio;   // alternate the arbitration winner
    end
  end

  // shcp may only restate the slot boundary that is already running
  a_shcp_aligned: assert property (@(posedge cp) disable iff (!rst_n)
                                   (shcp && framed) |-> (pos_q == '0));

  // -------------------------------------------------------- input controllers
  link_t              ic_links [N_PORTS];
  link_t              oc_links [N_PORTS];
  logic [N_PORTS-1:0] grant, acc;

  for (genvar g = 0; g < 2; g++) begin : g_ic
    localparam int unsigned NP = N_PORTS / 2;
    link_t links [NP];
    input_controller #(
      .PKT_LEN (PKT_LEN),
      .DEPTH   (DEPTH),
      .NP      (NP),
      .SRC_BASE(g * NP)
    ) u_ic (
      .cp       (cp),
      .rst_n    (rst_n),
      .slot_end (slot_end),
      .path_slot(path_slot),
      .din      (din[g*NP +: NP]),
      .grant    (grant[g*NP +: NP]),
      .links    (links),
      .overflow (overflow[g*NP +: NP]),
      .retry    (retry[g*NP +: NP])
    );
    for (genvar i = 0; i < NP; i++) begin : g_l
      assign ic_links[g*NP + i] = links[i];
    end
  end

  // ---------------------------------------------------------- switch network
  banyan_switch u_switch (
    .in_links (ic_links),
    .prio     (prio),
    .out_links(oc_links)
  );

  // ------------------------------------------------------- output controller
  output_controller #(.PKT_LEN(PKT_LEN)) u_oc (
    .cp      (cp),
    .rst_n   (rst_n),
    .slot_end(slot_end),
    .in_links(oc_links),
    .prio    (prio),
    .dout    (dout),
    .acc     (acc),
    .stored  (stored),
    .refused (refused)
  );

  // grant back to the input whose packet the output controller took
  always_comb begin
    grant = '0;
    for (int l = 0; l < N_PORTS; l++)
      if (oc_links[l].valid && acc[l]) grant[oc_links[l].src] = 1'b1;
  end

endmodule
