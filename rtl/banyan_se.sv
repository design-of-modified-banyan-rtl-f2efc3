// banyan_se: 2x2 self-routing switching element.
//
// Each data input In0/In1 has its own control bit H0/H1: a packet whose control
// bit is 0 leaves on output 0 (upper), one whose bit is 1 leaves on output 1
// (lower). Different control bits give the straight or the cross state, as in
// the two-function switch box of the design. When both inputs carry a packet
// and their control bits are equal, only one can pass: the input named by
// `prio` (0 = In0, 1 = In1) wins and the other is blocked; pass0/pass1 report
// which inputs got through so the input controller can keep a blocked packet
// and resend it. The arbitration rule is this implementation's choice.
//
// Purely combinational: the control bits are stable for a whole slot and the
// serial data bit (dbit) follows the setting with no delay.
module banyan_se
  import mbs_pkg::*;
(
  input  link_t in0,
  input  link_t in1,
  input  logic  h0,     // control bit of In0
  input  logic  h1,     // control bit of In1
  input  logic  prio,   // winner when both want the same output
  output link_t out0,
  output link_t out1,
  output logic  pass0,
  output logic  pass1
);

  logic conflict;

  always_comb begin
    conflict = in0.valid && in1.valid && (h0 == h1);
    pass0    = in0.valid && (!conflict || !prio);
    pass1    = in1.valid && (!conflict ||  prio);

    out0 = LINK_IDLE;
    out1 = LINK_IDLE;
    if (pass0) begin
      if (h0) out1 = in0;
      else    out0 = in0;
    end
    if (pass1) begin
      if (h1) out1 = in1;
      else    out0 = in1;
    end
  end

endmodule
