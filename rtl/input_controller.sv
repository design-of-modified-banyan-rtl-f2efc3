// input_controller: input controller for four switch inputs (IC1 or IC2).
//
// Holds four ic_port instances, one per input, in two pairs. Each pair feeds
// one element of the switch's first (extra) column, so the controller also
// does the address generation for that column: it rewrites the path bit of
// the pair's headers so that the two packets always take different outputs of
// that element and never block each other there. The upper input of a pair
// keeps its preferred path bit; when it is active the lower input gets the
// opposite bit, otherwise its own preferred one.
// Every port presents a link to the switch: activity, source number
// (SRC_BASE + port), path and destination from the header register, held for
// the whole slot, and the serial packet bit of the current clock.
// The pairing of inputs and the rewriting of the header by the controller
// follow the design; the rule for choosing the path bits is this
// implementation's.
module input_controller
  import mbs_pkg::*;
#(
  parameter int unsigned PKT_LEN  = 13,
  parameter int unsigned DEPTH    = 4,
  parameter int unsigned NP       = 4,   // inputs per controller
  parameter int unsigned SRC_BASE = 0    // number of the first input
) (
  input  logic          cp,
  input  logic          rst_n,
  input  logic          slot_end,
  input  logic          path_slot,
  input  logic [NP-1:0] din,
  input  logic [NP-1:0] grant,
  output link_t         links [NP],
  output logic [NP-1:0] overflow,
  output logic [NP-1:0] retry
);

  logic [NP-1:0]     valid, pref, path;
  logic [ADDR_W-1:0] dest [NP];
  logic [NP-1:0]     dbit;

  for (genvar i = 0; i < NP; i++) begin : g_port
    ic_port #(.PKT_LEN(PKT_LEN), .DEPTH(DEPTH)) u_port (
      .cp       (cp),
      .rst_n    (rst_n),
      .slot_end (slot_end),
      .path_slot(path_slot),
      .din      (din[i]),
      .grant    (grant[i]),
      .path_in  (path[i]),
      .hr_valid (valid[i]),
      .pref_path(pref[i]),
      .hr_dest  (dest[i]),
      .dout     (dbit[i]),
      .overflow (overflow[i]),
      .retry    (retry[i])
    );
  end

  for (genvar p = 0; p < NP / 2; p++) begin : g_pair
    assign path[2*p]   = pref[2*p];
    assign path[2*p+1] = valid[2*p] ? !pref[2*p] : pref[2*p+1];
  end

  for (genvar i = 0; i < NP; i++) begin : g_link
    assign links[i] = '{valid: valid[i], src: SRC_W'(SRC_BASE + i), path: path[i],
                        dest: dest[i], dbit: dbit[i]};
  end

endmodule
