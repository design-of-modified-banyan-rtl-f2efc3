// ic_port: one input of the input controller (packet register and header register).
//
// Receives the serial packet stream of one input port, keeps whole packets in
// a packet-register FIFO, and offers the oldest one to the switch once per
// slot. At the end of every slot (slot_end):
//   * the packet that arrived during the slot is pushed if its activity bit is
//     1 (and dropped, with `overflow`, when the FIFO is full);
//   * the packet offered during the slot is popped if the switch took it
//     (`grant`); otherwise it stays at the head and is offered again, with
//     the preferred path bit inverted so that the retry tries the other path
//     of the network (`retry` marks this);
//   * the head packet is copied into the header register (activity, path,
//     destination) and into the transmit shift register.
// During the slot the header register is stable and drives the self-routing
// controls; the transmit register sends the packet one bit per clock. While
// `path_slot` is high the path bit chosen by the input controller (`path_in`)
// is sent in place of the stored one, so the header leaving the controller
// always matches the route it takes.
// A packet therefore leaves one slot after the slot in which it arrived, at
// the earliest. The FIFO depth and the retry rule are this implementation's
// choices; the split into a FIFO packet register and a header register that
// the packet moves into follows the design.
module ic_port
  import mbs_pkg::*;
#(
  parameter int unsigned PKT_LEN = 13,
  parameter int unsigned DEPTH   = 4
) (
  input  logic              cp,
  input  logic              rst_n,
  input  logic              slot_end,   // last clock of a slot
  input  logic              path_slot,  // the path bit is on the wire this clock
  input  logic              din,        // serial input port
  input  logic              grant,      // offered packet taken by the switch
  input  logic              path_in,    // path bit chosen by the input controller
  output logic              hr_valid,   // header register holds an offered packet
  output logic              pref_path,  // preferred path bit of the offered packet
  output logic [ADDR_W-1:0] hr_dest,    // destination of the offered packet
  output logic              dout,       // serial stream into the switch
  output logic              overflow,   // an arriving packet was dropped (one clock)
  output logic              retry       // the offered packet was refused (one clock)
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned ACT_BIT  = PKT_LEN - 1;
  localparam int unsigned PATH_BIT = PKT_LEN - 2;

  logic [PKT_LEN-1:0] mem [DEPTH];
  logic [PW-1:0]      rd_ptr, wr_ptr;
  logic [PW:0]        count;
  logic [PKT_LEN-2:0] rx_sr;
  logic [PKT_LEN-1:0] tx_sr;
  logic               hr_path, flip;

  logic [PKT_LEN-1:0] rx_pkt, next_pkt;
  logic               push, pop, drop, has_next;
  logic [PW:0]        count_left;
  logic [PW-1:0]      rd_next;

  always_comb begin
    rx_pkt     = {rx_sr, din};
    pop        = hr_valid && grant;
    count_left = count - {{PW{1'b0}}, pop};
    drop       = rx_pkt[ACT_BIT] && (count_left == (PW+1)'(DEPTH));
    push       = rx_pkt[ACT_BIT] && !drop;
    rd_next    = pop ? PW'(rd_ptr + 1'b1) : rd_ptr;
    has_next   = (count_left != '0) || push;
    next_pkt   = (count_left != '0) ? mem[rd_next] : rx_pkt;
  end

  always_ff @(posedge cp or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      rx_sr    <= '0;
      tx_sr    <= '0;
      hr_valid <= 1'b0;
      hr_path  <= 1'b0;
      hr_dest  <= '0;
      flip     <= 1'b0;
      overflow <= 1'b0;
      retry    <= 1'b0;
    end else begin
      rx_sr    <= rx_pkt[PKT_LEN-2:0];
      overflow <= 1'b0;
      retry    <= 1'b0;
      if (slot_end) begin
        if (push) begin
          mem[wr_ptr] <= rx_pkt;
          wr_ptr      <= PW'(wr_ptr + 1'b1);
        end
        rd_ptr   <= rd_next;
        count    <= count_left + {{PW{1'b0}}, push};
        overflow <= drop;
        retry    <= hr_valid && !grant;
        // a refused packet tries the other path next time
        flip     <= (hr_valid && !grant) ? !flip : 1'b0;
        hr_valid <= has_next;
        hr_path  <= next_pkt[PATH_BIT];
        hr_dest  <= next_pkt[PATH_BIT-1 -: ADDR_W];
        tx_sr    <= has_next ? next_pkt : '0;
      end else begin
        tx_sr <= {tx_sr[PKT_LEN-2:0], 1'b0};
      end
    end
  end

  assign pref_path = hr_path ^ flip;
  assign dout      = hr_valid && (path_slot ? path_in : tx_sr[PKT_LEN-1]);

endmodule
