// banyan_switch: the switch network between the input and output controllers.
//
// Three columns of four 2x2 elements (banyan_se). Column 0 is the extra stage
// that makes the network "modified": it pairs inputs 2k and 2k+1 and steers
// each packet by its path bit, so every input reaches every output over two
// different paths. Columns 1 and 2 are self-routing Banyan stages in omega
// (perfect shuffle) form, steered by destination bits d2 and d1, MSB first.
// A final perfect shuffle presents the links to the output controller, whose
// elements route on d0. The omega wiring is this implementation's choice of
// Banyan topology; the pairing of adjacent inputs in the first column and the
// MSB-first self-routing follow the design.
//
// Link numbering: after column 0 a packet from input a2a1a0 with path bit p is
// on link a2a1p; the shuffle rotates the link number left and each element
// replaces its least significant bit with the control bit, so the output
// controller sees the packet on link d2 d1 p and delivers it to d2 d1 d0.
//
// Combinational. Packets that lose an arbitration are dropped here and reported
// through the missing grant; `prio` picks the winner in every element.
module banyan_switch
  import mbs_pkg::*;
(
  input  link_t in_links  [N_PORTS],
  input  logic  prio,
  output link_t out_links [N_PORTS]   // to the output controller, pairs 2k/2k+1
);

  localparam int unsigned COLS = 3;

  // link number after a perfect shuffle: rotate left by one bit
  function automatic logic [ADDR_W-1:0] shuffle(input logic [ADDR_W-1:0] a);
    return {a[ADDR_W-2:0], a[ADDR_W-1]};
  endfunction

  for (genvar c = 0; c < COLS; c++) begin : g_col
    link_t col_in  [N_PORTS];
    link_t col_out [N_PORTS];
    // inputs of column c
    for (genvar l = 0; l < N_PORTS; l++) begin : g_wire
      if (c == 0) begin : g_first
        assign col_in[l] = in_links[l];
      end else begin : g_shuf
        assign col_in[shuffle(ADDR_W'(l))] = g_col[c-1].col_out[l];
      end
    end
    for (genvar k = 0; k < N_PORTS / 2; k++) begin : g_se
      logic h0, h1;
      // column 0 routes on the path bit, column c on destination bit d(3-c)
      if (c == 0) begin : g_path
        assign h0 = col_in[2*k].path;
        assign h1 = col_in[2*k+1].path;
      end else begin : g_dest
        assign h0 = col_in[2*k].dest[ADDR_W-c];
        assign h1 = col_in[2*k+1].dest[ADDR_W-c];
      end
      banyan_se u_se (
        .in0  (col_in[2*k]),
        .in1  (col_in[2*k+1]),
        .h0   (h0),
        .h1   (h1),
        .prio (prio),
        .out0 (col_out[2*k]),
        .out1 (col_out[2*k+1]),
        .pass0(),
        .pass1()
      );
    end
  end

  for (genvar l = 0; l < N_PORTS; l++) begin : g_out
    assign out_links[shuffle(ADDR_W'(l))] = g_col[COLS-1].col_out[l];
  end

endmodule
