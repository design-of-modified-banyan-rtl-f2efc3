// tb_oc_cell: output-controller element with its two buffers.
//
// Runs 400 random slots. Each slot both inputs carry a random packet (random
// activity, destination bit d0, PKT_LEN random serial bits) and prio is
// random. A slot-level reference keeps its own copy of each port's buffer and
// predicts, clock by clock, the two serial outputs, and per slot the accept,
// stored and refused flags: a port with a full buffer sends the buffered
// packet and stores one new packet, refusing a second; a port with an empty
// buffer sends one packet and stores a second. Counts each case and fails if
// one never happened.
module tb_oc_cell;
  import mbs_pkg::*;
  localparam int unsigned L = 13;

  logic  cp = 1'b0, rst_n = 1'b0, slot_end = 1'b0, prio = 1'b0;
  link_t in0 = LINK_IDLE, in1 = LINK_IDLE;
  logic  out0, out1, acc0, acc1;
  logic [1:0] stored, refused;
  int    checks = 0, failures = 0;
  int    n_direct = 0, n_store = 0, n_refuse = 0, n_replay = 0;

  oc_cell #(.PKT_LEN(L)) dut (.*);

  always #5 cp = !cp;

  initial begin
    repeat (100000) @(posedge cp);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] pkt [2];
    logic [L-1:0] bpkt [2];
    logic         bval [2];
    logic [L-1:0] opkt [2];
    logic [1:0]   e_acc, e_st, e_ref;
    logic         nbval [2];
    logic [L-1:0] nbpkt [2];
    bval = '{1'b0, 1'b0};
    bpkt = '{'0, '0};
    repeat (3) @(posedge cp);
    rst_n = 1'b1;
    @(negedge cp);
    for (int s = 0; s < 400; s++) begin
      pkt[0] = L'({$urandom, $urandom});
      pkt[1] = L'({$urandom, $urandom});
      in0.valid = ($urandom % 3) != 0;
      in1.valid = ($urandom % 3) != 0;
      in0.dest  = 3'($urandom);
      in1.dest  = 3'($urandom);
      prio      = 1'($urandom);
      // reference for this slot
      e_acc = '0; e_st = '0; e_ref = '0;
      for (int j = 0; j < 2; j++) begin
        logic c0, c1;
        int   w, o;
        c0 = in0.valid && in0.dest[0] == 1'(j);
        c1 = in1.valid && in1.dest[0] == 1'(j);
        w  = (c1 && (!c0 || prio)) ? 1 : 0;
        o  = 1 - w;
        opkt[j]  = '0;
        nbval[j] = 1'b0;
        nbpkt[j] = '0;
        if (bval[j]) begin
          opkt[j] = bpkt[j];
          n_replay++;
          if (c0 || c1) begin
            nbval[j] = 1'b1; nbpkt[j] = pkt[w]; e_acc[w] = 1'b1; e_st[j] = 1'b1;
            if (c0 && c1) begin e_ref[j] = 1'b1; n_refuse++; end
          end
        end else if (c0 && c1) begin
          opkt[j] = pkt[w]; nbval[j] = 1'b1; nbpkt[j] = pkt[o];
          e_acc = 2'b11; e_st[j] = 1'b1; n_store++;
        end else if (c0 || c1) begin
          opkt[j] = pkt[w]; e_acc[w] = 1'b1; n_direct++;
        end
      end
      for (int k = 0; k < L; k++) begin
        in0.dbit = pkt[0][L-1-k];
        in1.dbit = pkt[1][L-1-k];
        slot_end = (k == L - 1);
        #1;
        checks += 2;
        if (out0 !== opkt[0][L-1-k]) begin failures++; $display("s%0d k%0d out0 %b", s, k, out0); end
        if (out1 !== opkt[1][L-1-k]) begin failures++; $display("s%0d k%0d out1 %b", s, k, out1); end
        if (k == 0) begin
          checks += 3;
          if ({acc1, acc0} !== e_acc) begin failures++; $display("s%0d acc %b exp %b", s, {acc1, acc0}, e_acc); end
          if (stored !== e_st)  begin failures++; $display("s%0d stored %b exp %b", s, stored, e_st); end
          if (refused !== e_ref) begin failures++; $display("s%0d refused %b exp %b", s, refused, e_ref); end
        end
        @(negedge cp);
      end
      bval = nbval;
      bpkt = nbpkt;
    end
    checks++;
    if (n_direct == 0 || n_store == 0 || n_refuse == 0 || n_replay == 0) begin
      failures++; $display("a case never happened");
    end
    $display("direct=%0d stored=%0d replayed=%0d refused=%0d", n_direct, n_store, n_replay, n_refuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
