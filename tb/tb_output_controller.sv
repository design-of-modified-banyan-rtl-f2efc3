// tb_output_controller: the eight-port output controller.
//
// Runs 400 random slots with packets on random input links; each packet's
// destination is consistent with its link (the pair 2k/2k+1 only carries
// packets for ports 2k and 2k+1, as the switch network guarantees) and its
// last destination bit is random. A reference keeps a one-packet buffer per
// port and predicts every serial output bit, the per-link accept flags and
// the per-port stored and refused flags. Fails if no port ever stored or
// refused a packet.
module tb_output_controller;
  import mbs_pkg::*;
  localparam int unsigned L = 13;

  logic               cp = 1'b0, rst_n = 1'b0, slot_end = 1'b0, prio = 1'b0;
  link_t              in_links [N_PORTS];
  logic [N_PORTS-1:0] dout, acc, stored, refused;
  int                 checks = 0, failures = 0, n_store = 0, n_refuse = 0;

  output_controller #(.PKT_LEN(L)) dut (.*);

  always #5 cp = !cp;

  initial begin
    repeat (100000) @(posedge cp);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0]       pkt  [N_PORTS];
    logic [L-1:0]       bpkt [N_PORTS];
    logic [L-1:0]       opkt [N_PORTS];
    logic [N_PORTS-1:0] bval, nbval, e_acc, e_st, e_ref;
    logic [L-1:0]       nbpkt [N_PORTS];
    bval = '0;
    foreach (in_links[l]) in_links[l] = LINK_IDLE;
    repeat (3) @(posedge cp);
    rst_n = 1'b1;
    @(negedge cp);
    for (int s = 0; s < 400; s++) begin
      prio = 1'($urandom);
      for (int l = 0; l < N_PORTS; l++) begin
        pkt[l]            = L'({$urandom, $urandom});
        in_links[l].valid = ($urandom % 3) != 0;
        in_links[l].src   = 3'($urandom);
        in_links[l].dest  = {2'(l >> 1), 1'($urandom)};
      end
      e_acc = '0; e_st = '0; e_ref = '0;
      for (int p = 0; p < N_PORTS; p++) begin
        int  a, b, w, o;
        logic ca, cb;
        a  = p & ~1;  b = a + 1;
        ca = in_links[a].valid && in_links[a].dest == 3'(p);
        cb = in_links[b].valid && in_links[b].dest == 3'(p);
        w  = (cb && (!ca || prio)) ? b : a;
        o  = (w == a) ? b : a;
        opkt[p] = '0; nbval[p] = 1'b0; nbpkt[p] = '0;
        if (bval[p]) begin
          opkt[p] = bpkt[p];
          if (ca || cb) begin
            nbval[p] = 1'b1; nbpkt[p] = pkt[w]; e_acc[w] = 1'b1; e_st[p] = 1'b1;
            if (ca && cb) begin e_ref[p] = 1'b1; n_refuse++; end
          end
        end else if (ca && cb) begin
          opkt[p] = pkt[w]; nbval[p] = 1'b1; nbpkt[p] = pkt[o];
          e_acc[a] = 1'b1; e_acc[b] = 1'b1; e_st[p] = 1'b1; n_store++;
        end else if (ca || cb) begin
          opkt[p] = pkt[w]; e_acc[w] = 1'b1;
        end
      end
      for (int k = 0; k < L; k++) begin
        for (int l = 0; l < N_PORTS; l++) in_links[l].dbit = pkt[l][L-1-k];
        slot_end = (k == L - 1);
        #1;
        for (int p = 0; p < N_PORTS; p++) begin
          checks++;
          if (dout[p] !== opkt[p][L-1-k]) begin
            failures++; if (failures < 10) $display("s%0d k%0d port %0d got %b", s, k, p, dout[p]);
          end
        end
        if (k == 0) begin
          checks += 3;
          if (acc !== e_acc)     begin failures++; $display("s%0d acc %b exp %b", s, acc, e_acc); end
          if (stored !== e_st)   begin failures++; $display("s%0d stored %b exp %b", s, stored, e_st); end
          if (refused !== e_ref) begin failures++; $display("s%0d refused %b exp %b", s, refused, e_ref); end
        end
        @(negedge cp);
      end
      bval = nbval;
      bpkt = nbpkt;
    end
    checks++;
    if (n_store == 0 || n_refuse == 0) begin failures++; $display("store or refuse never happened"); end
    $display("stored=%0d refused=%0d", n_store, n_refuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
