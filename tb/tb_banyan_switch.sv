// tb_banyan_switch: random test of the switch network.
//
// Offers random sets of packets (random activity, path bit, destination, data
// bit and priority) and compares every output link with a reference that
// computes each packet's link number column by column from the closed-form
// positions of the omega network: after column 0 a packet from input a2a1a0
// with path p is on link a2 a1 p, after column 1 on a1 p d2, after column 2 on
// p d2 d1, and the output controller sees it on link d2 d1 p. Two packets that
// want the same link in a column clash; the one from the upper element input
// wins when prio is 0, the lower one when prio is 1.
// Also checks that some clashes and some clash-free full loads occurred.
module tb_banyan_switch;
  import mbs_pkg::*;

  link_t in_links [N_PORTS];
  link_t out_links [N_PORTS];
  logic  prio;
  int    checks = 0, failures = 0;
  int    clashes = 0, full_pass = 0;

  banyan_switch dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [2:0] pos   [N_PORTS];   // current link of each packet
      logic [2:0] inl   [N_PORTS];   // element input link it entered on
      logic       alive [N_PORTS];
      link_t      exp_l [N_PORTS];
      int         n_alive;
      prio = 1'($urandom);
      for (int i = 0; i < N_PORTS; i++) begin
        in_links[i].valid = ($urandom % 4) != 0;
        in_links[i].src   = 3'(i);
        in_links[i].path  = 1'($urandom);
        in_links[i].dest  = 3'($urandom);
        in_links[i].dbit  = 1'($urandom);
      end
      #1;
      // reference
      for (int i = 0; i < N_PORTS; i++) alive[i] = in_links[i].valid;
      for (int c = 0; c < 3; c++) begin
        for (int i = 0; i < N_PORTS; i++) begin
          logic [2:0] a, d;
          logic       p;
          a = 3'(i); d = in_links[i].dest; p = in_links[i].path;
          case (c)
            0: begin inl[i] = a;                  pos[i] = {a[2], a[1], p};  end
            1: begin inl[i] = {a[1], p, a[2]};    pos[i] = {a[1], p, d[2]};  end
            default: begin inl[i] = {p, d[2], a[1]}; pos[i] = {p, d[2], d[1]}; end
          endcase
        end
        for (int i = 0; i < N_PORTS; i++)
          for (int j = 0; j < N_PORTS; j++)
            if (i != j && alive[i] && alive[j] && pos[i] == pos[j]) begin
              // i loses if the other one is the preferred element input
              if ((inl[j][0] == prio)) begin
                alive[i] = 1'b0;
                if (i < j || !alive[j]) clashes++;
              end
            end
      end
      foreach (exp_l[l]) exp_l[l] = LINK_IDLE;
      n_alive = 0;
      for (int i = 0; i < N_PORTS; i++)
        if (alive[i]) begin
          exp_l[{in_links[i].dest[2:1], in_links[i].path}] = in_links[i];
          n_alive++;
        end
      if (n_alive == N_PORTS) full_pass++;
      for (int l = 0; l < N_PORTS; l++) begin
        checks++;
        if (out_links[l] !== exp_l[l]) begin
          failures++;
          if (failures < 10) $display("t=%0d link %0d got %h exp %h", t, l, out_links[l], exp_l[l]);
        end
      end
    end
    // a permutation that routes without any clash: path = own LSB, dest = reversed input
    prio = 1'b0;
    for (int i = 0; i < N_PORTS; i++)
      in_links[i] = '{valid: 1'b1, src: 3'(i), path: 1'(i), dest: 3'(i), dbit: 1'(i >> 1)};
    #1;
    for (int l = 0; l < N_PORTS; l++) begin
      checks++;
      if (!out_links[l].valid || out_links[l].dest[2:1] != 2'(l >> 1) || out_links[l].path != 1'(l))
        begin failures++; $display("identity link %0d wrong %h", l, out_links[l]); end
    end
    checks++;
    if (clashes == 0) begin failures++; $display("no clash seen"); end
    $display("clashes=%0d clash-free full loads=%0d", clashes, full_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
