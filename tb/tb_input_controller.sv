// tb_input_controller: four-input controller with path-bit generation.
//
// Feeds 500 slots of random serial packets to all four inputs and grants at
// random. Queue-based references, one per input, predict each link's header
// (valid, source number, destination) and serial bits; the path bit is
// predicted from the pairing rule: the upper input of a pair keeps its
// preferred path (inverted after each refusal), the lower one takes the
// opposite bit when the upper one is active. Checks that the two packets of
// an active pair never share a path bit, and that both pairing cases and the
// retry inversion occurred. The controller is built as the second one
// (sources 4-7).
module tb_input_controller;
  import mbs_pkg::*;
  localparam int unsigned L = 13, DEPTH = 4, NP = 4, BASE = 4;

  logic          cp = 1'b0, rst_n = 1'b0, slot_end = 1'b0, path_slot = 1'b0;
  logic [NP-1:0] din = '0, grant = '0, overflow, retry;
  link_t         links [NP];
  int            checks = 0, failures = 0, n_forced = 0, n_free = 0, n_inv = 0;

  input_controller #(.PKT_LEN(L), .DEPTH(DEPTH), .NP(NP), .SRC_BASE(BASE)) dut (.*);

  always #5 cp = !cp;

  initial begin
    repeat (100000) @(posedge cp);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] q [NP][$];
    logic [L-1:0] offp [NP], inp [NP];
    logic         offv [NP], flip [NP], pth [NP];
    for (int i = 0; i < NP; i++) begin offv[i] = 1'b0; flip[i] = 1'b0; offp[i] = '0; end
    repeat (3) @(posedge cp);
    rst_n = 1'b1;
    @(negedge cp);
    for (int s = 0; s < 500; s++) begin
      for (int i = 0; i < NP; i++) begin
        inp[i]      = L'({$urandom, $urandom});
        inp[i][L-1] = ($urandom % 2) == 0;
        grant[i]    = ($urandom % 3) != 0;
      end
      // expected path bits
      for (int p = 0; p < NP; p += 2) begin
        pth[p]   = offp[p][L-2] ^ flip[p];
        pth[p+1] = offv[p] ? !pth[p] : (offp[p+1][L-2] ^ flip[p+1]);
        if (offv[p] && offv[p+1]) n_forced++;
        if (!offv[p] && offv[p+1]) n_free++;
      end
      for (int i = 0; i < NP; i++) if (flip[i] && offv[i]) n_inv++;
      for (int k = 0; k < L; k++) begin
        for (int i = 0; i < NP; i++) din[i] = inp[i][L-1-k];
        slot_end  = (k == L - 1);
        path_slot = (k == 1);
        #1;
        for (int i = 0; i < NP; i++) begin
          logic eb;
          eb = offv[i] && ((k == 1) ? pth[i] : offp[i][L-1-k]);
          checks += 2;
          if (links[i].valid !== offv[i] || links[i].dbit !== eb) begin
            failures++;
            if (failures < 20) $display("s%0d k%0d port %0d valid %b bit %b exp %b %b",
                                        s, k, i, links[i].valid, links[i].dbit, offv[i], eb);
          end
          if (k == 0 && offv[i]) begin
            checks += 3;
            if (links[i].src !== 3'(BASE + i)) begin failures++; $display("src %0d", i); end
            if (links[i].dest !== offp[i][L-3 -: 3]) begin failures++; $display("dest %0d", i); end
            if (links[i].path !== pth[i]) begin failures++; $display("s%0d path %0d", s, i); end
          end
        end
        if (k == 0) begin
          for (int p = 0; p < NP; p += 2) begin
            checks++;
            if (links[p].valid && links[p+1].valid && links[p].path == links[p+1].path) begin
              failures++; $display("s%0d pair %0d shares a path", s, p);
            end
          end
        end
        @(negedge cp);
      end
      for (int i = 0; i < NP; i++) begin
        logic rt;
        rt = offv[i] && !grant[i];
        if (offv[i] && grant[i]) void'(q[i].pop_front());
        if (inp[i][L-1] && q[i].size() < DEPTH) q[i].push_back(inp[i]);
        flip[i] = rt ? !flip[i] : 1'b0;
        offv[i] = q[i].size() > 0;
        offp[i] = offv[i] ? q[i][0] : '0;
      end
    end
    checks++;
    if (n_forced == 0 || n_free == 0 || n_inv == 0) begin failures++; $display("a case never happened"); end
    $display("forced pairs=%0d lower-alone=%0d inverted retries=%0d", n_forced, n_free, n_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
