// tb_mabasw: end-to-end test of the 8x8 modified Banyan switch.
//
// The switch is used with its default parameters. Every packet carries its
// input number and a sequence number in its data field, so each one that
// leaves an output port can be matched with the one that was sent. The test
// runs in phases:
//   1. one packet through an idle switch: it must leave on the right port one
//      slot (PKT_LEN clocks) after it arrived;
//   2. two packets from different inputs (1 and 5) for the same output (4)
//      in one slot: both must arrive, one a slot after the other, via the
//      output buffer;
//   3. random uniform traffic at moderate load;
//   4. saturating load, so that FIFOs fill and overflow;
//   5. idle inputs until everything queued has left.
// A scoreboard checks that every packet leaves on its destination port with
// its data intact, that packets from one input to one output stay in order,
// and that every packet not dropped for a full FIFO is delivered exactly once.
// The mechanisms of the design are counted and each must occur at least once:
// output buffering, refusal at a busy output, retry of a blocked packet on the
// other path, FIFO overflow, path-bit rewriting for a pair, and delivery over
// both path bits.
module tb_mabasw;
  import mbs_pkg::*;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned L      = HDR_W + DATA_W;

  logic               cp = 1'b0, rst_n = 1'b0, shcp = 1'b0;
  logic [N_PORTS-1:0] din = '0;
  logic [N_PORTS-1:0] dout, overflow, retry, stored, refused;
  logic               slot_end;
  int                 checks = 0, failures = 0;

  mabasw dut (.*);

  always #5 cp = !cp;

  initial begin
    repeat (400000) @(posedge cp);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard: expected data per (input, output), in order
  logic [DATA_W-1:0] expq [N_PORTS][N_PORTS][$];
  logic [DATA_W-1:0] last_dat [N_PORTS];
  logic [2:0]        last_dst [N_PORTS];
  logic              last_act [N_PORTS];
  int                seq [N_PORTS];
  int                slot = 0, sent = 0, delivered = 0, dropped = 0;
  int                n_stored = 0, n_refused = 0, n_retry = 0, n_ovf = 0;
  int                n_path [2];
  int                n_rewrite = 0;
  int                deliver_slot [$];

  function automatic int outstanding();
    int n = 0;
    for (int i = 0; i < N_PORTS; i++)
      for (int o = 0; o < N_PORTS; o++) n += expq[i][o].size();
    return n;
  endfunction

  // send one slot: act/dst/path per input, returns after the slot
  task automatic run_slot(input logic [N_PORTS-1:0] act, input logic [2:0] dst [N_PORTS],
                          input logic [N_PORTS-1:0] pth);
    logic [L-1:0] pkt [N_PORTS];
    logic [L-1:0] rx  [N_PORTS];
    for (int i = 0; i < N_PORTS; i++) begin
      logic [DATA_W-1:0] d;
      d      = {3'(i), 5'(seq[i])};
      pkt[i] = act[i] ? {1'b1, pth[i], dst[i], d} : '0;
      rx[i]  = '0;
    end
    for (int k = 0; k < L; k++) begin
      shcp = (k == 0);
      for (int i = 0; i < N_PORTS; i++) din[i] = pkt[i][L-1-k];
      #1;
      for (int o = 0; o < N_PORTS; o++) rx[o][L-1-k] = dout[o];
      if (k == 0) begin
        // flags that refer to the slot that just ended
        for (int i = 0; i < N_PORTS; i++) begin
          if (overflow[i]) begin
            n_ovf++;
            if (!last_act[i]) begin failures++; $display("overflow without packet"); end
            else begin void'(expq[i][last_dst[i]].pop_back()); dropped++; end
          end
          if (retry[i]) n_retry++;
        end
        for (int p = 0; p < N_PORTS; p += 2)
          if (dut.ic_links[p].valid && dut.ic_links[p+1].valid) n_rewrite++;
      end
      if (k == 1) begin
        for (int o = 0; o < N_PORTS; o++) begin
          if (stored[o])  n_stored++;
          if (refused[o]) n_refused++;
        end
      end
      @(negedge cp);
    end
    // record what was sent
    for (int i = 0; i < N_PORTS; i++) begin
      last_act[i] = act[i];
      if (act[i]) begin
        last_dat[i] = pkt[i][DATA_W-1:0];
        last_dst[i] = dst[i];
        expq[i][dst[i]].push_back(pkt[i][DATA_W-1:0]);
        seq[i]++;
        sent++;
      end
    end
    // check what came out during this slot
    for (int o = 0; o < N_PORTS; o++) begin
      if (rx[o][L-1]) begin
        logic [DATA_W-1:0] d;
        int                src;
        d   = rx[o][DATA_W-1:0];
        src = int'(d[7:5]);
        n_path[rx[o][L-2]]++;
        checks += 2;
        if (rx[o][L-3 -: 3] != 3'(o)) begin
          failures++; $display("slot %0d port %0d got dest %0d", slot, o, rx[o][L-3 -: 3]);
        end
        if (expq[src][o].size() == 0 || expq[src][o][0] != d) begin
          failures++;
          $display("slot %0d port %0d unexpected data %h", slot, o, d);
        end else begin
          void'(expq[src][o].pop_front());
          delivered++;
          deliver_slot.push_back(slot);
        end
      end
    end
    slot++;
  endtask

  initial begin
    logic [2:0]         dst [N_PORTS];
    logic [N_PORTS-1:0] act, pth;
    for (int i = 0; i < N_PORTS; i++) begin seq[i] = 0; last_act[i] = 1'b0; dst[i] = '0; end
    n_path = '{0, 0};
    repeat (3) @(posedge cp);
    rst_n = 1'b1;
    @(negedge cp);
    run_slot('0, dst, '0);

    // 1. one packet, input 2 -> output 6: must leave in the next slot
    dst[2] = 3'd6;
    run_slot(8'b0000_0100, dst, '0);
    deliver_slot.delete();
    run_slot('0, dst, '0);
    checks++;
    if (deliver_slot.size() != 1 || deliver_slot[0] != slot - 1) begin
      failures++; $display("single packet latency wrong");
    end

    // 2. inputs 1 and 5 both to output 4 in one slot, both with path bit 1
    dst[1] = 3'd4; dst[5] = 3'd4;
    deliver_slot.delete();
    run_slot(8'b0010_0010, dst, 8'b0010_0010);
    run_slot('0, dst, '0);
    run_slot('0, dst, '0);
    checks++;
    if (deliver_slot.size() != 2 || deliver_slot[1] != deliver_slot[0] + 1) begin
      failures++; $display("contention case: %0d deliveries", deliver_slot.size());
    end

    // 3. random uniform traffic, load 0.5
    for (int s = 0; s < 400; s++) begin
      for (int i = 0; i < N_PORTS; i++) begin
        act[i] = ($urandom % 2) == 0;
        dst[i] = 3'($urandom);
        pth[i] = 1'($urandom);
      end
      run_slot(act, dst, pth);
    end
    // 4. saturating load
    for (int s = 0; s < 300; s++) begin
      for (int i = 0; i < N_PORTS; i++) begin
        dst[i] = 3'($urandom);
        pth[i] = 1'($urandom);
      end
      run_slot('1, dst, pth);
    end
    // 5. drain
    for (int s = 0; s < 200 && outstanding() > 0; s++) run_slot('0, dst, '0);

    checks++;
    if (outstanding() != 0) begin failures++; $display("%0d packets never delivered", outstanding()); end
    checks++;
    if (delivered + dropped != sent) begin
      failures++; $display("sent %0d delivered %0d dropped %0d", sent, delivered, dropped);
    end
    checks += 7;
    if (n_stored == 0)  begin failures++; $display("output buffer never used"); end
    if (n_refused == 0) begin failures++; $display("no refusal at a busy output"); end
    if (n_retry == 0)   begin failures++; $display("no retry"); end
    if (n_ovf == 0)     begin failures++; $display("no FIFO overflow"); end
    if (n_rewrite == 0) begin failures++; $display("no pair path rewrite"); end
    if (n_path[0] == 0) begin failures++; $display("path 0 never used"); end
    if (n_path[1] == 0) begin failures++; $display("path 1 never used"); end
    $display("slots=%0d sent=%0d delivered=%0d dropped=%0d", slot, sent, delivered, dropped);
    $display("stored=%0d refused=%0d retries=%0d overflows=%0d pair-rewrites=%0d path0=%0d path1=%0d",
             n_stored, n_refused, n_retry, n_ovf, n_rewrite, n_path[0], n_path[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
