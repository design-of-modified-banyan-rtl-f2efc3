// tb_mabasw_throughput: saturation throughput of the 8x8 switch under
// uniform random traffic.
//
// Every input offers a packet in every slot (load 1.0) with a destination
// drawn uniformly from the eight outputs, as in the classic analysis of
// input-queued switches. After a warm-up of 200 slots the test counts, over
// 2000 slots, the packets that leave the switch, and reports the throughput
// per output port. Each delivered packet is checked for the right port and
// for being one that was sent to that port from its input, in order. The
// throughput must lie between 0.5 and 1.0 packet per port per slot; the
// printed value is meant for comparison with the analytic limits for input
// queueing (0.586 for a large switch with one packet per port and slot, 0.72
// when two packets per output and slot are accepted).
module tb_mabasw_throughput;
  import mbs_pkg::*;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned L      = HDR_W + DATA_W;
  localparam int          WARM   = 200;
  localparam int          MEAS   = 2000;

  logic               cp = 1'b0, rst_n = 1'b0, shcp = 1'b0;
  logic [N_PORTS-1:0] din = '0;
  logic [N_PORTS-1:0] dout, overflow, retry, stored, refused;
  logic               slot_end;
  int                 checks = 0, failures = 0;

  mabasw dut (.*);

  always #5 cp = !cp;

  initial begin
    repeat ((WARM + MEAS + 10) * L + 100) @(posedge cp);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] expq [N_PORTS][N_PORTS][$];
    logic [L-1:0]      pkt [N_PORTS];
    logic [L-1:0]      rx  [N_PORTS];
    logic [2:0]        dst [N_PORTS];
    logic [2:0]        lastd [N_PORTS];
    int                seq [N_PORTS];
    int                delivered = 0;
    real               thr;
    foreach (seq[i]) seq[i] = 0;
    repeat (3) @(posedge cp);
    rst_n = 1'b1;
    @(negedge cp);
    for (int s = 0; s < WARM + MEAS; s++) begin
      for (int i = 0; i < N_PORTS; i++) begin
        dst[i] = 3'($urandom);
        pkt[i] = {1'b1, 1'($urandom), dst[i], 3'(i), 5'(seq[i])};
        rx[i]  = '0;
      end
      for (int k = 0; k < L; k++) begin
        shcp = (k == 0);
        for (int i = 0; i < N_PORTS; i++) din[i] = pkt[i][L-1-k];
        #1;
        for (int o = 0; o < N_PORTS; o++) rx[o][L-1-k] = dout[o];
        // a dropped packet is the one its input sent in the previous slot
        if (k == 0)
          for (int i = 0; i < N_PORTS; i++)
            if (overflow[i] && s > 0) void'(expq[i][lastd[i]].pop_back());
        @(negedge cp);
      end
      for (int i = 0; i < N_PORTS; i++) begin
        expq[i][dst[i]].push_back(pkt[i][DATA_W-1:0]);
        lastd[i] = dst[i];
        seq[i]++;
      end
      for (int o = 0; o < N_PORTS; o++)
        if (rx[o][L-1]) begin
          logic [DATA_W-1:0] d;
          int src;
          d   = rx[o][DATA_W-1:0];
          src = int'(d[7:5]);
          checks++;
          if (rx[o][L-3 -: 3] != 3'(o) || expq[src][o].size() == 0 || expq[src][o][0] != d) begin
            failures++;
            if (failures < 10) $display("slot %0d port %0d bad packet %h", s, o, rx[o]);
          end else void'(expq[src][o].pop_front());
          if (s >= WARM) delivered++;
        end
    end
    thr = real'(delivered) / real'(MEAS * N_PORTS);
    $display("saturation throughput = %0.3f packets per port per slot", thr);
    checks++;
    if (thr < 0.5 || thr > 1.0) begin failures++; $display("throughput out of range"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
