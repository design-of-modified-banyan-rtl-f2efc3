// tb_ic_port: one input-controller port (packet FIFO and header register).
//
// Sends 600 slots of random serial packets (activity bit random, bursts that
// overrun the FIFO included) and grants the offered packet at random. A
// reference built on a queue predicts, for every slot, the header register
// (valid, destination, preferred path with the retry inversion), every
// serial output bit with the substituted path bit, and the one-clock overflow
// and retry flags after each slot boundary. Fails if no overflow, retry or
// pop ever happened.
module tb_ic_port;
  import mbs_pkg::*;
  localparam int unsigned L = 13;
  localparam int unsigned DEPTH = 4;

  logic              cp = 1'b0, rst_n = 1'b0, slot_end = 1'b0, path_slot = 1'b0;
  logic              din = 1'b0, grant = 1'b0, path_in = 1'b0;
  logic              hr_valid, pref_path, dout, overflow, retry;
  logic [ADDR_W-1:0] hr_dest;
  int                checks = 0, failures = 0, n_ovf = 0, n_retry = 0, n_pop = 0;

  ic_port #(.PKT_LEN(L), .DEPTH(DEPTH)) dut (.*);

  always #5 cp = !cp;

  initial begin
    repeat (100000) @(posedge cp);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic got, input logic exp, input string what, input int s);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("slot %0d %s got %b exp %b", s, what, got, exp);
    end
  endtask

  initial begin
    logic [L-1:0] q [$];
    logic         offv, flip, e_ovf, e_retry;
    logic [L-1:0] offp, inp;
    offv = 1'b0; flip = 1'b0; offp = '0; e_ovf = 1'b0; e_retry = 1'b0;
    repeat (3) @(posedge cp);
    rst_n = 1'b1;
    @(negedge cp);
    for (int s = 0; s < 600; s++) begin
      inp = L'({$urandom, $urandom});
      // bursts in the middle third, sparse traffic elsewhere
      inp[L-1] = (s > 200 && s < 400) ? 1'b1 : (($urandom % 3) == 0);
      grant    = (s > 200 && s < 400) ? (($urandom % 4) == 0) : 1'($urandom);
      path_in  = 1'($urandom);
      for (int k = 0; k < L; k++) begin
        din       = inp[L-1-k];
        slot_end  = (k == L - 1);
        path_slot = (k == 1);
        #1;
        expect_eq(hr_valid, offv, "hr_valid", s);
        if (offv) begin
          checks++;
          if (hr_dest !== offp[L-3 -: 3]) begin failures++; $display("slot %0d dest", s); end
          expect_eq(pref_path, offp[L-2] ^ flip, "pref_path", s);
        end
        expect_eq(dout, offv && ((k == 1) ? path_in : offp[L-1-k]), "dout", s);
        if (k == 0) begin
          expect_eq(overflow, e_ovf, "overflow", s);
          expect_eq(retry, e_retry, "retry", s);
        end else begin
          expect_eq(overflow, 1'b0, "overflow idle", s);
          expect_eq(retry, 1'b0, "retry idle", s);
        end
        @(negedge cp);
      end
      // slot boundary in the reference
      e_retry = offv && !grant;
      if (offv && grant) begin void'(q.pop_front()); n_pop++; end
      e_ovf = 1'b0;
      if (inp[L-1]) begin
        if (q.size() == DEPTH) begin e_ovf = 1'b1; n_ovf++; end
        else q.push_back(inp);
      end
      if (e_retry) n_retry++;
      flip = e_retry ? !flip : 1'b0;
      offv = q.size() > 0;
      offp = offv ? q[0] : '0;
    end
    checks++;
    if (n_ovf == 0 || n_retry == 0 || n_pop == 0) begin failures++; $display("a case never happened"); end
    $display("pops=%0d retries=%0d overflows=%0d", n_pop, n_retry, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
