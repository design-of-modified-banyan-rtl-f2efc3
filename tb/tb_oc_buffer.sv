// tb_oc_buffer: one-packet output buffer.
//
// Runs 200 slots of PKT_LEN clocks. In a random half of the slots a random
// packet is written bit-serially; the test expects every written packet to
// come back on dout, bit for bit, in the next slot with `full` high, and dout
// and `full` to stay low after a slot with no write. Slots that are written
// while a packet plays back check the read-while-write case.
module tb_oc_buffer;
  localparam int unsigned L = 13;

  logic cp = 1'b0, rst_n = 1'b0, slot_end = 1'b0, wr = 1'b0, din = 1'b0;
  logic dout, full;
  int   checks = 0, failures = 0, overlap = 0;

  oc_buffer #(.PKT_LEN(L)) dut (.*);

  always #5 cp = !cp;

  initial begin
    repeat (100000) @(posedge cp);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] prev, cur;
    logic         prev_wr;
    prev_wr = 1'b0;
    prev    = '0;
    repeat (3) @(posedge cp);
    rst_n = 1'b1;
    @(negedge cp);
    for (int s = 0; s < 200; s++) begin
      cur = L'({$urandom, $urandom});
      wr = 1'($urandom);
      if (wr && prev_wr) overlap++;
      for (int k = 0; k < L; k++) begin
        din      = cur[L-1-k];
        slot_end = (k == L - 1);
        #1;
        checks += 2;
        if (full !== prev_wr) begin failures++; $display("slot %0d bit %0d full=%b", s, k, full); end
        if (dout !== (prev_wr & prev[L-1-k])) begin
          failures++; $display("slot %0d bit %0d dout=%b exp %b", s, k, dout, prev_wr & prev[L-1-k]);
        end
        @(negedge cp);
      end
      prev_wr = wr;
      prev    = cur;
    end
    checks++;
    if (overlap == 0) begin failures++; $display("no read-while-write slot"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
