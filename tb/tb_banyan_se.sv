// tb_banyan_se: exhaustive test of the 2x2 switching element.
//
// Walks every combination of activity, control bit, data bit and priority on
// both inputs and compares the two outputs and the pass flags with a
// reference written from the element's rules: control bit 0 = upper output,
// 1 = lower output, on a clash the input named by prio wins.
module tb_banyan_se;
  import mbs_pkg::*;

  link_t in0, in1, out0, out1;
  logic  h0, h1, prio, pass0, pass1;
  int    checks = 0, failures = 0;

  banyan_se dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      logic       e_p0, e_p1;
      link_t      e_o0, e_o1;
      in0      = LINK_IDLE;
      in1      = LINK_IDLE;
      in0.valid = v[0];
      in1.valid = v[1];
      h0        = v[2];
      h1        = v[3];
      in0.dbit  = v[4];
      in1.dbit  = v[5];
      prio      = v[6];
      in0.src   = 3'd2;
      in1.src   = 3'd5;
      in0.dest  = 3'(v);
      in1.dest  = 3'(v >> 3);
      #1;
      // reference
      e_p0 = in0.valid && !(in1.valid && h0 == h1 && prio);
      e_p1 = in1.valid && !(in0.valid && h0 == h1 && !prio);
      e_o0 = LINK_IDLE;
      e_o1 = LINK_IDLE;
      if (e_p0 && h0 == 1'b0) e_o0 = in0;
      if (e_p0 && h0 == 1'b1) e_o1 = in0;
      if (e_p1 && h1 == 1'b0) e_o0 = in1;
      if (e_p1 && h1 == 1'b1) e_o1 = in1;
      checks += 4;
      if (pass0 !== e_p0) begin failures++; $display("v=%0d pass0 %b exp %b", v, pass0, e_p0); end
      if (pass1 !== e_p1) begin failures++; $display("v=%0d pass1 %b exp %b", v, pass1, e_p1); end
      if (out0  !== e_o0) begin failures++; $display("v=%0d out0 %h exp %h", v, out0, e_o0); end
      if (out1  !== e_o1) begin failures++; $display("v=%0d out1 %h exp %h", v, out1, e_o1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
