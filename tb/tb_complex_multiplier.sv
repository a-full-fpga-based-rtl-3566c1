// tb_complex_multiplier: checks a*conj(b) and a*b against integer arithmetic
// with round-half-up and saturation, one cycle after the inputs, including the
// extreme gains +-2.0 and full-scale samples.
module tb_complex_multiplier;
  import dpd_pkg::*;
  logic clk = 0;
  cplx_t a, pc, pp;
  gain_t b;
  int checks = 0, failures = 0;

  complex_multiplier #(.CONJ_B(1'b1)) dut_c (.clk, .a, .b, .p(pc));
  complex_multiplier #(.CONJ_B(1'b0)) dut_p (.clk, .a, .b, .p(pp));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rsat(longint v);
    longint r;
    r = (v + 32768) >>> 16;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  task automatic apply(int ar, int ai, int br, int bi);
    longint cre, cim, pre, pim;
    a.re = sample_t'(ar); a.im = sample_t'(ai);
    b.re = gain_rail_t'(br); b.im = gain_rail_t'(bi);
    cre = rsat(longint'(ar) * br + longint'(ai) * bi);
    cim = rsat(longint'(ai) * br - longint'(ar) * bi);
    pre = rsat(longint'(ar) * br - longint'(ai) * bi);
    pim = rsat(longint'(ai) * br + longint'(ar) * bi);
    @(posedge clk); #1;
    checks += 4;
    if (longint'(pc.re) != cre) begin failures++; $display("conj re %0d exp %0d", pc.re, cre); end
    if (longint'(pc.im) != cim) begin failures++; $display("conj im %0d exp %0d", pc.im, cim); end
    if (longint'(pp.re) != pre) begin failures++; $display("plain re %0d exp %0d", pp.re, pre); end
    if (longint'(pp.im) != pim) begin failures++; $display("plain im %0d exp %0d", pp.im, pim); end
  endtask

  initial begin
    apply(16384, 0, 65536, 0);          // 0.5 * 1
    apply(1000, -2000, 0, 65536);       // times j
    apply(-32768, -32768, -131072, -131072);
    apply(32767, 0, 131071, 0);         // saturates
    apply(12345, 23456, -131072, 131071);
    for (int i = 0; i < 5000; i++)
      apply(int'($signed(16'($urandom))), int'($signed(16'($urandom))),
            int'($signed(18'($urandom))), int'($signed(18'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
