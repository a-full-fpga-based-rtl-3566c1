// tb_offset_cancellation: feeds a DC-offset random signal and checks that
// (1) the output is x minus the model's estimate on every cycle, the estimate
// being the recursive mean est += (x - est)/2^SHIFT, (2) the residual mean
// after settling is within a few LSBs of zero, and (3) with en low the
// estimate freezes.
module tb_offset_cancellation;
  import dpd_pkg::*;
  localparam int SH = 6;
  logic clk = 0, rst_n = 0, en;
  cplx_t x, y;
  int checks = 0, failures = 0;

  offset_cancellation #(.SHIFT(SH)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  longint acc_re = 0, acc_im = 0;
  initial begin
    longint er, ei, sum_re, sum_im;
    x = '0; en = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    sum_re = 0; sum_im = 0;
    for (int t = 0; t < 20000; t++) begin
      en = !(t >= 15000 && t < 16000);
      x.re = sample_t'(700 + int'($signed(12'($urandom))));
      x.im = sample_t'(-1300 + int'($signed(12'($urandom))));
      if (t == 16000) x.re = sample_t'(-32768);  // x - offset saturates
      er = sat(longint'(x.re) - ((acc_re + (1 <<< (SH-1))) >>> SH));
      ei = sat(longint'(x.im) - ((acc_im + (1 <<< (SH-1))) >>> SH));
      if (en) begin
        acc_re = acc_re + x.re - (acc_re >>> SH);
        acc_im = acc_im + x.im - (acc_im >>> SH);
      end
      @(posedge clk); #1;
      checks += 1;
      if (longint'(y.re) != er || longint'(y.im) != ei) begin
        failures++; $display("t=%0d y (%0d,%0d) exp (%0d,%0d)", t, y.re, y.im, er, ei);
      end
      if (t >= 5000 && t < 15000) begin sum_re += y.re; sum_im += y.im; end
    end
    checks += 2;
    if (sum_re / 10000 > 20 || sum_re / 10000 < -20) begin failures++; $display("residual re %0d", sum_re / 10000); end
    if (sum_im / 10000 > 20 || sum_im / 10000 < -20) begin failures++; $display("residual im %0d", sum_im / 10000); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
