// tb_cmag: checks the magnitude-to-address unit against an integer model of
// max + 3/8*min, scaled so that full scale maps past the last entry, with
// saturation; checks the one-cycle latency and a few exact corner cases.
module tb_cmag;
  import dpd_pkg::*;
  localparam int AW = 8;
  logic clk = 0;
  cplx_t x;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;

  cmag #(.ADDR_W(AW)) dut (.clk, .x, .addr);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(int re, int im);
    int a, b, mx, mn, m;
    a = re < 0 ? -re : re;
    b = im < 0 ? -im : im;
    mx = a > b ? a : b;
    mn = a > b ? b : a;
    m = mx + mn / 4 + mn / 8;
    if (m >= 32768) return (1 << AW) - 1;
    return m / (32768 >> AW);
  endfunction

  task automatic apply(int re, int im);
    int e;
    x.re = sample_t'(re); x.im = sample_t'(im);
    e = model(re, im);
    @(posedge clk); #1;
    checks++;
    if (int'(addr) != e) begin failures++; $display("x=(%0d,%0d) addr=%0d exp=%0d", re, im, addr, e); end
  endtask

  initial begin
    apply(0, 0);
    apply(128, 0);          // exactly one entry
    apply(0, -256);         // two entries
    apply(-32768, 0);       // full scale saturates
    apply(16384, 16384);    // 0.5 + 3/16 = 0.6875 -> 176
    apply(32767, 32767);
    for (int i = 0; i < 5000; i++) apply(int'($signed(16'($urandom))), int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
