// tb_bpc: drives random samples into a basic predistortion cell while random
// gains are written through port B, and checks against a model of the LUT:
// y(k) = x(k)*conj(G(|x(k)|)) three cycles later (rounded, saturated),
// old_gain two cycles later, x_d3 three cycles later and upd_addr five cycles
// later. Writes land at the end of their cycle, so a sample's read sees every
// write of earlier cycles but not one in the same cycle (read-first).
module tb_bpc;
  import dpd_pkg::*;
  localparam int AW = 5;
  logic clk = 0, rst_n = 0;
  cplx_t x, y, x_d3;
  gain_t old_gain, dinb;
  logic [AW-1:0] upd_addr, addrb;
  logic web;
  gain_t lut [2**AW];
  int checks = 0, failures = 0;

  bpc #(.ADDR_W(AW)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mag_addr(cplx_t v);
    int a, b, mx, mn, m;
    a = v.re < 0 ? -int'(v.re) : int'(v.re);
    b = v.im < 0 ? -int'(v.im) : int'(v.im);
    mx = a > b ? a : b; mn = a > b ? b : a;
    m = mx + mn / 4 + mn / 8;
    if (m >= 32768) return 2**AW - 1;
    return m / (32768 >> AW);
  endfunction
  function automatic longint rsat(longint v);
    longint r;
    r = (v + 32768) >>> 16;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  cplx_t xs [int];
  gain_t gs [int];

  initial begin
    x = '0; addrb = '0; dinb = UNITY_GAIN; web = 0;
    for (int i = 0; i < 2**AW; i++) lut[i] = UNITY_GAIN;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 10000; t++) begin
      x.re = sample_t'($urandom); x.im = sample_t'($urandom);
      if (t % 3 == 0) x.re = sample_t'(int'($signed(16'($urandom))) / 8);
      xs[t] = x;
      web = ($urandom % 4) == 0;
      addrb = AW'($urandom);
      dinb.re = gain_rail_t'($urandom); dinb.im = gain_rail_t'($urandom);
      @(posedge clk); #1;                 // now in cycle t+1
      if (web) lut[addrb] = dinb;
      gs[t] = lut[mag_addr(xs[t])];       // table after the writes of cycles <= t
      if (t >= 1) begin                   // old_gain of sample k valid in cycle k+2
        checks++;
        if (old_gain !== gs[t-1]) begin failures++; $display("t=%0d old_gain %h exp %h", t, old_gain, gs[t-1]); end
      end
      if (t >= 2) begin                   // y and x_d3 of sample k valid in cycle k+3
        cplx_t xv; gain_t g; longint er, ei;
        xv = xs[t-2]; g = gs[t-2];
        er = rsat(longint'(xv.re) * g.re + longint'(xv.im) * g.im);
        ei = rsat(longint'(xv.im) * g.re - longint'(xv.re) * g.im);
        checks += 2;
        if (longint'(y.re) != er || longint'(y.im) != ei) begin
          failures++; $display("t=%0d y (%0d,%0d) exp (%0d,%0d)", t, y.re, y.im, er, ei);
        end
        if (x_d3 !== xv) begin failures++; $display("t=%0d x_d3", t); end
      end
      if (t >= 4) begin                   // upd_addr of sample k valid in cycle k+5
        checks++;
        if (int'(upd_addr) != mag_addr(xs[t-4])) begin failures++; $display("t=%0d upd_addr %0d exp %0d", t, upd_addr, mag_addr(xs[t-4])); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
