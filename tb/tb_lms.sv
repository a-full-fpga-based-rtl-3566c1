// tb_lms: drives random reference, model, data and gains into the LMS block
// with the documented alignment (old_gain one cycle ahead) and compares
// lms_error (1 cycle) and new_gain (2 cycles) with an integer model of
// G + round(x*conj(e) * 2^-(14+mu_shift)), saturated. Also runs a small
// closed loop to check that the gain converges to reference/x.
module tb_lms;
  import dpd_pkg::*;
  logic clk = 0, rst_n = 0;
  cplx_t ref_data, model, in_data;
  gain_t old_gain, new_gain;
  err_t  lms_error;
  logic [4:0] mu_shift;
  int checks = 0, failures = 0;

  lms dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rsh(longint v, int s);
    return (v + (longint'(1) <<< (s - 1))) >>> s;
  endfunction
  function automatic longint gsat(longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction

  // expected values, indexed by the cycle the sample is applied in
  longint exp_ere [int], exp_eim [int], exp_gre [int], exp_gim [int];

  initial begin
    ref_data = '0; model = '0; in_data = '0; old_gain = UNITY_GAIN; mu_shift = 4;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // open-loop random check; old_gain is applied one cycle ahead of the rest
    for (int t = 0; t < 6000; t++) begin
      longint er, ei, xr, xi, gr, gi, sh;
      if (t % 1000 == 0) mu_shift = 5'($urandom % 12);
      ref_data.re = sample_t'($urandom); ref_data.im = sample_t'($urandom);
      model.re = sample_t'($urandom);    model.im = sample_t'($urandom);
      in_data.re = sample_t'($urandom);  in_data.im = sample_t'($urandom);
      if (t % 7 == 3) begin model = ref_data; end          // zero error
      xr = in_data.re; xi = in_data.im;
      er = longint'(ref_data.re) - model.re; ei = longint'(ref_data.im) - model.im;
      gr = old_gain.re; gi = old_gain.im;   // applied in cycle t-1, one cycle ahead
      sh = 14 + mu_shift;
      exp_ere[t] = er; exp_eim[t] = ei;
      exp_gre[t] = gsat(gr + rsh(xr * er + xi * ei, int'(sh)));
      exp_gim[t] = gsat(gi + rsh(xi * er - xr * ei, int'(sh)));
      old_gain.re = gain_rail_t'($urandom); old_gain.im = gain_rail_t'($urandom);  // belongs to t+1
      @(posedge clk); #1;
      checks += 2;
      if (longint'(lms_error.re) != exp_ere[t] || longint'(lms_error.im) != exp_eim[t]) begin
        failures++; $display("t=%0d err (%0d,%0d) exp (%0d,%0d)", t, lms_error.re, lms_error.im, exp_ere[t], exp_eim[t]);
      end
      // mu_shift is a quasi-static setting read by the update stage: skip the
      // sample that straddles a change
      if (t >= 1 && t % 1000 != 0 && (longint'(new_gain.re) != exp_gre[t-1] || longint'(new_gain.im) != exp_gim[t-1])) begin
        failures++; $display("t=%0d gain (%0d,%0d) exp (%0d,%0d)", t, new_gain.re, new_gain.im, exp_gre[t-1], exp_gim[t-1]);
      end
    end
    // closed loop: the gain of y = x*conj(G) must reach conj(G) = d/x
    begin
      gain_t g;
      longint yr, yi;
      g = UNITY_GAIN; mu_shift = 2;
      for (int t = 0; t < 3000; t++) begin
        in_data.re = sample_t'(($urandom % 2) ? 20000 : -20000);
        in_data.im = sample_t'(($urandom % 2) ? 15000 : -15000);
        // target: conj(G) = 0.75*exp(-j*0.5) -> G = 0.658 + j0.360
        yr = (longint'(in_data.re) * g.re + longint'(in_data.im) * g.im + 32768) >>> 16;
        yi = (longint'(in_data.im) * g.re - longint'(in_data.re) * g.im + 32768) >>> 16;
        model.re = sample_t'(yr); model.im = sample_t'(yi);
        ref_data.re = sample_t'((longint'(in_data.re) * 43125 - longint'(in_data.im) * (-23565) + 32768) >>> 16);
        ref_data.im = sample_t'((longint'(in_data.im) * 43125 + longint'(in_data.re) * (-23565) + 32768) >>> 16);
        old_gain = g;
        repeat (3) @(posedge clk);   // inputs held: new_gain reflects this sample
        #1;
        g = new_gain;
      end
      checks += 2;
      if (g.re < 43125 - 300 || g.re > 43125 + 300) begin failures++; $display("converged re %0d", g.re); end
      if (g.im < 23565 - 300 || g.im > 23565 + 300) begin failures++; $display("converged im %0d", g.im); end
      $display("converged gain (%0d,%0d), target (43125,23565)", int'(g.re), int'(g.im));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
