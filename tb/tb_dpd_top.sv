// tb_dpd_top: end-to-end test of the adaptive predistorter at its default
// parameters, closed through a behavioural PA and return path (rf_model:
// compressing PA with AM/PM, return-path gain 0.8 and phase 0.5 rad, DC offset
// on I and Q, 6-cycle loop delay).
//
// Phases, all with the 16-QAM generator running continuously:
//   1  all write enables low: the LUTs hold unity, so dac must equal Tx_Data
//      three cycles earlier, exactly; the error of the PA output against
//      Tx_Data is measured (no predistortion).
//   2  we_pa raised while transmitting: BPC#2/#3 learn the PA; the PA-model
//      LMS error must fall well below the phase-1 level.
//   3  we_pd and we raised as well: BPC#4 learns the inverse and BPC#1
//      receives the copy.
//   4  all enables dropped again (hot): gains frozen; every dac sample must
//      equal Tx_Data*conj(G) with G read from BPC#1's table by an independent
//      magnitude model; the PA output error is measured again and must be
//      at least 6 dB below phase 1, and the spread of the PA gain and phase
//      over amplitude must shrink at least twofold (AM/AM) and fourfold
//      (AM/PM).
//   5  external source selected: same exact check on tx_ext samples.
// Mechanisms counted (each must occur): offset removed, time alignment in
// effect, PA-gain writes, post-distorter writes, copies into BPC#1, hot
// enable and disable, frozen operation, external source.
module tb_dpd_top;
  import dpd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tx_sel, gen_en, we, we_pa, we_pd, offset_en;
  logic [4:0] mu_shift_pa, mu_shift_pd;
  logic [5:0] align_delay;
  gain_t corr_coef;
  cplx_t tx_ext, dac, adc, tx_data_o, rx_data_o, rx_mod_o, tx_mod_o, pa_out;
  err_t  lms_err_pa, lms_err_pd;
  int checks = 0, failures = 0;

  dpd_top dut (.*);
  rf_model #(.LOOP_DELAY(6)) u_rf (.clk, .dac, .adc, .pa_out);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mag_addr(cplx_t v);
    int a, b, mx, mn, m;
    a = v.re < 0 ? -int'(v.re) : int'(v.re);
    b = v.im < 0 ? -int'(v.im) : int'(v.im);
    mx = a > b ? a : b; mn = a > b ? b : a;
    m = mx + mn / 4 + mn / 8;
    if (m >= 32768) return 255;
    return m / 128;
  endfunction
  function automatic longint rsat(longint v);
    longint r;
    r = (v + 32768) >>> 16;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  // history of Tx_Data, observed once per cycle
  cplx_t txh [4];
  real   spp, stt, spt_re, spt_im, lms_pow;
  real   rat_re [8], rat_im [8];
  int    rat_n [8];
  int    n_pow;
  int    cnt_offset = 0, cnt_align = 0, cnt_wpa = 0, cnt_wpd = 0, cnt_copy = 0;
  int    cnt_hot_on = 0, cnt_hot_off = 0, cnt_frozen = 0, cnt_ext = 0;
  logic  we_any_q = 0;

  // PA output error left after the best complex linear gain: the nonlinear
  // distortion, in dB relative to the PA output power
  function automatic real nl_err_db();
    return 10.0 * $log10((spp - (spt_re * spt_re + spt_im * spt_im) / stt) / spp);
  endfunction

  // spread over the amplitude groups of the PA gain (AM/AM, relative) and of
  // its phase (AM/PM, rad); groups with few samples are ignored
  task automatic am_spread(output real am, output real pm);
    real gmin, gmax, pmin, pmax;
    gmin = 1e9; gmax = -1e9; pmin = 1e9; pmax = -1e9;
    for (int i = 0; i < 8; i++) begin
      if (rat_n[i] >= 200) begin
        real gr, gi, m, ph;
        gr = rat_re[i] / rat_n[i]; gi = rat_im[i] / rat_n[i];
        m = $sqrt(gr * gr + gi * gi); ph = $atan2(gi, gr);
        $display("  |Tx| group %0d: gain %0.4f phase %0.4f rad (%0d samples)", i, m, ph, rat_n[i]);
        if (m < gmin) gmin = m;
        if (m > gmax) gmax = m;
        if (ph < pmin) pmin = ph;
        if (ph > pmax) pmax = ph;
      end
    end
    am = (gmax - gmin) / gmax;
    pm = pmax - pmin;
  endtask

  task automatic clear_stats();
    spp = 0; stt = 0; spt_re = 0; spt_im = 0; lms_pow = 0; n_pow = 0;
    for (int i = 0; i < 8; i++) begin rat_re[i] = 0; rat_im[i] = 0; rat_n[i] = 0; end
  endtask

  // one clock: advance, then look at the outputs of the new cycle
  task automatic step(bit measure, bit exact);
    @(posedge clk); #1;
    if (!tx_sel) begin                   // external source: new sample for the next edge
      tx_ext.re = sample_t'(int'($signed(15'($urandom))));
      tx_ext.im = sample_t'(int'($signed(15'($urandom))));
    end
    for (int i = 3; i > 0; i--) txh[i] = txh[i-1];
    txh[0] = tx_sel ? tx_data_o : tx_ext;   // tx_data_o has not settled yet in ext mode
    if (we_pa) cnt_wpa++;
    if (we_pd) cnt_wpd++;
    if (we)    cnt_copy++;
    if ((we | we_pa | we_pd) && !we_any_q) cnt_hot_on++;
    if (!(we | we_pa | we_pd) && we_any_q) cnt_hot_off++;
    we_any_q = we | we_pa | we_pd;
    if (measure) begin
      real pr, pi, tr, ti;
      pr = real'(pa_out.re); pi = real'(pa_out.im);
      tr = real'(txh[3].re); ti = real'(txh[3].im);
      spp += pr * pr + pi * pi;
      stt += tr * tr + ti * ti;
      spt_re += pr * tr + pi * ti;           // sum pa * conj(tx)
      spt_im += pi * tr - pr * ti;
      begin                                  // AM/AM and AM/PM by amplitude group
        real a2;
        int  grp;
        a2 = tr * tr + ti * ti;
        if (a2 > 2000.0 * 2000.0) begin
          grp = int'($floor($sqrt(a2) / 3000.0));
          if (grp > 7) grp = 7;
          rat_re[grp] += (pr * tr + pi * ti) / a2;
          rat_im[grp] += (pi * tr - pr * ti) / a2;
          rat_n[grp]++;
        end
      end
      lms_pow += real'(lms_err_pa.re) * real'(lms_err_pa.re) + real'(lms_err_pa.im) * real'(lms_err_pa.im);
      n_pow++;
    end
    if (exact) begin
      gain_t g; longint er, ei;
      g = gain_t'(dut.u_bpc1.u_lut.mem[mag_addr(txh[3])]);
      er = rsat(longint'(txh[3].re) * g.re + longint'(txh[3].im) * g.im);
      ei = rsat(longint'(txh[3].im) * g.re - longint'(txh[3].re) * g.im);
      checks++;
      if (longint'(dac.re) != er || longint'(dac.im) != ei) begin
        failures++;
        if (failures < 10) $display("dac (%0d,%0d) exp (%0d,%0d)", int'(dac.re), int'(dac.im), er, ei);
      end
    end
  endtask

  real nmse0, nmse1, lms0, lms1, am0, am1, pm0, pm1;
  initial begin
    tx_sel = 1; gen_en = 1; we = 0; we_pa = 0; we_pd = 0; offset_en = 1;
    mu_shift_pa = 1; mu_shift_pd = 1;
    align_delay = 6'd7;                    // LOOP_DELAY + offset canceller register
    // inverse of the return path (0.8*exp(j0.5)), scaled by 1/0.88: the
    // linearised PA is asked for a gain of 0.88, so that its compressed output
    // still covers the whole Tx_Data amplitude range
    corr_coef.re = 18'sd81695;
    corr_coef.im = -18'sd44631;
    tx_ext = '0;
    for (int i = 0; i < 4; i++) txh[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ---- phase 1: no adaptation, unity gains -------------------------------
    repeat (200) step(0, 0);
    clear_stats();
    repeat (20000) step(1, 1);
    nmse0 = nl_err_db();
    am_spread(am0, pm0);
    lms0  = lms_pow / n_pow;
    $display("phase 1: PA output nonlinear error %0.2f dB, LMS(PA) error power %0.1f", nmse0, lms0);

    // ---- phase 2: PA identification ----------------------------------------
    we_pa = 1;
    repeat (150000) step(0, 0);
    clear_stats();
    repeat (20000) step(1, 0);
    lms1 = lms_pow / n_pow;
    $display("phase 2: LMS(PA) error power %0.1f (was %0.1f)", lms1, lms0);
    checks++;
    // a small residual error is only possible if Tx_DPD and Rx_Data line up
    if (lms1 < lms0 / 10.0) cnt_align++;
    else begin failures++; $display("PA model did not converge"); end

    // ---- phase 3: post-distorter and copy into BPC#1 -----------------------
    we_pd = 1; we = 1;
    repeat (900000) step(0, 0);

    // offset cancellation (time constant 2^16 samples): the estimate must sit
    // on the injected DC offset, within the wander caused by the signal
    checks++;
    begin
      int ore, oim;
      ore = int'((dut.u_offset.acc_re + 32768) >>> 16);
      oim = int'((dut.u_offset.acc_im + 32768) >>> 16);
      $display("offset estimate (%0d,%0d), injected (300,-200)", ore, oim);
      if (ore > 300 - 200 && ore < 300 + 200 && oim > -200 - 200 && oim < -200 + 200) cnt_offset++;
      else begin failures++; $display("offset not removed"); end
    end

    // ---- phase 4: hot disable, frozen gains --------------------------------
    we = 0; we_pd = 0; we_pa = 0;
    repeat (10) step(0, 0);
    clear_stats();
    repeat (20000) begin step(1, 1); cnt_frozen++; end
    nmse1 = nl_err_db();
    am_spread(am1, pm1);
    $display("AM/AM spread %0.4f -> %0.4f, AM/PM spread %0.4f -> %0.4f rad", am0, am1, pm0, pm1);
    checks += 2;
    if (am1 > am0 / 2.0) begin failures++; $display("AM/AM not flattened"); end
    if (pm1 > pm0 / 4.0) begin failures++; $display("AM/PM not flattened"); end
    $display("phase 4: PA output nonlinear error %0.2f dB with predistortion (was %0.2f dB)", nmse1, nmse0);
    checks++;
    if (nmse1 > nmse0 - 6.0) begin failures++; $display("predistortion gain too small"); end

    // ---- phase 5: external source ------------------------------------------
    tx_sel = 0;
    for (int i = 0; i < 2000; i++) begin
      step(0, i >= 4);
      cnt_ext++;
    end

    $display("mechanisms: offset=%0d align=%0d pa_writes=%0d pd_writes=%0d copies=%0d hot_on=%0d hot_off=%0d frozen=%0d ext=%0d",
             cnt_offset, cnt_align, cnt_wpa, cnt_wpd, cnt_copy, cnt_hot_on, cnt_hot_off, cnt_frozen, cnt_ext);
    checks += 9;
    if (cnt_offset == 0) failures++;
    if (cnt_align == 0) failures++;
    if (cnt_wpa == 0) failures++;
    if (cnt_wpd == 0) failures++;
    if (cnt_copy == 0) failures++;
    if (cnt_hot_on == 0) failures++;
    if (cnt_hot_off == 0) failures++;
    if (cnt_frozen == 0) failures++;
    if (cnt_ext == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
