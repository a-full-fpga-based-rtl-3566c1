// rf_model: behavioural stand-in for everything between the DACs and the
// ADCs (DACs, I/Q modulator, power amplifier, I/Q demodulator, ADCs), at
// complex baseband, for simulation only (not synthesizable: real arithmetic).
//
// PA: memoryless, unity small-signal gain,
//   AM/AM  |y| = r / (1 + AMAM_B*r^2),  AM/PM  arg(y) = arg(x) + AMPM_C*r^2,
// r being |x| in full-scale units. pa_out is that PA output, combinational
// from dac and quantised to the sample grid.
// Return path: pa_out * RET_GAIN * exp(j*RET_PHASE) plus a DC offset on each
// rail, delayed by LOOP_DELAY clock cycles: adc(t) = ret(pa(dac(t-LOOP_DELAY))).
module rf_model
  import dpd_pkg::*;
#(
  parameter int  LOOP_DELAY = 6,
  parameter real AMAM_B     = 0.25,
  parameter real AMPM_C     = 0.4,
  parameter real RET_GAIN   = 0.8,
  parameter real RET_PHASE  = 0.5,
  parameter int  OFF_I      = 300,
  parameter int  OFF_Q      = -200
) (
  input  logic  clk,
  input  cplx_t dac,
  output cplx_t adc,
  output cplx_t pa_out
);
  cplx_t pipe [LOOP_DELAY];
  real   yr, yi, rr, ri;

  function automatic sample_t q16(real v);
    int i;
    i = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
    if (i > 32767) i = 32767;
    if (i < -32768) i = -32768;
    return sample_t'(i);
  endfunction

  always_comb begin
    real xr, xi, r2, g, ph;
    xr = real'(dac.re) / 32768.0;
    xi = real'(dac.im) / 32768.0;
    r2 = xr * xr + xi * xi;
    g  = 1.0 / (1.0 + AMAM_B * r2);
    ph = AMPM_C * r2;
    yr = g * (xr * $cos(ph) - xi * $sin(ph));
    yi = g * (xr * $sin(ph) + xi * $cos(ph));
    rr = RET_GAIN * (yr * $cos(RET_PHASE) - yi * $sin(RET_PHASE));
    ri = RET_GAIN * (yr * $sin(RET_PHASE) + yi * $cos(RET_PHASE));
    pa_out.re = q16(yr * 32768.0);
    pa_out.im = q16(yi * 32768.0);
  end

  always_ff @(posedge clk) begin
    pipe[0].re <= q16(rr * 32768.0 + real'(OFF_I));
    pipe[0].im <= q16(ri * 32768.0 + real'(OFF_Q));
    for (int i = 1; i < LOOP_DELAY; i++) pipe[i] <= pipe[i-1];
  end
  assign adc = pipe[LOOP_DELAY-1];
endmodule
