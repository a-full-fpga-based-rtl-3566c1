// lms: complex LMS update of one LUT gain, G_new = G_old + mu * x(k) * conj(e(k))
// with e(k) = REFERENCE - MODEL, where MODEL = x(k) * conj(G_old) is the output
// of the cell that owns the gain.
//
// mu is a power of two, 2^-mu_shift, chosen at run time. The update is rounded
// to nearest and saturated to the Q2.16 gain range.
// Timing: ref_data (the reference), model and in_data belong to the same sample; old_gain of
// that sample arrives one cycle earlier (straight from the LUT read port).
// Stage 1 registers e (lms_error, 1 cycle); stage 2 registers new_gain
// (2 cycles after ref_data/model). The two stages and the step-size encoding
// are this implementation's choices.
module lms
  import dpd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  cplx_t      ref_data,
  input  cplx_t      model,
  input  gain_t      old_gain,
  input  cplx_t      in_data,
  input  logic [4:0] mu_shift,
  output gain_t      new_gain,
  output err_t       lms_error
);
  gain_t g_d1, g_d2;
  cplx_t x_d1;
  logic signed [ERR_W+SAMPLE_W:0] pre, pim;     // x * conj(e), Q2.30 scale
  logic signed [47:0]             dre, dim;     // delta in gain LSBs
  logic signed [47:0]             half;
  int unsigned                    sh;

  // Stage 1: error
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lms_error <= '0;
      x_d1      <= '0;
      g_d1      <= UNITY_GAIN;
      g_d2      <= UNITY_GAIN;
    end else begin
      g_d1         <= old_gain;
      g_d2         <= g_d1;
      lms_error.re <= ERR_W'(ref_data.re) - ERR_W'(model.re);
      lms_error.im <= ERR_W'(ref_data.im) - ERR_W'(model.im);
      x_d1         <= in_data;
    end
  end

  // Stage 2: x * conj(e) * mu, added to the old gain
  always_comb begin
    pre  = (ERR_W+SAMPLE_W+1)'(x_d1.re * lms_error.re) + (ERR_W+SAMPLE_W+1)'(x_d1.im * lms_error.im);
    pim  = (ERR_W+SAMPLE_W+1)'(x_d1.im * lms_error.re) - (ERR_W+SAMPLE_W+1)'(x_d1.re * lms_error.im);
    // product has 30 fraction bits, gain has 16: shift by 14 + mu_shift
    sh   = 32'(mu_shift) + 32'(2 * SAMPLE_FB - GAIN_FB);
    half = 48'sd1 <<< (sh - 1);
    dre  = (48'(pre) + half) >>> sh;
    dim  = (48'(pim) + half) >>> sh;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      new_gain <= UNITY_GAIN;
    end else begin
      new_gain.re <= sat_gain(48'(g_d2.re) + dre);
      new_gain.im <= sat_gain(48'(g_d2.im) + dim);
    end
  end
endmodule
