// complex_multiplier: p = a * conj(b) (CONJ_B = 1) or p = a * b (CONJ_B = 0).
//
// a is a Q1.15 sample, b a Q2.16 gain. The four partial products are summed at
// full width, rounded to nearest (half up) back to Q1.15 and saturated.
// The predistortion cell multiplies by the conjugated gain, as its defining
// equation y = x * conj(G) asks; the return path correction uses the plain
// product. Rounding, saturation and the single register are this
// implementation's choices. Timing: one register stage, p is
// valid one cycle after a and b.
module complex_multiplier
  import dpd_pkg::*;
#(
  parameter bit CONJ_B = 1'b1
) (
  input  logic  clk,
  input  cplx_t a,
  input  gain_t b,
  output cplx_t p
);
  localparam int PW = SAMPLE_W + GAIN_W + 1;
  logic signed [GAIN_W:0]   bim;   // one extra bit so that -(-2.0) does not wrap
  logic signed [PW-1:0]     pre, pim;
  logic signed [47:0]       rre, rim;

  always_comb begin
    bim = CONJ_B ? -(GAIN_W+1)'(b.im) : (GAIN_W+1)'(b.im);
    pre = PW'(a.re * b.re) - PW'(a.im * bim);
    pim = PW'(a.re * bim)  + PW'(a.im * b.re);
    rre = (48'(pre) + 48'sd32768) >>> GAIN_FB;
    rim = (48'(pim) + 48'sd32768) >>> GAIN_FB;
  end

  always_ff @(posedge clk) begin
    p.re <= sat_sample(rre);
    p.im <= sat_sample(rim);
  end
endmodule
