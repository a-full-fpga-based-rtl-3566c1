// offset_cancellation: removes the DC (I-Q) offset of the received baseband.
//
// Each rail keeps a running estimate of its mean with a first-order recursive
// average, est += (x - est) / 2^SHIFT, held with SHIFT extra fraction bits,
// and outputs x - est, saturated. While en is low the estimate is frozen (and
// still subtracted). The averaging method is this implementation's choice; the
// architecture only asks that I and Q offsets be removed before the received
// data is compared with the transmitted data.
// Timing: one register, y is valid one cycle after x. Time constant about
// 2^SHIFT samples.
module offset_cancellation
  import dpd_pkg::*;
#(
  parameter int unsigned SHIFT = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  cplx_t x,
  output cplx_t y
);
  localparam int AW = SAMPLE_W + SHIFT + 2;
  logic signed [AW-1:0] acc_re, acc_im;        // estimate, SHIFT fraction bits
  logic signed [AW-1:0] est_re, est_im;        // estimate rounded to sample LSBs

  always_comb begin
    est_re = (acc_re + (AW'(1) <<< (SHIFT - 1))) >>> SHIFT;
    est_im = (acc_im + (AW'(1) <<< (SHIFT - 1))) >>> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_re <= '0;
      acc_im <= '0;
      y      <= '0;
    end else begin
      if (en) begin
        acc_re <= acc_re + AW'(x.re) - (acc_re >>> SHIFT);
        acc_im <= acc_im + AW'(x.im) - (acc_im >>> SHIFT);
      end
      y.re <= sat_sample(48'(x.re) - 48'(est_re));
      y.im <= sat_sample(48'(x.im) - 48'(est_im));
    end
  end
endmodule
