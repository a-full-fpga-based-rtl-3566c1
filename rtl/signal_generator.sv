// signal_generator: 16-QAM test source for Tx_Data.
//
// A 23-bit PRBS (x^23 + x^18 + 1, one step per clock) supplies the symbols:
// at each symbol boundary its four low bits pick one of the 16 points
// {-3,-1,1,3} x {-3,-1,1,3} * AMP (Gray coded per rail: 00->-3, 01->-1,
// 11->+1, 10->+3). The symbol is held for SPS samples and then shaped by two
// cascaded moving sums of SPS samples each (a quadratic B-spline pulse that
// spans three symbols), normalised by SPS^2 with rounding. The shaped
// envelope takes a dense set of amplitudes, so every gain-LUT entry below the
// peak gets exercised. The constellation follows the 16-QAM test signal; the
// PRBS, the pulse shape, SPS and AMP are this implementation's choices.
// SPS must be a power of two and at least 4 (fresh PRBS bits per symbol).
// Timing: one sample per clock while en is high; everything holds while en
// is low. The pulse shaping adds 2*SPS samples of group delay.
module signal_generator
  import dpd_pkg::*;
#(
  parameter int unsigned SPS = 8,
  parameter int unsigned AMP = 5400
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  output cplx_t x
);
  localparam int unsigned SW = $clog2(SPS);

  if (SPS < 4 || (SPS & (SPS - 1)) != 0) begin : g_bad_sps
    $error("signal_generator: SPS must be a power of two and at least 4");
  end
  if (3 * AMP > 32767) begin : g_bad_amp
    $error("signal_generator: 3*AMP must fit a Q1.15 sample");
  end

  localparam int unsigned AW = SAMPLE_W + 2 * SW + 1;
  typedef logic signed [AW-1:0] acc_t;

  logic [22:0]   lfsr;
  logic [SW-1:0] n;
  acc_t          h_re, h_im;                 // held symbol
  acc_t          h_dl_re [SPS], h_dl_im [SPS];
  acc_t          s1_re, s1_im;               // first moving sum
  acc_t          s1_dl_re [SPS], s1_dl_im [SPS];
  acc_t          s2_re, s2_im;               // second moving sum
  acc_t          s1n_re, s1n_im, s2n_re, s2n_im;

  function automatic acc_t level(input logic [1:0] b);
    unique case (b)
      2'b00:   return -acc_t'(3 * AMP);
      2'b01:   return -acc_t'(AMP);
      2'b11:   return  acc_t'(AMP);
      default: return  acc_t'(3 * AMP);
    endcase
  endfunction

  always_comb begin
    s1n_re = s1_re + h_re - h_dl_re[SPS-1];
    s1n_im = s1_im + h_im - h_dl_im[SPS-1];
    s2n_re = s2_re + s1n_re - s1_dl_re[SPS-1];
    s2n_im = s2_im + s1n_im - s1_dl_im[SPS-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lfsr  <= 23'h7fffff;
      n     <= '0;
      h_re  <= '0;
      h_im  <= '0;
      s1_re <= '0;
      s1_im <= '0;
      s2_re <= '0;
      s2_im <= '0;
      for (int i = 0; i < int'(SPS); i++) begin
        h_dl_re[i]  <= '0;
        h_dl_im[i]  <= '0;
        s1_dl_re[i] <= '0;
        s1_dl_im[i] <= '0;
      end
      x <= '0;
    end else if (en) begin
      lfsr <= {lfsr[21:0], lfsr[22] ^ lfsr[17]};
      n    <= n + 1'b1;
      if (n == '0) begin
        h_re <= level(lfsr[1:0]);
        h_im <= level(lfsr[3:2]);
      end
      h_dl_re[0]  <= h_re;
      h_dl_im[0]  <= h_im;
      s1_dl_re[0] <= s1n_re;
      s1_dl_im[0] <= s1n_im;
      for (int i = 1; i < int'(SPS); i++) begin
        h_dl_re[i]  <= h_dl_re[i-1];
        h_dl_im[i]  <= h_dl_im[i-1];
        s1_dl_re[i] <= s1_dl_re[i-1];
        s1_dl_im[i] <= s1_dl_im[i-1];
      end
      s1_re <= s1n_re;
      s1_im <= s1n_im;
      s2_re <= s2n_re;
      s2_im <= s2n_im;
      x.re  <= SAMPLE_W'((s2n_re + (acc_t'(1) <<< (2 * SW - 1))) >>> (2 * SW));
      x.im  <= SAMPLE_W'((s2n_im + (acc_t'(1) <<< (2 * SW - 1))) >>> (2 * SW));
    end
  end
endmodule
