// cmag: the "|.|" block that turns a complex sample into a gain-LUT address.
//
// The magnitude is approximated as max(|I|,|Q|) + 3/8*min(|I|,|Q|)
// (alpha-max-plus-beta-min, peak error about 7 %), which needs only adds and
// shifts. The magnitude range [0,1) of full scale is spread over the 2^ADDR_W
// entries; larger magnitudes use the last entry. The way the magnitude is
// computed is this implementation's choice; only consistency matters, since
// the same function indexes the table when it is read and when it is updated.
// Timing: one register, addr is valid one cycle after x.
module cmag
  import dpd_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  cplx_t             x,
  output logic [ADDR_W-1:0] addr
);
  if (ADDR_W < 1 || ADDR_W > SAMPLE_FB) begin : g_bad_addr_w
    $error("cmag: ADDR_W must lie between 1 and the sample fraction bits");
  end

  logic [SAMPLE_W-1:0] ai, aq, mx, mn;
  logic [SAMPLE_W+1:0] mag;   // up to 1.375 * 2^15

  always_comb begin
    ai  = x.re[SAMPLE_W-1] ? SAMPLE_W'(-x.re) : SAMPLE_W'(x.re);
    aq  = x.im[SAMPLE_W-1] ? SAMPLE_W'(-x.im) : SAMPLE_W'(x.im);
    mx  = (ai > aq) ? ai : aq;
    mn  = (ai > aq) ? aq : ai;
    mag = (SAMPLE_W+2)'(mx) + (SAMPLE_W+2)'(mn >> 2) + (SAMPLE_W+2)'(mn >> 3);
  end

  always_ff @(posedge clk) begin
    if (mag >= (SAMPLE_W+2)'(1 << SAMPLE_FB))
      addr <= '1;
    else
      addr <= mag[SAMPLE_FB-1 -: ADDR_W];
  end
endmodule
