// time_alignment: puts Tx_Data, Tx_DPD and Rx_Data on the same sample and
// corrects the amplitude and phase of the return path.
//
// Rx_Data comes back from the power amplifier after the loop delay `delay`
// (in samples, measured as seen at this block's inputs) and scaled by the
// unknown gain and phase of the return path. Tx_DPD is delayed by `delay`
// samples and Tx_Data by `delay + TX_LAG` samples (TX_LAG is the latency of the
// predistortion cell between them). Rx_Data is multiplied by the complex
// coefficient `coef` (Q2.16), which the user sets to the inverse of the return
// path gain measured with the PA driven in its linear region.
// Both delays use one circular buffer each, written every cycle; delay and
// coef are run-time inputs, and neither is estimated here.
// Timing: all three outputs carry one register (the multiplier's) on top of
// the programmed delay: tx_dpd_o(t) = tx_dpd(t-1-delay),
// tx_data_o(t) = tx_data(t-1-delay-TX_LAG), rx_data_o(t) = coef*rx_data(t-1).
module time_alignment
  import dpd_pkg::*;
#(
  parameter int unsigned MAX_DELAY = 64,
  parameter int unsigned TX_LAG    = 3
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(MAX_DELAY)-1:0] delay,
  input  gain_t                        coef,
  input  cplx_t                        tx_data,
  input  cplx_t                        tx_dpd,
  input  cplx_t                        rx_data,
  output cplx_t                        tx_data_o,
  output cplx_t                        tx_dpd_o,
  output cplx_t                        rx_data_o
);
  if (MAX_DELAY < 2) begin : g_bad_max_delay
    $error("time_alignment: MAX_DELAY must be at least 2");
  end

  localparam int unsigned DEPTH = 2 ** $clog2(MAX_DELAY + TX_LAG + 1);
  localparam int unsigned PW    = $clog2(DEPTH);

  cplx_t          buf_data [DEPTH];
  cplx_t          buf_dpd  [DEPTH];
  logic [PW-1:0]  wp;
  logic [PW-1:0]  rp_dpd, rp_data;

  // The word written at wp in cycle t is read back at wp - delay, so an
  // output register after the read gives delay + 1 cycles in total.
  always_comb begin
    rp_dpd  = wp - PW'(delay);
    rp_data = wp - PW'(delay) - PW'(TX_LAG);
  end

  always_ff @(posedge clk) begin
    buf_data[wp] <= tx_data;
    buf_dpd[wp]  <= tx_dpd;
    if (!rst_n) begin
      wp        <= '0;
      tx_data_o <= '0;
      tx_dpd_o  <= '0;
    end else begin
      wp        <= wp + 1'b1;
      tx_data_o <= (delay == '0 && TX_LAG == 0) ? tx_data : buf_data[rp_data];
      tx_dpd_o  <= (delay == '0) ? tx_dpd : buf_dpd[rp_dpd];
    end
  end

  complex_multiplier #(.CONJ_B(1'b0)) u_corr (.clk, .a(rx_data), .b(coef), .p(rx_data_o));
endmodule
