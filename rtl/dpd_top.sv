// dpd_top: adaptive LMS-based digital predistorter for one power amplifier,
// predistortion and adaptation both running in the FPGA fabric while the
// transmitter keeps sending.
//
// Four basic predistortion cells (BPCs), each a complex gain LUT indexed by
// the input magnitude, y = x * conj(G(|x|)):
//   BPC#1  predistorts Tx_Data into Tx_DPD, which goes to the DACs.
//   BPC#2  + LMS identify the PA: input Tx_DPD, reference Rx_Data.
//          Its gain updates (NEW_GAINS_PA) are written into BPC#2 and BPC#3.
//   BPC#3  the PA model applied to Tx_Data; its output is Rx_MOD, the PA
//          output the transmitter would get without predistortion.
//   BPC#4  + LMS post-distort Rx_MOD back towards Tx_Data (inverse of the PA
//          model). Its updates (NEW_GAINS_DPD) are written into BPC#4 and
//          copied into BPC#1, which turns the post-inverse into a pre-inverse.
// Received data passes offset cancellation and then time alignment with
// return-path amplitude/phase correction before it meets Tx_DPD.
//
// Write enables: we_pa writes BPC#2 and BPC#3, we_pd writes BPC#4, we copies
// into BPC#1. Each can be raised or dropped at any time while data flows;
// with all three low the predistorter runs with frozen gains.
// Every gain update is written where the cell that computed it read its old
// gain: BPC#3 at BPC#2's update address, BPC#1 at BPC#4's.
//
// Timing: one complex sample per clock. Tx_Data -> dac is 3 cycles. The
// reference of each LMS is delayed to meet its cell's output: Rx_Data by 3,
// Tx_Data by 6 (3 through BPC#3, 3 through BPC#4). align_delay must be set to
// the loop delay from dac to the offset canceller's output (loop delay outside
// the FPGA + 1). Formats (Q1.15 samples, Q2.16 gains), LUT depth, step size
// encoding and the external-source select are this implementation's choices.
module dpd_top
  import dpd_pkg::*;
#(
  parameter int unsigned ADDR_W       = 8,
  parameter int unsigned GEN_SPS      = 8,
  parameter int unsigned GEN_AMP      = 5400,
  parameter int unsigned OFFSET_SHIFT = 16,
  parameter int unsigned MAX_DELAY    = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // transmit source
  input  logic                         tx_sel,       // 1: signal generator, 0: tx_ext
  input  logic                         gen_en,
  input  cplx_t                        tx_ext,
  // converters
  output cplx_t                        dac,          // Tx_DPD
  input  cplx_t                        adc,          // received baseband
  // adaptation control
  input  logic                         we,           // copy NEW_GAINS_DPD into BPC#1
  input  logic                         we_pa,        // write NEW_GAINS_PA into BPC#2, BPC#3
  input  logic                         we_pd,        // write NEW_GAINS_DPD into BPC#4
  input  logic [4:0]                   mu_shift_pa,
  input  logic [4:0]                   mu_shift_pd,
  // return path conditioning
  input  logic                         offset_en,
  input  logic [$clog2(MAX_DELAY)-1:0] align_delay,
  input  gain_t                        corr_coef,
  // monitors
  output cplx_t                        tx_data_o,
  output cplx_t                        rx_data_o,
  output cplx_t                        rx_mod_o,
  output cplx_t                        tx_mod_o,
  output err_t                         lms_err_pa,
  output err_t                         lms_err_pd
);
  cplx_t tx_gen, tx_data, tx_dpd;
  cplx_t rx_oc, tx_data_al, tx_dpd_al, rx_al;
  cplx_t rx_ref, tx_ref;
  cplx_t rx_mod, tx_mod, pa_model_out;
  cplx_t b2_xd3, b4_xd3, b1_xd3_unused, b3_xd3_unused;
  gain_t b2_old, b4_old, b1_old_unused, b3_old_unused;
  gain_t new_gains_pa, new_gains_dpd;
  logic [ADDR_W-1:0] b2_upd, b4_upd, b1_upd_unused, b3_upd_unused;

  // ---- transmit path --------------------------------------------------------
  signal_generator #(.SPS(GEN_SPS), .AMP(GEN_AMP)) u_gen (
    .clk, .rst_n, .en(gen_en), .x(tx_gen));

  assign tx_data = tx_sel ? tx_gen : tx_ext;

  bpc #(.ADDR_W(ADDR_W)) u_bpc1 (
    .clk, .rst_n, .x(tx_data), .y(tx_dpd),
    .old_gain(b1_old_unused), .x_d3(b1_xd3_unused), .upd_addr(b1_upd_unused),
    .addrb(b4_upd), .dinb(new_gains_dpd), .web(we));

  assign dac = tx_dpd;

  // ---- receive path conditioning -------------------------------------------
  offset_cancellation #(.SHIFT(OFFSET_SHIFT)) u_offset (
    .clk, .rst_n, .en(offset_en), .x(adc), .y(rx_oc));

  time_alignment #(.MAX_DELAY(MAX_DELAY), .TX_LAG(3)) u_align (
    .clk, .rst_n, .delay(align_delay), .coef(corr_coef),
    .tx_data(tx_data), .tx_dpd(tx_dpd), .rx_data(rx_oc),
    .tx_data_o(tx_data_al), .tx_dpd_o(tx_dpd_al), .rx_data_o(rx_al));

  // ---- PA identification: BPC#2 + LMS, copied into BPC#3 --------------------
  bpc #(.ADDR_W(ADDR_W)) u_bpc2 (
    .clk, .rst_n, .x(tx_dpd_al), .y(pa_model_out),
    .old_gain(b2_old), .x_d3(b2_xd3), .upd_addr(b2_upd),
    .addrb(b2_upd), .dinb(new_gains_pa), .web(we_pa));

  delay_line #(.N(3), .W(2*SAMPLE_W)) u_rx_ref (.clk, .rst_n, .d(rx_al), .q(rx_ref));

  lms u_lms_pa (
    .clk, .rst_n, .ref_data(rx_ref), .model(pa_model_out), .old_gain(b2_old),
    .in_data(b2_xd3), .mu_shift(mu_shift_pa), .new_gain(new_gains_pa),
    .lms_error(lms_err_pa));

  bpc #(.ADDR_W(ADDR_W)) u_bpc3 (
    .clk, .rst_n, .x(tx_data_al), .y(rx_mod),
    .old_gain(b3_old_unused), .x_d3(b3_xd3_unused), .upd_addr(b3_upd_unused),
    .addrb(b2_upd), .dinb(new_gains_pa), .web(we_pa));

  // ---- PA inversion: BPC#4 + LMS, copied into BPC#1 -------------------------
  bpc #(.ADDR_W(ADDR_W)) u_bpc4 (
    .clk, .rst_n, .x(rx_mod), .y(tx_mod),
    .old_gain(b4_old), .x_d3(b4_xd3), .upd_addr(b4_upd),
    .addrb(b4_upd), .dinb(new_gains_dpd), .web(we_pd));

  delay_line #(.N(6), .W(2*SAMPLE_W)) u_tx_ref (.clk, .rst_n, .d(tx_data_al), .q(tx_ref));

  lms u_lms_pd (
    .clk, .rst_n, .ref_data(tx_ref), .model(tx_mod), .old_gain(b4_old),
    .in_data(b4_xd3), .mu_shift(mu_shift_pd), .new_gain(new_gains_dpd),
    .lms_error(lms_err_pd));

  assign tx_data_o = tx_data;
  assign rx_data_o = rx_al;
  assign rx_mod_o  = rx_mod;
  assign tx_mod_o  = tx_mod;
endmodule
