// bpc: basic predistortion cell, y(k) = x(k) * conj(G(|x(k)|)).
//
// The complex gain G is looked up in a dual port RAM addressed by the
// quantised magnitude of x. Port A reads the gain for the signal path; port B
// is left to whoever updates the table (an LMS block for an adapting cell, a
// copy of another cell's updates for a working cell).
//
// Pipeline (sample x(k) enters in cycle k):
//   k+1  |x(k)| registered as the port A address
//   k+2  old_gain = G(|x(k)|) from port A; x(k) delayed by two meets it
//   k+3  y = x(k)*conj(G) from the registered complex multiplier;
//        x_d3 = x(k) delayed by three (IN_DATA of an LMS block)
//   k+5  upd_addr = |x(k)| from x delayed by four, registered: the LUT entry an
//        LMS update of sample k belongs to
// The delays 2, 3 and 4 are those of the architecture's block scheme; the
// one-cycle magnitude, RAM and multiplier stages are this design's reading of
// them. Port B (addrb, dinb, web) writes one gain per cycle.
module bpc
  import dpd_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cplx_t             x,
  output cplx_t             y,
  output gain_t             old_gain,
  output cplx_t             x_d3,
  output logic [ADDR_W-1:0] upd_addr,
  input  logic [ADDR_W-1:0] addrb,
  input  gain_t             dinb,
  input  logic              web
);
  logic [ADDR_W-1:0] addra;
  cplx_t             x_d2, x_d4;
  logic [2*GAIN_W-1:0] douta, doutb_unused;

  cmag #(.ADDR_W(ADDR_W)) u_mag_a (.clk, .x(x), .addr(addra));

  dual_port_ram #(.ADDR_W(ADDR_W), .DATA_W(2*GAIN_W)) u_lut (
    .clk,
    .addra, .dina('0), .wea(1'b0), .douta,
    .addrb, .dinb(dinb), .web, .doutb(doutb_unused)
  );
  assign old_gain = gain_t'(douta);

  delay_line #(.N(2), .W(2*SAMPLE_W)) u_z2 (.clk, .rst_n, .d(x), .q(x_d2));
  delay_line #(.N(3), .W(2*SAMPLE_W)) u_z3 (.clk, .rst_n, .d(x), .q(x_d3));
  delay_line #(.N(4), .W(2*SAMPLE_W)) u_z4 (.clk, .rst_n, .d(x), .q(x_d4));

  complex_multiplier #(.CONJ_B(1'b1)) u_mul (.clk, .a(x_d2), .b(old_gain), .p(y));

  cmag #(.ADDR_W(ADDR_W)) u_mag_b (.clk, .x(x_d4), .addr(upd_addr));
endmodule
