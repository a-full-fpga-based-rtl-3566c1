// dual_port_ram: the gain look-up table of a basic predistortion cell.
//
// Two independent ports, each with address, data in, write enable and data
// out, share one array, so one side can read gains for the signal path while
// the other writes updated gains (the property the adaptive architecture
// relies on). Reads are synchronous with one cycle of latency and return the
// old word when the same port writes (read-first). If both ports write the
// same address in one cycle, port B wins. Every entry starts at the unity gain
// 1+0j, the way an FPGA block RAM is loaded at configuration. Read-first
// behaviour, the initial contents and the depth are this implementation's
// choices.
module dual_port_ram
  import dpd_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 2 * GAIN_W,
  parameter logic [DATA_W-1:0] INIT = DATA_W'(UNITY_GAIN)
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addra,
  input  logic [DATA_W-1:0] dina,
  input  logic              wea,
  output logic [DATA_W-1:0] douta,
  input  logic [ADDR_W-1:0] addrb,
  input  logic [DATA_W-1:0] dinb,
  input  logic              web,
  output logic [DATA_W-1:0] doutb
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = INIT;
  end

  always_ff @(posedge clk) begin
    douta <= mem[addra];
    doutb <= mem[addrb];
    if (wea) mem[addra] <= dina;
    if (web) mem[addrb] <= dinb;
  end
endmodule
