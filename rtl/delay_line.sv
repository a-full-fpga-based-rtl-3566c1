// delay_line: fixed z^-N delay of a W-bit word (the "Delay z^-n" blocks that
// keep data, gains and LUT addresses of a basic predistortion cell in step).
// A chain of N registers cleared by the synchronous active-low reset; q is d
// from N clock cycles earlier. N = 0 is a plain wire. The reset value (zero)
// is this implementation's choice.
module delay_line #(
  parameter int unsigned N = 2,
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [N];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(N); i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < int'(N); i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[N-1];
  end
endmodule
