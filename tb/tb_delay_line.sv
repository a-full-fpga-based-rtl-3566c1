// tb_delay_line: drives random words through a z^-3 delay and compares each
// output with the input three cycles earlier; also checks that reset clears
// every stage.
module tb_delay_line;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  logic [31:0] d, q;
  logic [31:0] hist [$];
  int checks = 0, failures = 0;

  delay_line #(.N(N), .W(32)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 32'hdead_beef;
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) begin   // reset flushes all stages
      checks++;
      if (q !== 0) begin failures++; $display("reset: q=%h", q); end
      @(posedge clk); #1;
    end
    #1 rst_n = 1;
    for (int i = 0; i < N - 1; i++) hist.push_back(0);  // observed one cycle after each edge
    for (int i = 0; i < 500; i++) begin
      d = $urandom;
      hist.push_back(d);
      @(posedge clk); #1;
      begin
        logic [31:0] exp_q;
        exp_q = hist.pop_front();
        checks++;
        if (q !== exp_q) begin failures++; $display("i=%0d q=%h exp=%h", i, q, exp_q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
