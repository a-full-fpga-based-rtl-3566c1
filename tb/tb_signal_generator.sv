// tb_signal_generator: runs an independent direct-form model of the 16-QAM
// source (PRBS x^23+x^18+1, Gray-coded levels, symbol held SPS samples, two
// moving sums of SPS samples, rounded division by SPS^2) and compares every
// output sample, including pauses of en. Also checks that all 16 symbols
// occur and that the corner point is reached.
module tb_signal_generator;
  import dpd_pkg::*;
  localparam int SPS = 8, AMP = 5400;
  logic clk = 0, rst_n = 0, en;
  cplx_t x;
  int checks = 0, failures = 0;
  bit seen [16];

  signal_generator #(.SPS(SPS), .AMP(AMP)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lev(int b);
    case (b)
      0: return -3 * AMP;
      1: return -AMP;
      3: return AMP;
      default: return 3 * AMP;
    endcase
  endfunction

  initial begin
    int lfsr, n, hr, hi, er, ei;
    int hq_r [$], hq_i [$], s1q_r [$], s1q_i [$];
    int s1r, s1i, s2r, s2i, pk;
    en = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    lfsr = 23'h7fffff; n = 0; hr = 0; hi = 0; s1r = 0; s1i = 0; s2r = 0; s2i = 0;
    for (int i = 0; i < SPS; i++) begin hq_r.push_back(0); hq_i.push_back(0); s1q_r.push_back(0); s1q_i.push_back(0); end
    er = 0; ei = 0; pk = 0;
    for (int t = 0; t < 20000; t++) begin
      en = !(t % 1000 >= 500 && t % 1000 < 510);
      if (en) begin
        // direct-form model: held symbol, then two moving sums of SPS samples
        int hold_r, hold_i, a1r, a1i;
        hq_r.push_front(hr); hq_i.push_front(hi);
        void'(hq_r.pop_back()); void'(hq_i.pop_back());
        a1r = 0; a1i = 0;
        for (int i = 0; i < SPS; i++) begin a1r += hq_r[i]; a1i += hq_i[i]; end
        s1q_r.push_front(a1r); s1q_i.push_front(a1i);
        void'(s1q_r.pop_back()); void'(s1q_i.pop_back());
        s2r = 0; s2i = 0;
        for (int i = 0; i < SPS; i++) begin s2r += s1q_r[i]; s2i += s1q_i[i]; end
        er = (s2r + SPS * SPS / 2) >>> 6;
        ei = (s2i + SPS * SPS / 2) >>> 6;
        if (n == 0) begin hr = lev(lfsr & 3); hi = lev((lfsr >> 2) & 3); seen[((hr + 3 * AMP) / (2 * AMP)) * 4 + (hi + 3 * AMP) / (2 * AMP)] = 1; end
        lfsr = ((lfsr << 1) | (((lfsr >> 22) ^ (lfsr >> 17)) & 1)) & 23'h7fffff;
        n = (n + 1) % SPS;
      end
      @(posedge clk); #1;
      checks++;
      if (int'(x.re) != er || int'(x.im) != ei) begin
        failures++;
        if (failures < 10) $display("t=%0d x (%0d,%0d) exp (%0d,%0d)", t, x.re, x.im, er, ei);
      end
      if (int'(x.re) == 3 * AMP && int'(x.im) == 3 * AMP) pk++;
    end
    begin
      int nseen;
      nseen = 0;
      foreach (seen[i]) nseen += int'(seen[i]);
      checks += 2;
      if (nseen != 16) begin failures++; $display("only %0d constellation points", nseen); end
      // three equal corner symbols in a row reach the corner point exactly
      if (pk == 0) begin failures++; $display("corner point never reached"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
