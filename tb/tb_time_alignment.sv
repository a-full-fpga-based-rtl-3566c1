// tb_time_alignment: streams random Tx_Data, Tx_DPD and Rx_Data, changes the
// programmed delay (0, 1, small, the maximum) and the correction coefficient,
// and checks tx_dpd_o(t) = tx_dpd(t-1-delay), tx_data_o(t) =
// tx_data(t-1-delay-TX_LAG) and rx_data_o(t) = round(coef*rx_data(t-1)).
module tb_time_alignment;
  import dpd_pkg::*;
  localparam int MD = 16, LAG = 3;
  logic clk = 0, rst_n = 0;
  logic [$clog2(MD)-1:0] delay;
  gain_t coef;
  cplx_t tx_data, tx_dpd, rx_data, tx_data_o, tx_dpd_o, rx_data_o;
  int checks = 0, failures = 0;

  time_alignment #(.MAX_DELAY(MD), .TX_LAG(LAG)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rsat(longint v);
    longint r;
    r = (v + 32768) >>> 16;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  cplx_t hd [int], hp [int], hr [int];
  initial begin
    int dl [4] = '{0, 1, 5, MD - 1};
    int t;
    tx_data = '0; tx_dpd = '0; rx_data = '0; delay = '0; coef = UNITY_GAIN;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    t = 0;
    for (int seg = 0; seg < 8; seg++) begin
      delay = ($clog2(MD))'(dl[seg % 4]);
      coef.re = gain_rail_t'($urandom); coef.im = gain_rail_t'($urandom);
      for (int i = 0; i < 1000; i++, t++) begin
        tx_data.re = sample_t'($urandom); tx_data.im = sample_t'($urandom);
        tx_dpd.re  = sample_t'($urandom); tx_dpd.im  = sample_t'($urandom);
        rx_data.re = sample_t'($urandom); rx_data.im = sample_t'($urandom);
        hd[t] = tx_data; hp[t] = tx_dpd; hr[t] = rx_data;
        @(posedge clk); #1;      // outputs of cycle t+1
        if (i >= MD + LAG + 2) begin
          longint er, ei;
          er = rsat(longint'(hr[t].re) * coef.re - longint'(hr[t].im) * coef.im);
          ei = rsat(longint'(hr[t].im) * coef.re + longint'(hr[t].re) * coef.im);
          checks += 3;
          if (tx_dpd_o !== hp[t - int'(delay)]) begin failures++; $display("t=%0d d=%0d tx_dpd", t, delay); end
          if (tx_data_o !== hd[t - int'(delay) - LAG]) begin failures++; $display("t=%0d d=%0d tx_data", t, delay); end
          if (longint'(rx_data_o.re) != er || longint'(rx_data_o.im) != ei) begin failures++; $display("t=%0d rx", t); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
