// tb_dual_port_ram: checks the unity initial contents, one-cycle reads on both
// ports, read-first behaviour, simultaneous writes on the two ports and
// port B winning a same-address write collision, against an array model.
module tb_dual_port_ram;
  import dpd_pkg::*;
  localparam int AW = 6, DW = 36;
  logic clk = 0;
  logic [AW-1:0] addra, addrb;
  logic [DW-1:0] dina, dinb, douta, doutb;
  logic wea, web;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  dual_port_ram #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wea = 0; web = 0; dina = 0; dinb = 0; addra = 0; addrb = 0;
    for (int i = 0; i < 2**AW; i++) model[i] = {18'sd65536, 18'sd0};
    // initial contents: unity gain everywhere
    for (int i = 0; i < 2**AW; i++) begin
      addra = AW'(i); addrb = AW'(2**AW - 1 - i);
      @(posedge clk); #1;
      checks += 2;
      if (douta !== model[i]) begin failures++; $display("init A %0d %h", i, douta); end
      if (doutb !== model[2**AW-1-i]) begin failures++; $display("init B %0d %h", i, doutb); end
    end
    for (int t = 0; t < 8000; t++) begin
      logic [DW-1:0] ea, eb;
      addra = AW'($urandom); addrb = AW'($urandom);
      if (t % 500 == 7) addrb = addra;             // force collisions
      dina = {$urandom, 4'($urandom)}; dinb = {$urandom, 4'($urandom)};
      wea = ($urandom % 3) == 0; web = ($urandom % 2) == 0;
      ea = model[addra]; eb = model[addrb];        // read-first
      @(posedge clk); #1;
      if (wea) model[addra] = dina;
      if (web) model[addrb] = dinb;                // B wins a collision
      checks += 2;
      if (douta !== ea) begin failures++; $display("t=%0d A %h exp %h", t, douta, ea); end
      if (doutb !== eb) begin failures++; $display("t=%0d B %h exp %h", t, doutb, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
