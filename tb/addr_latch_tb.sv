// addr_latch_tb: random bus values with occasional ALE pulses; the latch
// must show the last value presented with ALE high and ignore the bus
// otherwise (as when the same pins carry data).
module addr_latch_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ale, bhe_in, bhe_q;
  logic [19:0] ad, addr, r_addr;
  logic r_bhe;
  int checks = 0, failures = 0;

  always #100 clk = ~clk;

  addr_latch dut (.clk(clk), .rst_n(rst_n), .ale(ale), .ad_in(ad), .bhe_n_in(bhe_in),
                  .addr(addr), .bhe_n(bhe_q));

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ale = 0; ad = 0; bhe_in = 1;
    r_addr = '0; r_bhe = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      ale    = ($urandom_range(0, 4) == 0);
      ad     = 20'($urandom);
      bhe_in = 1'($urandom);
      @(posedge clk);
      if (ale) begin r_addr = ad; r_bhe = bhe_in; end
      #1;
      checks++;
      if (addr !== r_addr || bhe_q !== r_bhe) begin
        failures++; $display("FAIL: latched %h/%b expected %h/%b", addr, bhe_q, r_addr, r_bhe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
