// shift_reg_tb: random mode, data and serial input against a reference
// register: parallel load, shift right toward QH with serial input at QA,
// hold, and no action without the clock enable.
module shift_reg_tb;
  import ferro_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ce, si, qh;
  sr_mode_t mode;
  logic [7:0] d, q, r;
  int checks = 0, failures = 0;

  always #100 clk = ~clk;

  shift_reg dut (.clk(clk), .rst_n(rst_n), .ce(ce), .mode(mode), .d(d), .si(si), .q(q), .qh(qh));

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce = 0; si = 0; d = 0; mode = SR_HOLD; r = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      ce   = ($urandom_range(0, 3) != 0);
      mode = sr_mode_t'($urandom_range(0, 3));
      d    = 8'($urandom);
      si   = 1'($urandom);
      @(posedge clk);
      if (ce) begin
        if (mode == SR_LOAD)     r = d;
        else if (mode == SR_SHR) r = {r[6:0], si};
      end
      #1;
      checks++;
      if (q !== r || qh !== r[7]) begin failures++; $display("FAIL: q %h expected %h", q, r); end
    end
    // a loaded byte leaves most significant bit first
    @(negedge clk); ce = 1; mode = SR_LOAD; d = 8'b0111_1110;
    for (int b = 7; b >= 0; b--) begin
      @(negedge clk); mode = SR_SHR;
      checks++;
      if (qh !== d[b]) begin failures++; $display("FAIL: serial order bit %0d", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
