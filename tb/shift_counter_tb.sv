// shift_counter_tb: checks the bit counter against a reference count:
// counting 0..7 with cntr7 at 7 while enabled, wrap to 0, return to 0 when
// not enabled, immediate clear, and no change between bit ticks.
module shift_counter_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rise_tick = 1'b0, clr = 1'b0, en = 1'b0;
  logic [2:0] count;
  logic cntr7;
  int checks = 0, failures = 0;
  int ref_cnt = 0;
  int n_cntr7 = 0;

  always #100 clk = ~clk;

  shift_counter dut (.clk(clk), .rst_n(rst_n), .rise_tick(rise_tick),
                     .counter_clr(clr), .counter_en(en), .count(count), .cntr7(cntr7));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      // choose stimulus
      rise_tick = ($urandom_range(0, 2) == 0);
      if (i < 200)       begin en = 1'b1; clr = (i % 37 == 0); end
      else if (i < 400)  begin en = ($urandom_range(0, 5) != 0); clr = ($urandom_range(0, 20) == 0); end
      else               begin en = 1'b1; clr = 1'b0; end
      @(posedge clk);
      if (clr)            ref_cnt = 0;
      else if (rise_tick) ref_cnt = en ? (ref_cnt + 1) % 8 : 0;
      #1;
      check(count == 3'(ref_cnt), $sformatf("count %0d expected %0d", count, ref_cnt));
      check(cntr7 == (ref_cnt == 7), "cntr7");
      if (cntr7) n_cntr7++;
    end
    check(n_cntr7 > 10, "cntr7 reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
