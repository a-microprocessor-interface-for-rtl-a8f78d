// bit_clock_gen_tb: checks the 100 kHz phase generator at its default
// division of 50: one rise_tick every 50 system clocks, one fall_tick 25
// clocks after each rise_tick, phase_high for exactly the 25 clocks after a
// rise_tick, and a 10 us bit period with a 200 ns (5 MHz) system clock.
module bit_clock_gen_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic phase_high, fall_tick, rise_tick;
  int checks = 0, failures = 0;

  always #100 clk = ~clk;

  bit_clock_gen dut (.clk(clk), .rst_n(rst_n), .phase_high(phase_high),
                     .fall_tick(fall_tick), .rise_tick(rise_tick));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int since_rise, last_rise_cycle, cycle, n_rise;
    realtime t_rise, t_prev;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    since_rise = -1; n_rise = 0; cycle = 0; last_rise_cycle = 0; t_prev = 0;
    repeat (500) begin
      @(negedge clk);
      cycle++;
      if (since_rise >= 0) begin
        // position within the period, 0 = first clock after a rise_tick
        check(phase_high == (since_rise < 25), $sformatf("phase_high at offset %0d", since_rise));
        check(fall_tick  == (since_rise == 24), $sformatf("fall_tick at offset %0d", since_rise));
        check(rise_tick  == (since_rise == 49), $sformatf("rise_tick at offset %0d", since_rise));
      end
      if (rise_tick) begin
        t_rise = $realtime;
        if (n_rise > 0) begin
          check(cycle - last_rise_cycle == 50, "50 system clocks per bit period");
          check(t_rise - t_prev == 10_000.0, "bit period is 10 us");
        end
        n_rise++; last_rise_cycle = cycle; t_prev = t_rise;
        since_rise = 0;
      end else if (since_rise >= 0) since_rise++;
    end
    check(n_rise >= 9, "rise ticks seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
