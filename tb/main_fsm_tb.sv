// main_fsm_tb: drives the sequencer with a bit tick every 4 system clocks and
// a reference bit counter, and checks
//  - the write path B C D E F G H I and read path B C D E J K L M N O, with
//    the number of bit periods in each state (29 for a write, 38 for a read);
//  - the Moore outputs s1 s0 muxb muxa of every state against the table of
//    the original state-machine program;
//  - that a missing acknowledge holds the machine in D, F, J or M;
//  - that dropping the request returns it to A at once.
module main_fsm_tb;
  import ferro_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rise_tick, req = 1'b0, rw = 1'b0, cntr7, ack;
  state_t state;
  dp_ctrl_t dp;
  int checks = 0, failures = 0;
  int ref_cnt = 0;
  int tickdiv = 0;
  bit ack_hold = 1'b0;        // when set, ack stays low
  state_t stall_state = ST_A; // state in which ack is withheld
  int stalls_seen = 0;

  always #100 clk = ~clk;

  main_fsm dut (.clk(clk), .rst_n(rst_n), .rise_tick(rise_tick), .req(req), .rw(rw),
                .cntr7(cntr7), .ack(ack), .state(state), .dp_ctrl(dp));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Bit tick and reference counter.
  always @(posedge clk) begin
    tickdiv <= (tickdiv + 1) % 4;
    if (rise_tick) begin
      if (state inside {ST_B, ST_D, ST_F, ST_K, ST_M}) ref_cnt <= 0;
      else if (state inside {ST_C, ST_E, ST_G, ST_L, ST_N}) ref_cnt <= (ref_cnt + 1) % 8;
      else ref_cnt <= 0;
    end
  end
  assign rise_tick = (tickdiv == 3);
  assign cntr7 = (ref_cnt == 7);
  assign ack = !ack_hold && (state inside {ST_D, ST_F, ST_J, ST_M}) && !(state == stall_state);

  // Expected Moore outputs {s1, s0, muxb, muxa} per state.
  function automatic logic [3:0] exp_out(state_t s);
    case (s)
      ST_B: return 4'b1100;
      ST_C: return 4'b0100;
      ST_D: return 4'b1101;
      ST_E: return 4'b0100;
      ST_F: return 4'b1110;
      ST_G: return 4'b0100;
      ST_J: return 4'b1111;
      ST_K: return 4'b1111;
      ST_L: return 4'b0100;
      ST_M: return 4'b0100;
      ST_N: return 4'b0100;
      default: return 4'b0000;
    endcase
  endfunction

  // Run one access; return the run-length trace of the states left A..back to A.
  task automatic run(input bit is_read, output string trace, output int periods);
    state_t cur;
    int len;
    trace = ""; periods = 0; len = 0;
    rw = is_read;
    @(negedge clk); req = 1'b1;
    // wait for leaving A
    while (state == ST_A) @(negedge clk);
    cur = state;
    while (state != ST_A) begin
      @(posedge clk);
      if (rise_tick) begin
        check(exp_out(state) == {dp.mode, dp.sel}, $sformatf("outputs in state %s", state.name()));
        periods++; len++;
        #1;
        if (state != cur) begin
          trace = {trace, $sformatf("%s%0d ", cur.name(), len)};
          cur = state; len = 0;
        end
      end
    end
    @(negedge clk); req = 1'b0;
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string tr;
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    check(state == ST_A, "idle in A without request");

    run(1'b0, tr, n);
    check(tr == "ST_B1 ST_C8 ST_D1 ST_E8 ST_F1 ST_G8 ST_H1 ST_I1 ", {"write path: ", tr});
    check(n == 29, $sformatf("write takes %0d bit periods", n));

    run(1'b1, tr, n);
    check(tr == "ST_B1 ST_C8 ST_D1 ST_E8 ST_J1 ST_K1 ST_L8 ST_M1 ST_N8 ST_O1 ", {"read path: ", tr});
    check(n == 38, $sformatf("read takes %0d bit periods", n));

    // acknowledge withheld in each waiting state for 5 periods
    for (int k = 0; k < 4; k++) begin
      state_t ws;
      ws = (k == 0) ? ST_D : (k == 1) ? ST_F : (k == 2) ? ST_J : ST_M;
      stall_state = ws;
      rw = (ws inside {ST_J, ST_M});
      @(negedge clk); req = 1'b1;
      wait (state == ws);
      repeat (5 * 4) @(negedge clk);
      check(state == ws, $sformatf("held in %s without acknowledge", ws.name()));
      if (state == ws) stalls_seen++;
      stall_state = ST_A;
      wait (state == ST_A);
      @(negedge clk); req = 1'b0;
      repeat (8) @(negedge clk);
    end
    check(stalls_seen == 4, "acknowledge stall seen in D, F, J and M");

    // request dropped in the middle of an access
    rw = 1'b1;
    @(negedge clk); req = 1'b1;
    wait (state == ST_L);
    @(negedge clk); req = 1'b0;
    @(negedge clk);
    check(state == ST_A, "request dropped: back to A");
    repeat (20) @(negedge clk);
    check(state == ST_A, "stays in A");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
