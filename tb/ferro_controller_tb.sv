// ferro_controller_tb: drives the control path with its own bit-clock phases
// (8 system clocks per bit period) and a simple acknowledging device on each
// lane, and counts per access what the lanes receive:
//   write, low lane: 27 shift-register strobes (3 loads, 24 shifts), 27 SCL
//     low phases, START/STOP flip-flop set only in I, 29 bit periods;
//   read, high lane: 35 strobes (3 loads, 24 shifts out, 8 shifts in), 35 SCL
//     low phases, data-bus enable for exactly one period (O), 38 bit periods;
//   the unselected lane's signals stay inactive;
//   a word access stalls in D when one lane does not acknowledge;
//   rdy_i marks I only until the request ends.
module ferro_controller_tb;
  import ferro_pkg::*;
  localparam int DIV = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic phase_high, fall_tick, rise_tick;
  logic req = 1'b0, rw = 1'b0, sel_lo = 1'b0, sel_hi = 1'b0;
  logic sda_lo_in, sda_hi_in, ss_q, cntr7, rdy_i, rdy_o;
  logic nack_hi = 1'b0;
  state_t state;
  dp_ctrl_t dp;
  lane_ctrl_t lc_lo, lc_hi;
  int cnt = 0;
  int checks = 0, failures = 0;

  always #100 clk = ~clk;
  always @(posedge clk) cnt <= (cnt + 1) % DIV;
  assign phase_high = cnt < DIV / 2;
  assign fall_tick  = cnt == DIV / 2 - 1;
  assign rise_tick  = cnt == DIV - 1;

  // Devices acknowledge in the low half of the last period of C, E, G, L.
  wire ack_win = state inside {ST_C, ST_E, ST_G, ST_L} && cntr7 && !phase_high;
  assign sda_lo_in = !ack_win;
  assign sda_hi_in = !(ack_win && !nack_hi);

  ferro_controller dut (
    .clk(clk), .rst_n(rst_n), .phase_high(phase_high), .fall_tick(fall_tick), .rise_tick(rise_tick),
    .req(req), .rw(rw), .sel_lo(sel_lo), .sel_hi(sel_hi), .sda_lo_in(sda_lo_in), .sda_hi_in(sda_hi_in),
    .state(state), .dp_ctrl(dp), .lc_lo(lc_lo), .lc_hi(lc_hi), .ss_q(ss_q), .cntr7(cntr7),
    .rdy_i(rdy_i), .rdy_o(rdy_o));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int n_ce, n_load, n_sclk, n_oe, n_periods, n_other, n_ss_set_early;

  task automatic access(input bit is_read, input bit lo, input bit hi);
    lane_ctrl_t l, o;
    n_ce = 0; n_load = 0; n_sclk = 0; n_oe = 0; n_periods = 0; n_other = 0; n_ss_set_early = 0;
    @(negedge clk); rw = is_read; sel_lo = lo; sel_hi = hi; req = 1'b1;
    while (state == ST_A) @(posedge clk);
    while (state != ST_A) begin
      @(posedge clk);
      l = lo ? lc_lo : lc_hi;
      o = lo ? lc_hi : lc_lo;
      if (l.sr_ce) begin n_ce++; if (dp.mode == SR_LOAD) n_load++; end
      if (l.scl_en && !phase_high && cnt == DIV / 2) n_sclk++;   // first clock of a low half
      if (l.rd_oe && rise_tick) n_oe++;
      if (rise_tick) n_periods++;
      if (!(lo && hi) && o != '0) n_other++;
      if (ss_q && !(state inside {ST_A, ST_I, ST_O})) n_ss_set_early++;
      if (state == ST_I && rise_tick) begin
        check(rdy_i, "rdy_i in I while the request is active");
      end
    end
    @(negedge clk); req = 1'b0;
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);

    access(1'b0, 1'b1, 1'b0);
    check(n_ce == 27 && n_load == 3, $sformatf("write strobes %0d loads %0d", n_ce, n_load));
    check(n_sclk == 27, $sformatf("write SCL clocks %0d", n_sclk));
    check(n_periods == 29, $sformatf("write periods %0d", n_periods));
    check(n_other == 0, "high lane idle during low-lane write");
    check(n_ss_set_early == 0, "START/STOP flip-flop set only in I/O");
    check(n_oe == 0, "no data-bus drive on a write");

    access(1'b1, 1'b0, 1'b1);
    check(n_ce == 35 && n_load == 3, $sformatf("read strobes %0d loads %0d", n_ce, n_load));
    check(n_sclk == 35, $sformatf("read SCL clocks %0d", n_sclk));
    check(n_periods == 38, $sformatf("read periods %0d", n_periods));
    check(n_oe == 1, "data-bus drive for one period");
    check(n_other == 0, "low lane idle during high-lane read");

    // word access, both lanes acknowledge
    access(1'b1, 1'b1, 1'b1);
    check(n_periods == 38, "word read periods");

    // word access, high lane silent: stall in D
    nack_hi = 1'b1;
    @(negedge clk); rw = 1'b0; sel_lo = 1; sel_hi = 1; req = 1'b1;
    wait (state == ST_D);
    repeat (20 * DIV) @(negedge clk);
    check(state == ST_D, "stalled in D without the high lane's acknowledge");
    req = 1'b0;
    @(negedge clk);
    check(state == ST_A, "abort to A");
    nack_hi = 1'b0;

    // rdy_i drops as soon as the request ends in I
    @(negedge clk); rw = 1'b0; sel_lo = 1; sel_hi = 0; req = 1'b1;
    wait (state == ST_I);
    @(negedge clk);
    check(rdy_i, "rdy_i at I");
    req = 1'b0;
    repeat (2) @(negedge clk);
    check(state == ST_I && !rdy_i, "I finishes, ready withdrawn after the cycle");
    wait (state == ST_A);
    repeat (2) @(negedge clk);
    check(ss_q == 1'b0, "START/STOP flip-flop cleared in A");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
