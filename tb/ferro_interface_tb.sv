// ferro_interface_tb: end-to-end test of the interface at its default
// parameters (5 MHz system clock, 100 kHz serial clock).
//
// Eight device models sit on the two lanes (chips 0..3 on each). A task
// performs 8086 minimum-mode bus cycles (T1 with ALE, T2, T3, wait states
// while READY is low, T4), with READY taken from RDY1 through one register
// as the clock generator does. The test
//  - repeats the board's first write test: 7EH to chip 3, page 1, byte 7 of
//    the low lane, checking the three bytes seen on SDA (10101110, 00000111,
//    01111110) and the 290 us / 29-period length of the cycle;
//  - reads it back (38 periods) and checks the data;
//  - runs random byte and word writes and reads on both lanes, checked
//    against a reference memory image and against the device models;
//  - accesses RAM and ROM addresses, which must see no wait states;
//  - removes a device and checks that the interface waits in state D for its
//    acknowledge, then aborts that cycle.
// A monitor counts START in B, repeated START in K, STOP in I and O, the
// stopped serial clock, wait states and acknowledge stalls; each must occur.
// It also measures the serial-bus START setup time (SCL high before SDA
// falls, at least 4.7 us as the device requires) and, as usual for this
// class of part, START hold and STOP setup times of at least 4.0 us.
module ferro_interface_tb;
  import ferro_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ale = 1'b0, bhe_n = 1'b1, rd_n = 1'b1, wr_n = 1'b1;
  logic [19:0] ad = '0;
  logic [15:0] d_out;
  logic [1:0]  d_oe;
  logic rdy1, ready = 1'b1;
  cs_t  cs_n;
  logic scl_lo_n, sda_lo_n, scl_hi_n, sda_hi_n;
  logic [3:0] fsm_state;
  logic [3:0] mdl_lo_n, mdl_hi_n;
  logic [3:0] ack_en_lo = 4'hF, ack_en_hi = 4'hF;
  logic scl_lo, sda_lo, scl_hi, sda_hi;

  int checks = 0, failures = 0;

  always #100 clk = ~clk;   // 5 MHz

  ferro_interface dut (
    .clk(clk), .rst_n(rst_n), .ale(ale), .ad_in(ad), .bhe_n(bhe_n), .rd_n(rd_n), .wr_n(wr_n),
    .d_out(d_out), .d_oe(d_oe), .rdy1(rdy1), .cs_n(cs_n),
    .scl_lo_n(scl_lo_n), .sda_lo_n(sda_lo_n), .sda_lo_in(sda_lo),
    .scl_hi_n(scl_hi_n), .sda_hi_n(sda_hi_n), .sda_hi_in(sda_hi),
    .fsm_state(fsm_state));

  // Open-drain buses with pull-ups.
  assign scl_lo = !scl_lo_n;
  assign scl_hi = !scl_hi_n;
  assign sda_lo = !(sda_lo_n || (|mdl_lo_n));
  assign sda_hi = !(sda_hi_n || (|mdl_hi_n));

  nm24cf04_model #(.CHIP_ADDR(2'd0)) lo0 (.clk(clk), .scl(scl_lo), .sda(sda_lo), .ack_enable(ack_en_lo[0]), .sda_n(mdl_lo_n[0]));
  nm24cf04_model #(.CHIP_ADDR(2'd1)) lo1 (.clk(clk), .scl(scl_lo), .sda(sda_lo), .ack_enable(ack_en_lo[1]), .sda_n(mdl_lo_n[1]));
  nm24cf04_model #(.CHIP_ADDR(2'd2)) lo2 (.clk(clk), .scl(scl_lo), .sda(sda_lo), .ack_enable(ack_en_lo[2]), .sda_n(mdl_lo_n[2]));
  nm24cf04_model #(.CHIP_ADDR(2'd3)) lo3 (.clk(clk), .scl(scl_lo), .sda(sda_lo), .ack_enable(ack_en_lo[3]), .sda_n(mdl_lo_n[3]));
  nm24cf04_model #(.CHIP_ADDR(2'd0)) hi0 (.clk(clk), .scl(scl_hi), .sda(sda_hi), .ack_enable(ack_en_hi[0]), .sda_n(mdl_hi_n[0]));
  nm24cf04_model #(.CHIP_ADDR(2'd1)) hi1 (.clk(clk), .scl(scl_hi), .sda(sda_hi), .ack_enable(ack_en_hi[1]), .sda_n(mdl_hi_n[1]));
  nm24cf04_model #(.CHIP_ADDR(2'd2)) hi2 (.clk(clk), .scl(scl_hi), .sda(sda_hi), .ack_enable(ack_en_hi[2]), .sda_n(mdl_hi_n[2]));
  nm24cf04_model #(.CHIP_ADDR(2'd3)) hi3 (.clk(clk), .scl(scl_hi), .sda(sda_hi), .ack_enable(ack_en_hi[3]), .sda_n(mdl_hi_n[3]));

  // Clock generator READY: RDY1 through one register.
  always @(posedge clk) ready <= rdy1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------------------- monitor
  int n_start_b = 0, n_start_k = 0, n_stop_i = 0, n_stop_o = 0;
  int n_scl_stopped = 0, n_waits = 0, n_ack_stall = 0, n_word = 0, n_odd = 0;
  int n_writes = 0, n_reads = 0;
  logic scl_lo_q = 1'b1, sda_lo_q = 1'b1, scl_hi_q = 1'b1, sda_hi_q = 1'b1;
  int b_cycle = 0, cyc = 0, b_to_i = 0, b_to_o = 0;
  logic [3:0] st_q = 4'd0;
  // Serial-bus timing, in system clocks of 200 ns: how long SCL has been
  // high, and how long SDA has been low with SCL high after a START.
  int hi_lo = 0, hi_hi = 0, sta_lo = -1, sta_hi = -1;
  int min_sta_setup = 1 << 30, min_sta_hold = 1 << 30, min_sto_setup = 1 << 30;
  localparam int STA_SETUP_MIN = 24;   // 4.7 us
  localparam int STA_HOLD_MIN  = 20;   // 4.0 us
  localparam int STO_SETUP_MIN = 20;   // 4.0 us

  always @(posedge clk) begin
    hi_lo <= scl_lo ? hi_lo + 1 : 0;
    hi_hi <= scl_hi ? hi_hi + 1 : 0;
    // START: SDA falls while SCL high
    if (scl_lo && scl_lo_q && sda_lo_q && !sda_lo) begin
      if (hi_lo < min_sta_setup) min_sta_setup <= hi_lo;
      sta_lo <= 0;
    end else if (sta_lo >= 0) sta_lo <= scl_lo ? sta_lo + 1 : -1;
    if (sta_lo >= 0 && !scl_lo && sta_lo < min_sta_hold) min_sta_hold <= sta_lo;
    if (scl_hi && scl_hi_q && sda_hi_q && !sda_hi) begin
      if (hi_hi < min_sta_setup) min_sta_setup <= hi_hi;
      sta_hi <= 0;
    end else if (sta_hi >= 0) sta_hi <= scl_hi ? sta_hi + 1 : -1;
    if (sta_hi >= 0 && !scl_hi && sta_hi < min_sta_hold) min_sta_hold <= sta_hi;
    // STOP: SDA rises while SCL high
    if (scl_lo && scl_lo_q && !sda_lo_q && sda_lo && hi_lo < min_sto_setup) min_sto_setup <= hi_lo;
    if (scl_hi && scl_hi_q && !sda_hi_q && sda_hi && hi_hi < min_sto_setup) min_sto_setup <= hi_hi;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    st_q <= fsm_state;
    if (scl_lo && scl_lo_q && sda_lo_q && !sda_lo) begin
      if (fsm_state == ST_B) n_start_b <= n_start_b + 1;
      if (fsm_state == ST_K) n_start_k <= n_start_k + 1;
    end
    if (scl_lo && scl_lo_q && !sda_lo_q && sda_lo) begin
      if (fsm_state == ST_I) n_stop_i <= n_stop_i + 1;
      if (fsm_state == ST_O) n_stop_o <= n_stop_o + 1;
    end
    if (scl_hi && scl_hi_q && sda_hi_q && !sda_hi && fsm_state == ST_B) n_start_b <= n_start_b + 1;
    // serial clock held high in the low half of H or J
    if ((fsm_state == ST_H || fsm_state == ST_J) && !dut.phase_high && dut.fall_tick == 1'b0
        && (scl_lo || scl_hi) && st_q == fsm_state && dut.u_bitclk.rise_tick)
      n_scl_stopped <= n_scl_stopped + 1;
    if (fsm_state == ST_B && st_q == ST_A) b_cycle <= cyc;
    if (fsm_state == ST_I && st_q == ST_H) b_to_i <= cyc - b_cycle;
    if (fsm_state == ST_O && st_q == ST_N) b_to_o <= cyc - b_cycle;
    scl_lo_q <= scl_lo; sda_lo_q <= sda_lo; scl_hi_q <= scl_hi; sda_hi_q <= sda_hi;
  end

  // ------------------------------------------------------------- bus cycles
  // One 8086 bus cycle. Returns read data and the number of wait states.
  // max_waits bounds the wait; exceeded, the cycle is abandoned (timeout=1).
  task automatic bus_cycle(input bit is_write, input logic [19:0] a, input logic bhe,
                           input logic [15:0] wd, output logic [15:0] rdat,
                           output int waits, output bit timeout, input int max_waits = 4000);
    rdat = '0; waits = 0; timeout = 0;
    @(negedge clk); ale = 1'b1; ad = a; bhe_n = bhe;          // T1
    @(negedge clk); ale = 1'b0;                                // T2
    if (is_write) begin wr_n = 1'b0; ad = {4'h0, wd}; end
    else begin rd_n = 1'b0; ad = '0; end
    @(negedge clk);                                            // T3
    while (!ready) begin
      @(negedge clk); waits++;                                 // Tw
      if (waits > max_waits) begin timeout = 1; break; end
    end
    if (!is_write) rdat = d_out;
    @(negedge clk);                                            // T4
    rd_n = 1'b1; wr_n = 1'b1;
    @(negedge clk);
  endtask

  // Reference image of the 4K-byte ferroelectric space.
  logic [7:0] ref_mem [4096];

  function automatic logic [7:0] init_byte(int chip, int loc);
    return 8'(loc * 7 + 3) ^ 8'(chip);
  endfunction

  function automatic logic [7:0] model_byte(input int lane, input int chip, input int loc);
    case ({lane[0], chip[1:0]})
      3'd0: return lo0.mem[loc];
      3'd1: return lo1.mem[loc];
      3'd2: return lo2.mem[loc];
      3'd3: return lo3.mem[loc];
      3'd4: return hi0.mem[loc];
      3'd5: return hi1.mem[loc];
      3'd6: return hi2.mem[loc];
      default: return hi3.mem[loc];
    endcase
  endfunction

  // offset within 1000H-1FFFH -> lane, chip, location in chip
  function automatic void split(input int off, output int lane, output int chip, output int loc);
    lane = off & 1;
    loc  = (off >> 1) & 9'h1FF;
    chip = (off >> 10) & 3;
  endfunction

  task automatic ferro_write(input int off, input logic [15:0] data, input bit word);
    logic [15:0] r; int w; bit to;
    logic [19:0] a;
    a = 20'h01000 | 20'(off);
    if (word) bus_cycle(1, a, 1'b0, data, r, w, to);
    else if (off & 1) bus_cycle(1, a, 1'b0, {data[7:0], 8'h00}, r, w, to);
    else bus_cycle(1, a, 1'b1, {8'h00, data[7:0]}, r, w, to);
    check(!to, $sformatf("write %h completes", a));
    check(w >= 28 * 50 && w <= 30 * 50 + 10, $sformatf("write wait states %0d", w));
    n_waits += w; n_writes++;
    if (word) begin ref_mem[off] = data[7:0]; ref_mem[off + 1] = data[15:8]; n_word++; end
    else begin ref_mem[off] = data[7:0]; if (off & 1) n_odd++; end
  endtask

  task automatic ferro_read(input int off, input bit word, output logic [15:0] r);
    int w; bit to;
    logic [19:0] a;
    a = 20'h01000 | 20'(off);
    if (word) bus_cycle(0, a, 1'b0, 16'h0, r, w, to);
    else if (off & 1) bus_cycle(0, a, 1'b0, 16'h0, r, w, to);
    else bus_cycle(0, a, 1'b1, 16'h0, r, w, to);
    check(!to, $sformatf("read %h completes", a));
    check(w >= 37 * 50 && w <= 39 * 50 + 10, $sformatf("read wait states %0d", w));
    n_waits += w; n_reads++;
    if (word) begin
      check(r == {ref_mem[off + 1], ref_mem[off]}, $sformatf("word read %h: %h exp %h", a, r, {ref_mem[off + 1], ref_mem[off]}));
      n_word++;
    end else if (off & 1) begin
      check(r[15:8] == ref_mem[off], $sformatf("odd read %h: %h exp %h", a, r[15:8], ref_mem[off]));
      n_odd++;
    end else
      check(r[7:0] == ref_mem[off], $sformatf("even read %h: %h exp %h", a, r[7:0], ref_mem[off]));
  endtask

  initial begin
    #400_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r;
    int w, lane, chip, loc, off;
    bit to;

    for (int i = 0; i < 4096; i++) begin
      split(i, lane, chip, loc);
      ref_mem[i] = init_byte(chip, loc);
    end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (100) @(posedge clk);
    check(scl_lo && sda_lo && scl_hi && sda_hi, "buses idle high");

    // Board write test: 7EH to chip 3, page 1, byte 7, low lane (address 1E0EH).
    ferro_write(12'hE0E, 16'h007E, 1'b0);
    check(lo3.last_rx[0] == 8'b1010_1110, $sformatf("byte 0 on SDA %b", lo3.last_rx[0]));
    check(lo3.last_rx[1] == 8'b0000_0111, $sformatf("byte 1 on SDA %b", lo3.last_rx[1]));
    check(lo3.last_rx[2] == 8'b0111_1110, $sformatf("byte 2 on SDA %b", lo3.last_rx[2]));
    check(lo3.mem[263] == 8'h7E, "stored at location 263 of chip 3");
    check(b_to_i == 28 * 50, $sformatf("write: B to I in %0d clocks (29 periods incl. I)", b_to_i));
    check(hi3.n_start == 0, "high lane idle during a low-lane byte write");

    ferro_read(12'hE0E, 1'b0, r);
    check(b_to_o == 37 * 50, $sformatf("read: B to O in %0d clocks (38 periods incl. O)", b_to_o));

    // Untouched location returns its initial contents.
    ferro_read(12'h40A, 1'b0, r);

    // Random accesses: even bytes, odd bytes, words.
    for (int i = 0; i < 24; i++) begin
      int kind;
      kind = i % 3;
      off  = $urandom_range(0, 4095);
      if (kind == 0) off &= ~1;          // even byte
      else if (kind == 1) off |= 1;      // odd byte
      else off &= ~1;                    // word
      ferro_write(off, 16'($urandom), kind == 2);
      ferro_read(off, kind == 2, r);
      off = $urandom_range(0, 2047) * 2;
      ferro_read(off, 1'b1, r);
    end

    // Device contents against the reference image.
    for (int i = 0; i < 4096; i += 37) begin
      split(i, lane, chip, loc);
      check(model_byte(lane, chip, loc) == ref_mem[i], $sformatf("device contents at offset %h", i));
    end
    check(model_byte(0, 3, 263) == 8'h7E, "board test byte still stored");

    // RAM and ROM cycles: chip selects and no wait states.
    repeat (60) @(negedge clk);
    bus_cycle(1, 20'h02000, 1'b1, 16'h1234, r, w, to);
    check(w == 0, "RAM cycle without wait states");
    check(dut.cs_n.lowram1_n == 1'b0 && dut.cs_n.ferro_n == 1'b1, "LOWRAM1 selected at 2000H");
    bus_cycle(0, 20'h02801, 1'b0, 16'h0, r, w, to);
    check(dut.cs_n.hiram2_n == 1'b0 && dut.cs_n.lowram2_n == 1'b1, "HIRAM2 selected at 2801H");
    bus_cycle(0, 20'hFFFF0, 1'b0, 16'h0, r, w, to);
    check(w == 0 && dut.cs_n.romcs_n == 1'b0, "ROM selected at the reset vector");
    check(fsm_state == ST_A, "sequencer idle during RAM/ROM cycles");

    // Missing device: no acknowledge, the interface waits in state D.
    ack_en_lo[2] = 1'b0;
    bus_cycle(1, 20'h01800, 1'b1, 16'h00AA, r, w, to, 1500);
    check(to, "cycle to an absent device does not complete");
    // the cycle was abandoned after max_waits; the sequencer sat in D
    ack_en_lo[2] = 1'b1;
    repeat (200) @(negedge clk);
    check(fsm_state == ST_A, "sequencer back in A after the abandoned cycle");

    // Mechanism counts.
    check(n_start_b > 0, "START in B seen");
    check(n_start_k > 0, "repeated START in K seen");
    check(n_stop_i > 0, "STOP in I seen");
    check(n_stop_o > 0, "STOP in O seen");
    check(n_scl_stopped > 0, "serial clock stopped in H/J seen");
    check(n_waits > 0, "wait states inserted");
    check(n_ack_stall > 0, "acknowledge stall seen");
    check(n_word > 0 && n_odd > 0, "word and odd-byte accesses");
    check(min_sta_setup >= STA_SETUP_MIN, "START setup time (SCL high before SDA falls) >= 4.7 us");
    check(min_sta_hold >= STA_HOLD_MIN, "START hold time (SDA low before SCL falls) >= 4.0 us");
    check(min_sto_setup >= STO_SETUP_MIN, "STOP setup time (SCL high before SDA rises) >= 4.0 us");
    $display("min START setup=%0d hold=%0d  min STOP setup=%0d (system clocks)",
             min_sta_setup, min_sta_hold, min_sto_setup);
    $display("writes=%0d reads=%0d waits=%0d start_b=%0d start_k=%0d stop_i=%0d stop_o=%0d scl_stopped=%0d ack_stall=%0d word=%0d odd=%0d",
             n_writes, n_reads, n_waits, n_start_b, n_start_k, n_stop_i, n_stop_o, n_scl_stopped,
             n_ack_stall, n_word, n_odd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Acknowledge stall: the sequencer stays in D for more than ten bit periods.
  int d_len = 0;
  always @(posedge clk) begin
    if (fsm_state == ST_D) d_len <= d_len + 1; else d_len <= 0;
    if (d_len == 10 * 50) n_ack_stall <= n_ack_stall + 1;
  end
endmodule
