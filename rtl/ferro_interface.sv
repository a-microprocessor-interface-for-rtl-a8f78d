// ferro_interface: NM24CF04 serial ferroelectric memory as 8086 main memory.
//
// The processor reads and writes the ferroelectric memory with ordinary bus
// cycles; this block turns each cycle into a serial transfer on a two-wire
// (SCL/SDA) bus and holds the processor in wait states until it is done.
// Memory is split like the 8086 bus: the low lane (even addresses, D7..D0)
// and the high lane (odd addresses, D15..D8) each have their own SDA/SCL pair
// with four 512-byte devices, and a word access runs both lanes at once.
//
// Address use inside 1000H-1FFFH: A0/BHE pick the lane, A11..A10 the device,
// A9 the page and A8..A1 the byte. A write sends START, slave address, word
// address, data and STOP (29 bit periods, 290 us at 100 kHz). A read sends
// START, slave address, word address, a repeated START, the slave address
// with the read bit, receives the data byte and sends STOP (38 bit periods).
//
// Interface: the 8086 side uses the multiplexed bus ad_in with ALE, RD, WR
// and BHE, read data leaves on d_out with byte enables d_oe (the board's data
// transceivers are not modelled), and rdy1 feeds the clock generator's ready
// input. Both memory buses are open drain: *_n outputs pull a line low, the
// sda_*_in inputs return the resolved level. cs_n carries the RAM, ROM and
// ferroelectric chip selects; fsm_state shows the sequencer state (A..O =
// 0..14). Everything runs from the processor clock clk; the 100 kHz bit timing
// is derived by dividing it by CLK_DIV (5 MHz / 100 kHz = 50).
//
// The sequencing follows the original board. This design's own choices: the
// state machine starts only while RD or WR is active (the chip select alone
// stays asserted after the cycle, which would restart it); states I and O
// always finish their STOP and release only the cycle that started the
// access; and the lanes are driven from one synchronous clock with clock
// enables instead of gated clocks.
module ferro_interface
  import ferro_pkg::*;
#(
  parameter int unsigned CLK_DIV = DEFAULT_CLK_DIV
) (
  input  logic        clk,
  input  logic        rst_n,
  // 8086 minimum-mode bus
  input  logic        ale,
  input  logic [19:0] ad_in,
  input  logic        bhe_n,
  input  logic        rd_n,
  input  logic        wr_n,
  output logic [15:0] d_out,
  output logic [1:0]  d_oe,
  output logic        rdy1,
  output cs_t         cs_n,
  // low lane two-wire bus
  output logic        scl_lo_n,
  output logic        sda_lo_n,
  input  logic        sda_lo_in,
  // high lane two-wire bus
  output logic        scl_hi_n,
  output logic        sda_hi_n,
  input  logic        sda_hi_in,
  // status
  output logic [3:0]  fsm_state
);

  logic [19:0] addr;
  logic        bhe_q;
  logic        phase_high, fall_tick, rise_tick;
  logic        req, ss_q, rdy_i, rdy_o;
  state_t      state;
  dp_ctrl_t    dp_ctrl;
  lane_ctrl_t  lc_lo, lc_hi;
  logic [7:0]  rdata_lo, rdata_hi;
  logic        oe_lo, oe_hi;

  addr_latch u_latch (
    .clk     (clk),
    .rst_n   (rst_n),
    .ale     (ale),
    .ad_in   (ad_in),
    .bhe_n_in(bhe_n),
    .addr    (addr),
    .bhe_n   (bhe_q)
  );

  chip_select u_cs (
    .addr_hi(addr[14:11]),
    .a0     (addr[0]),
    .bhe_n  (bhe_q),
    .st_i   (rdy_i),
    .st_o   (rdy_o),
    .cs_n   (cs_n),
    .rdy1   (rdy1)
  );

  bit_clock_gen #(.CLK_DIV(CLK_DIV)) u_bitclk (
    .clk       (clk),
    .rst_n     (rst_n),
    .phase_high(phase_high),
    .fall_tick (fall_tick),
    .rise_tick (rise_tick)
  );

  assign req = !cs_n.ferro_n && (!rd_n || !wr_n);

  ferro_controller u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .phase_high(phase_high),
    .fall_tick (fall_tick),
    .rise_tick (rise_tick),
    .req       (req),
    .rw        (wr_n),
    .sel_lo    (!addr[0]),
    .sel_hi    (!bhe_q),
    .sda_lo_in (sda_lo_in),
    .sda_hi_in (sda_hi_in),
    .state     (state),
    .dp_ctrl   (dp_ctrl),
    .lc_lo     (lc_lo),
    .lc_hi     (lc_hi),
    .ss_q      (ss_q),
    .cntr7     (),
    .rdy_i     (rdy_i),
    .rdy_o     (rdy_o)
  );

  ferro_datapath u_lo (
    .clk       (clk),
    .rst_n     (rst_n),
    .phase_high(phase_high),
    .dp_ctrl   (dp_ctrl),
    .lc        (lc_lo),
    .ss_q      (ss_q),
    .chip      (addr[11:10]),
    .page      (addr[9]),
    .word      (addr[8:1]),
    .wdata     (ad_in[7:0]),
    .sda_in    (sda_lo_in),
    .scl_n     (scl_lo_n),
    .sda_n     (sda_lo_n),
    .rdata     (rdata_lo),
    .rd_oe     (oe_lo)
  );

  ferro_datapath u_hi (
    .clk       (clk),
    .rst_n     (rst_n),
    .phase_high(phase_high),
    .dp_ctrl   (dp_ctrl),
    .lc        (lc_hi),
    .ss_q      (ss_q),
    .chip      (addr[11:10]),
    .page      (addr[9]),
    .word      (addr[8:1]),
    .wdata     (ad_in[15:8]),
    .sda_in    (sda_hi_in),
    .scl_n     (scl_hi_n),
    .sda_n     (sda_hi_n),
    .rdata     (rdata_hi),
    .rd_oe     (oe_hi)
  );

  assign d_out     = {oe_hi ? rdata_hi : 8'h00, oe_lo ? rdata_lo : 8'h00};
  assign d_oe      = {oe_hi, oe_lo};
  assign fsm_state = state;

endmodule
