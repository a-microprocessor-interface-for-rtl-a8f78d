// ferro_datapath: the data path of one byte lane (low or high block).
//
// Each lane owns an SDA bus shared by four NM24CF04 devices and an SCL line.
// The lane forms the control bytes in its byte multiplexer, converts them to
// serial form in the shift register and drives them onto SDA most significant
// bit first; on a read it shifts the SDA bits back into the shift register and
// presents the byte to its half of the processor data bus.
//
// Both buses are open drain: the lane never drives a line high, it only pulls
// it low (scl_n, sda_n = 1 means "pull low") and relies on the pull-ups.
//   SCL is pulled low during the low half of every bit period while the
//     controller enables the clock onto it, and floats high otherwise.
//   SDA is pulled low when the shift register is enabled onto it and QH is 0,
//     or when the START/STOP flip-flop is enabled onto it and holds 0.
// The serial input of the shift register follows SDA while the controller
// enables it and sees a released (high) line otherwise. All strobes come from
// ferro_controller; this block has no state of its own beyond the shift
// register. The line drivers of the original board become these pull-low
// terms; the assertion below catches two drivers enabled at once.
module ferro_datapath
  import ferro_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       phase_high,
  input  dp_ctrl_t   dp_ctrl,
  input  lane_ctrl_t lc,
  input  logic       ss_q,       // shared START/STOP flip-flop
  input  logic [1:0] chip,
  input  logic       page,
  input  logic [7:0] word,
  input  logic [7:0] wdata,
  input  logic       sda_in,     // resolved SDA level
  output logic       scl_n,
  output logic       sda_n,
  output logic [7:0] rdata,
  output logic       rd_oe
);

  logic [7:0] mux_q;
  logic [7:0] sr_q;
  logic       qh;

  byte_mux u_mux (
    .sel  (dp_ctrl.sel),
    .chip (chip),
    .page (page),
    .word (word),
    .wdata(wdata),
    .q    (mux_q)
  );

  shift_reg u_sr (
    .clk  (clk),
    .rst_n(rst_n),
    .ce   (lc.sr_ce),
    .mode (dp_ctrl.mode),
    .d    (mux_q),
    .si   (lc.sr_in_en ? sda_in : 1'b1),
    .q    (sr_q),
    .qh   (qh)
  );

  assign scl_n = lc.scl_en & ~phase_high;
  assign sda_n = (lc.sr_bus_en & ~qh) | (lc.ss_en & ~ss_q);
  assign rdata = sr_q;
  assign rd_oe = lc.rd_oe;

  // Only one source may be enabled onto SDA at a time.
  assert property (@(posedge clk) disable iff (!rst_n)
    !(lc.sr_bus_en && lc.ss_en) && !(lc.sr_bus_en && lc.sr_in_en));

endmodule
