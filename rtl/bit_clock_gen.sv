// bit_clock_gen: 100 kHz bit-clock phase generator.
//
// The serial memory is clocked at up to 100 kHz while the rest of the system
// runs from the 5 MHz processor clock. Rather than clocking logic from a
// separate 100 kHz clock, this block divides the system clock by CLK_DIV and
// produces phase information used as clock enables everywhere else:
//   phase_high  high during the first half of each bit period (SCL high half)
//   fall_tick   one-clock strobe on the last system clock of the high half;
//               registers updated on it change at the SCL falling edge
//   rise_tick   one-clock strobe on the last system clock of the low half;
//               registers updated on it change at the SCL rising edge,
//               which is also where the sequencer changes state
// The divider runs freely from reset; whether SCL actually toggles is decided
// by the controller. The 100 kHz rate is the device maximum; deriving it by
// division from the CPU clock is this design's choice.
module bit_clock_gen #(
  parameter int unsigned CLK_DIV = 50   // system clocks per bit period, even, >= 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic phase_high,
  output logic fall_tick,
  output logic rise_tick
);

  localparam int unsigned CW = $clog2(CLK_DIV);
  localparam logic [CW-1:0] LAST = CW'(CLK_DIV - 1);
  localparam logic [CW-1:0] HALF = CW'(CLK_DIV / 2);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (cnt == LAST) cnt <= '0;
    else                 cnt <= cnt + 1'b1;
  end

  assign phase_high = (cnt < HALF);
  assign fall_tick  = (cnt == HALF - 1'b1);
  assign rise_tick  = (cnt == LAST);

  initial begin
    assert (CLK_DIV >= 4 && CLK_DIV % 2 == 0)
      else $error("bit_clock_gen: CLK_DIV must be even and at least 4");
  end

endmodule
