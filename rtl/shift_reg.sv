// shift_reg: eight-bit parallel-load / shift-right register (74198 behaviour).
//
// The register converts control and data bytes to serial form for SDA and
// received serial data back to a byte. q[7] is stage QH, the serial output,
// and q[0] is stage QA, fed by the serial input si when shifting right, so a
// byte loaded in parallel leaves most significant bit first and a received
// byte arrives most significant bit first. The mode is {s1, s0}: 11 loads d,
// 01 shifts right, 00 holds. The shift-left mode of the TTL part (10) is not
// used by this design and holds here. The register acts only on system
// clocks where ce is high; ce replaces the gated shift-register clock of the
// original board.
module shift_reg
  import ferro_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  sr_mode_t   mode,
  input  logic [7:0] d,
  input  logic       si,
  output logic [7:0] q,
  output logic       qh
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else if (ce) begin
      unique case (mode)
        SR_LOAD: q <= d;
        SR_SHR:  q <= {q[6:0], si};
        default: q <= q;
      endcase
    end
  end

  assign qh = q[7];

endmodule
