// addr_latch: address and BHE latch of the minimum-mode 8086 bus.
//
// During T1 the processor puts the 20-bit address and BHE on the multiplexed
// bus and pulses ALE; the latch keeps them for the rest of the bus cycle,
// while the same pins carry data. The board used transparent octal latches
// closed by the falling edge of ALE; here the value is captured on every
// system clock while ALE is high, so the last address seen with ALE high is
// held, which gives the same result one system clock later.
module addr_latch (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ale,
  input  logic [19:0] ad_in,
  input  logic        bhe_n_in,
  output logic [19:0] addr,
  output logic        bhe_n
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr  <= '0;
      bhe_n <= 1'b1;
    end else if (ale) begin
      addr  <= ad_in;
      bhe_n <= bhe_n_in;
    end
  end

endmodule
