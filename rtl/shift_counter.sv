// shift_counter: the bit counter (second state machine) of the interface.
//
// Counts bit periods 0..7 while counter_en is high and asserts cntr7 in the
// period in which the count is 7, which tells the main state machine that a
// byte has been shifted. As in the original counter equations, the count
// advances on every bit period in which it is enabled, wraps from 7 to 0,
// and returns to 0 on any period in which it is not enabled; counter_clr
// forces it to 0 immediately (the original used an asynchronous register
// reset). The main state machine clears it in states B, D, F, K and M and
// enables it in C, E, G, L and N, so each of those states lasts eight bit
// periods. Updates happen on rise_tick (the SCL rising edge).
module shift_counter (
  input  logic clk,
  input  logic rst_n,
  input  logic rise_tick,
  input  logic counter_clr,
  input  logic counter_en,
  output logic [2:0] count,
  output logic cntr7
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   count <= '0;
    else if (counter_clr)         count <= '0;
    else if (rise_tick)           count <= counter_en ? count + 3'd1 : 3'd0;
  end

  assign cntr7 = (count == 3'd7);

endmodule
