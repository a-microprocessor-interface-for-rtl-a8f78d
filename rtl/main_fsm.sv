// main_fsm: the fifteen-state sequencer of the ferroelectric memory interface.
//
// One access of an NM24CF04 runs through states A..O (encoded 0..14):
//   A        idle; leaves when the processor requests the ferroelectric memory
//   B, C     START, then slave address byte 0 (load in B, seven shifts in C)
//   D, E     acknowledge of byte 0, word address byte 1 (load in D, shift in E);
//            at the end of E the cycle branches on R/W (write F, read J)
//   F, G     write: acknowledge of byte 1, data byte 2 (load in F, shift in G)
//   H, I     write: acknowledge of byte 2 with SCL stopped, then STOP; back to A
//   J, K     read: acknowledge of byte 1 with SCL stopped, repeated START and
//            load of slave address byte 3 (read)
//   L        read: shift byte 3
//   M, N     read: acknowledge of byte 3, then eight data bits shifted in
//   O        read: data to the processor, STOP; back to A
// States C, E, G, L and N wait for cntr7 from the bit counter; D, F, J and M
// wait for the registered acknowledge. The state graph and the Moore outputs
// (s1, s0, muxb, muxa) follow the original state-machine program; in
// particular byte 1 is selected by muxa alone and byte 2 by muxb alone, and H
// advances to I without testing the acknowledge.
//
// Timing: the state register moves only on rise_tick (the SCL rising edge).
// req low returns the machine to A at once, as the chip-select signal reset
// the original machine, except in I and O: these two states send STOP after
// the processor has been released and may see the request end, so they
// always run to completion (this design's choice).
module main_fsm
  import ferro_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     rise_tick,
  input  logic     req,        // ferroelectric memory selected and a strobe active
  input  logic     rw,         // 1 = read, 0 = write
  input  logic     cntr7,      // bit counter reached 7
  input  logic     ack,        // registered acknowledge from the addressed device(s)
  output state_t   state,
  output dp_ctrl_t dp_ctrl
);

  state_t next;

  always_comb begin
    next = state;
    unique case (state)
      ST_A: if (req)   next = ST_B;
      ST_B:            next = ST_C;
      ST_C: if (cntr7) next = ST_D;
      ST_D: if (ack)   next = ST_E;
      ST_E: if (cntr7) next = rw ? ST_J : ST_F;
      ST_F: if (ack)   next = ST_G;
      ST_G: if (cntr7) next = ST_H;
      ST_H:            next = ST_I;
      ST_I:            next = ST_A;
      ST_J: if (ack)   next = ST_K;
      ST_K:            next = ST_L;
      ST_L: if (cntr7) next = ST_M;
      ST_M: if (ack)   next = ST_N;
      ST_N: if (cntr7) next = ST_O;
      ST_O:            next = ST_A;
      default:         next = ST_A;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         state <= ST_A;
    else if (!req && !(state inside {ST_I, ST_O}))
                        state <= ST_A;
    else if (rise_tick) state <= next;
  end

  // Moore outputs.
  always_comb begin
    dp_ctrl = '{mode: SR_HOLD, sel: BYTE_SLAVE_WR};
    unique case (state)
      ST_B:       dp_ctrl = '{mode: SR_LOAD, sel: BYTE_SLAVE_WR};
      ST_D:       dp_ctrl = '{mode: SR_LOAD, sel: BYTE_WORD};
      ST_F:       dp_ctrl = '{mode: SR_LOAD, sel: BYTE_DATA};
      ST_J, ST_K: dp_ctrl = '{mode: SR_LOAD, sel: BYTE_SLAVE_RD};
      ST_C, ST_E, ST_G, ST_L, ST_M, ST_N:
                  dp_ctrl = '{mode: SR_SHR,  sel: BYTE_SLAVE_WR};
      default:    dp_ctrl = '{mode: SR_HOLD, sel: BYTE_SLAVE_WR};
    endcase
  end

  // The state count never reaches 15.
  assert property (@(posedge clk) disable iff (!rst_n) state != state_t'(4'd15));

endmodule
