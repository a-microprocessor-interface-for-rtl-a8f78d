// ferro_controller: control path of the ferroelectric memory interface.
//
// Holds the main state machine, the bit counter, the START/STOP flip-flop,
// one acknowledge flip-flop per lane and the decode that turns the current
// state, the bit-clock phase and cntr7 into the strobes of the two lanes.
// Within every bit period the high half comes first; SDA changes only in the
// low half except for START and STOP, which are made while SCL is high.
//
//   shift register strobe  load on the falling edge in B, D, F, K; shift out
//                          on the falling edge in C, E, G, L; shift in on the
//                          rising edge that ends M and N1..N7
//   shift register on SDA  low half of B, D, F, K; all of C, E, G, L except
//                          the low half of their last (cntr7) period, which
//                          is left free for the device's acknowledge
//   START/STOP flip-flop   on SDA in the high half of B and K (START), the
//                          low half of H and all of I (STOP of a write), the
//                          high half of O (STOP of a read); cleared in A, set
//                          in I and in the low half of O
//   SCL clock              off in A, I, O and in the low half of H, J and of
//                          the last period of N; on otherwise
//   acknowledge            sampled from SDA at the end of the last period of
//                          C, E, G, L and held for one bit period, during
//                          which D, F, J or M test it
//   bit counter            cleared in B, D, F, K, M; counts in C, E, G, L, N
// These equations are those of the original decode logic. A lane takes part
// only when selected (low lane: A0 = 0, high lane: BHE = 0); an unselected
// lane keeps its SCL and SDA released. With both lanes selected (a word
// access) the machine advances only when both devices acknowledged.
// rdy_i / rdy_o mark states I and O for the ready logic, but only until the
// processor ends the bus cycle that started the access, so a following cycle
// is not released by the tail of this one (this design's addition).
module ferro_controller
  import ferro_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       phase_high,
  input  logic       fall_tick,
  input  logic       rise_tick,
  input  logic       req,
  input  logic       rw,          // 1 = read, 0 = write
  input  logic       sel_lo,
  input  logic       sel_hi,
  input  logic       sda_lo_in,
  input  logic       sda_hi_in,
  output state_t     state,
  output dp_ctrl_t   dp_ctrl,
  output lane_ctrl_t lc_lo,
  output lane_ctrl_t lc_hi,
  output logic       ss_q,
  output logic       cntr7,
  output logic       rdy_i,       // state I, processor cycle not yet released
  output logic       rdy_o        // state O, processor cycle not yet released
);

  logic       low;
  logic       st_load, st_shout, st_shin;
  logic       counter_clr, counter_en;
  logic       ss_set, clk_dis, ack_en;
  logic       ack_lo_q, ack_hi_q, ack;
  logic       cycle_done;
  lane_ctrl_t lc;

  assign low = ~phase_high;

  main_fsm u_fsm (
    .clk      (clk),
    .rst_n    (rst_n),
    .rise_tick(rise_tick),
    .req      (req),
    .rw       (rw),
    .cntr7    (cntr7),
    .ack      (ack),
    .state    (state),
    .dp_ctrl  (dp_ctrl)
  );

  shift_counter u_cnt (
    .clk        (clk),
    .rst_n      (rst_n),
    .rise_tick  (rise_tick),
    .counter_clr(counter_clr),
    .counter_en (counter_en),
    .count      (),
    .cntr7      (cntr7)
  );

  // State decode.
  always_comb begin
    st_load  = state inside {ST_B, ST_D, ST_F, ST_K};
    st_shout = state inside {ST_C, ST_E, ST_G, ST_L};
    st_shin  = state inside {ST_M, ST_N};

    counter_clr = state inside {ST_B, ST_D, ST_F, ST_K, ST_M};
    counter_en  = state inside {ST_C, ST_E, ST_G, ST_L, ST_N};

    ss_set  = (state == ST_I) || (state == ST_O && low);
    clk_dis = (state inside {ST_A, ST_I, ST_O})
           || (low && state inside {ST_H, ST_J})
           || (low && state == ST_N && cntr7);
    ack_en  = st_shout && cntr7 && low;

    lc.sr_ce     = (fall_tick && (st_load || st_shout))
                || (rise_tick && st_shin && !(state == ST_N && cntr7));
    lc.sr_in_en  = st_shin;
    lc.sr_bus_en = (st_load && low) || (st_shout && !(cntr7 && low));
    lc.ss_en     = (phase_high && state inside {ST_B, ST_K, ST_O})
                || (low && state == ST_H)
                || (state == ST_I);
    lc.scl_en    = !clk_dis;
    lc.rd_oe     = (state == ST_O);
  end

  assign lc_lo = sel_lo ? lc : '0;
  assign lc_hi = sel_hi ? lc : '0;

  // START/STOP flip-flop, common to both lanes.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              ss_q <= 1'b0;
    else if (state == ST_A)  ss_q <= 1'b0;
    else if (ss_set)         ss_q <= 1'b1;
  end

  // Acknowledge flip-flops, clocked once per bit period.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_lo_q <= 1'b0;
      ack_hi_q <= 1'b0;
    end else if (rise_tick) begin
      ack_lo_q <= ack_en && !sda_lo_in;
      ack_hi_q <= ack_en && !sda_hi_in;
    end
  end

  // The processor is released once, in I or O; a bus cycle that starts while
  // the machine is still finishing I or O waits for the next access.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  cycle_done <= 1'b0;
    else if (state == ST_A)                      cycle_done <= 1'b0;
    else if (state inside {ST_I, ST_O} && !req)  cycle_done <= 1'b1;
  end

  assign rdy_i = (state == ST_I) && !cycle_done;
  assign rdy_o = (state == ST_O) && !cycle_done;

  assign ack = (sel_lo || sel_hi) && (!sel_lo || ack_lo_q) && (!sel_hi || ack_hi_q);

endmodule
