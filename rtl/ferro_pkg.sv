// ferro_pkg: types and constants shared by the NM24CF04 interface.
//
// The main sequencer has fifteen states, A to O, held as a four-bit count
// 0..14 exactly as in the original state counter (A = 0, O = 14). The Moore
// outputs that steer one byte lane's data path are s1/s0 (74198-style
// shift-register mode) and muxb/muxa (select of the 4-to-1 control-byte
// multiplexer, byte index = {muxb, muxa}). Chip selects are active low, as on
// the board the design comes from.
package ferro_pkg;

  // Main state machine states; the encoding is the original state count.
  typedef enum logic [3:0] {
    ST_A = 4'd0,  ST_B = 4'd1,  ST_C = 4'd2,  ST_D = 4'd3,  ST_E = 4'd4,
    ST_F = 4'd5,  ST_G = 4'd6,  ST_H = 4'd7,  ST_I = 4'd8,  ST_J = 4'd9,
    ST_K = 4'd10, ST_L = 4'd11, ST_M = 4'd12, ST_N = 4'd13, ST_O = 4'd14
  } state_t;

  // Shift-register mode, {s1, s0}.
  typedef enum logic [1:0] {
    SR_HOLD  = 2'b00,
    SR_SHR   = 2'b01,   // shift right: QA..QG move toward QH, serial in at QA
    SR_SHL   = 2'b10,   // not used by the sequencer; the register holds
    SR_LOAD  = 2'b11
  } sr_mode_t;

  // Control-byte index on the byte multiplexer, {muxb, muxa}.
  typedef enum logic [1:0] {
    BYTE_SLAVE_WR = 2'b00,  // byte 0: 1010, chip, page, 0
    BYTE_WORD     = 2'b01,  // byte 1: word address A8..A1
    BYTE_DATA     = 2'b10,  // byte 2: write data
    BYTE_SLAVE_RD = 2'b11   // byte 3: 1010, chip, page, 1
  } byte_sel_t;

  // Moore outputs of the main state machine that steer the data paths.
  typedef struct packed {
    sr_mode_t  mode;   // {s1, s0}
    byte_sel_t sel;    // {muxb, muxa}
  } dp_ctrl_t;

  // Per-lane strobes and enables from the controller to a data path.
  typedef struct packed {
    logic sr_ce;      // one system-clock strobe: shift register acts on its mode
    logic sr_in_en;   // serial input of the shift register follows SDA
    logic sr_bus_en;  // QH of the shift register is enabled onto SDA
    logic ss_en;      // START/STOP flip-flop is enabled onto SDA
    logic scl_en;     // the bit clock is enabled onto SCL
    logic rd_oe;      // shift register contents drive this lane of the data bus
  } lane_ctrl_t;

  // Memory chip selects, all active low.
  typedef struct packed {
    logic lowram1_n;
    logic lowram2_n;
    logic hiram1_n;
    logic hiram2_n;
    logic romcs_n;
    logic ferro_n;
  } cs_t;

  // Fixed upper four bits of every NM24CF04 slave address.
  localparam logic [3:0] SLAVE_TYPE_ID = 4'b1010;

  // 8086 clock over the 100 kHz SCL clock: 5 MHz / 100 kHz.
  localparam int unsigned DEFAULT_CLK_DIV = 50;

endpackage
