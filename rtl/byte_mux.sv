// byte_mux: the 4-to-1 control-byte multiplexer of one byte lane.
//
// Every transfer to an NM24CF04 is built from up to four bytes, and this
// block forms all four from the latched address and the data bus and selects
// one for the shift register's parallel input:
//   byte 0  1 0 1 0 C1 C0 P 0   slave address, write  (sel = 00)
//   byte 1  A8 .. A1            word address in the page (sel = 01)
//   byte 2  D7 .. D0 (or D15..D8 in the high lane)   write data (sel = 10)
//   byte 3  1 0 1 0 C1 C0 P 1   slave address, read   (sel = 11)
// C1 C0 pick one of the four devices on the lane's SDA bus (its A2 A1 pins)
// and P the 256-byte page. The byte layout is the original one; which address
// lines feed C1, C0 and P (A11, A10, A9 at the top level) is this design's
// choice. Purely combinational.
module byte_mux
  import ferro_pkg::*;
(
  input  byte_sel_t  sel,
  input  logic [1:0] chip,     // device number on the SDA bus
  input  logic       page,     // page bit
  input  logic [7:0] word,     // byte address within the page
  input  logic [7:0] wdata,    // this lane's write data
  output logic [7:0] q
);

  always_comb begin
    unique case (sel)
      BYTE_SLAVE_WR: q = {SLAVE_TYPE_ID, chip, page, 1'b0};
      BYTE_WORD:     q = word;
      BYTE_DATA:     q = wdata;
      BYTE_SLAVE_RD: q = {SLAVE_TYPE_ID, chip, page, 1'b1};
      default:       q = '0;
    endcase
  end

endmodule
