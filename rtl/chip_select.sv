// chip_select: memory address decoder and wait-state request.
//
// Decodes the latched address into the active-low chip selects of the
// system's memories, using only A14..A11, A0 and BHE (higher address lines
// are not decoded, so the 32K map repeats through the 1 MB space):
//   1000H-1FFFH  FERRO      ferroelectric memory, both lanes
//   2000H-27FFH  LOWRAM1 (A0 = 0) and HIRAM1 (BHE = 0)
//   2800H-2FFFH  LOWRAM2 (A0 = 0) and HIRAM2 (BHE = 0)
//   3000H-7FFFH  ROMCS      both ROM halves
// RDY1 goes to the clock generator's ready input. It is low, so the processor
// inserts wait states, whenever the ferroelectric memory is addressed, except
// in states I and O, where the interface has finished the write or has the
// read data on the bus. The RAM and ROM ranges and the RDY1 equation are the
// original ones; the ferroelectric range spans the full 4K bytes that the
// eight devices provide. Purely combinational.
module chip_select
  import ferro_pkg::*;
(
  input  logic [14:11] addr_hi,  // latched A14..A11
  input  logic         a0,
  input  logic         bhe_n,
  input  logic         st_i,     // main state machine in state I
  input  logic         st_o,     // main state machine in state O
  output cs_t          cs_n,
  output logic         rdy1
);

  always_comb begin
    cs_n.ferro_n   = !(addr_hi[14:12] == 3'b001);
    cs_n.lowram1_n = !(!a0    && addr_hi == 4'b0100);
    cs_n.lowram2_n = !(!a0    && addr_hi == 4'b0101);
    cs_n.hiram1_n  = !(!bhe_n && addr_hi == 4'b0100);
    cs_n.hiram2_n  = !(!bhe_n && addr_hi == 4'b0101);
    cs_n.romcs_n   = !(addr_hi[14:12] >= 3'b011);
    rdy1           = cs_n.ferro_n || st_i || st_o;
  end

endmodule
