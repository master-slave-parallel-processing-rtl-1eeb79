// Board-level ISA address qualifier.
//
// On the card an 8 bit magnitude comparator (LS688) matches the ISA IO
// address against the card's window of eight ports, 0x3E0..0x3E7, and OR
// gates (LS32) gate the bus's IOR/IOW strobes with the match, so the FPGA
// sees clean, already-qualified read and write strobes. This module is the
// logic function of those parts: isa_cs_n is low when SA[9:3] equals
// BASE_ADDR[9:3] and AEN is low (no DMA cycle); isa_rdn / isa_wrn are the
// IOR/IOW strobes ORed with isa_cs_n. All signals are active low except AEN.
// Combinational. The window and the OR-gating follow the document; the use
// of AEN in the compare is this design's choice.
module isa_board_decode
  import ms_pkg::*;
#(
  parameter logic [9:0] BASE_ADDR = BASE_ADDR_DEFAULT
) (
  input  logic [9:0] isa_sa,
  input  logic       isa_aen,
  input  logic       isa_iorn,
  input  logic       isa_iown,
  output logic       isa_cs_n,
  output logic       isa_rdn,
  output logic       isa_wrn
);

  assign isa_cs_n = !((isa_sa[9:3] == BASE_ADDR[9:3]) && !isa_aen);
  assign isa_rdn  = isa_iorn | isa_cs_n;
  assign isa_wrn  = isa_iown | isa_cs_n;

endmodule
