// Port address decoder inside the FPGA.
//
// The board qualifies the ISA address window 0x3E0..0x3E7 into one active
// low chip select, isa_cs_n. This decoder combines it with the three low
// address bits into eight active-low port selects, one per IO port:
// port_sel_n[2*s] is slave s's data port, port_sel_n[2*s+1] its status
// port. Purely combinational. The eight selects and their use follow the
// document; the active-low polarity of the outputs is this design's choice.
module isa_port_decode (
  input  logic       isa_cs_n,
  input  logic [2:0] isa_a,
  output logic [7:0] port_sel_n
);

  always_comb begin
    port_sel_n = 8'hFF;
    if (!isa_cs_n) port_sel_n[isa_a] = 1'b0;
  end

endmodule
