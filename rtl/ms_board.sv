// Master/slave parallel processing card: top level.
//
// A PC (the master) hands tasks to four slave microcontrollers over the 8
// bit ISA bus. The card answers at IO ports 0x3E0..0x3E7. For slave s
// (0-based) port 0x3E0+2s takes command and parameter bytes on a write and
// returns result bytes on a read; port 0x3E1+2s returns the slave's status
// byte. The slaves work in parallel; each has a one byte message register
// towards it and a FIFO buffering its results towards the master.
//
// This module joins the board-level address qualifier (comparator and OR
// gates) to the FPGA glue logic. The ISA data bus is split into an input,
// an output and an output enable; each slave's P0 input port likewise comes
// out as slave_in with slave_in_oe. The slave processors and the master are
// outside this design; their pins are the ports here.
//
// The structure follows the document. The split bidirectional buses and the
// synchronous active-high reset from the ISA reset line are this design's
// choices.
module ms_board
  import ms_pkg::*;
#(
  parameter int unsigned N_SLAVES   = 4,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter logic [9:0]  BASE_ADDR  = BASE_ADDR_DEFAULT
) (
  // ISA bus
  input  logic                     isa_clk,
  input  logic                     isa_rst,
  input  logic [9:0]               isa_sa,
  input  logic                     isa_aen,
  input  logic                     isa_iorn,
  input  logic                     isa_iown,
  input  logic [7:0]               isa_d_in,
  output logic [7:0]               isa_d_out,
  output logic                     isa_d_oe,
  // slave processor pins
  output logic [N_SLAVES-1:0][7:0] slave_in,
  output logic [N_SLAVES-1:0]      slave_in_oe,
  input  logic [N_SLAVES-1:0]      slave_oen_n,
  input  logic [N_SLAVES-1:0][7:0] slave_out,
  input  logic [N_SLAVES-1:0]      wr_req,
  input  logic [N_SLAVES-1:0]      input_rdy,
  input  logic [N_SLAVES-1:0]      s_idle,
  output logic [N_SLAVES-1:0]      msg_bit,
  output logic [N_SLAVES-1:0]      test,
  output logic [N_SLAVES-1:0]      ff_full
);

  logic isa_cs_n, isa_rdn, isa_wrn;

  isa_board_decode #(.BASE_ADDR(BASE_ADDR)) u_board_decode (
    .isa_sa  (isa_sa),
    .isa_aen (isa_aen),
    .isa_iorn(isa_iorn),
    .isa_iown(isa_iown),
    .isa_cs_n(isa_cs_n),
    .isa_rdn (isa_rdn),
    .isa_wrn (isa_wrn)
  );

  glue_fpga #(.N_SLAVES(N_SLAVES), .FIFO_DEPTH(FIFO_DEPTH)) u_fpga (
    .isa_clk    (isa_clk),
    .isa_rst    (isa_rst),
    .isa_cs_n   (isa_cs_n),
    .isa_a      (isa_sa[2:0]),
    .isa_rdn    (isa_rdn),
    .isa_wrn    (isa_wrn),
    .isa_d_in   (isa_d_in),
    .isa_d_out  (isa_d_out),
    .isa_d_oe   (isa_d_oe),
    .slave_in   (slave_in),
    .slave_in_oe(slave_in_oe),
    .slave_oen_n(slave_oen_n),
    .slave_out  (slave_out),
    .wr_req     (wr_req),
    .input_rdy  (input_rdy),
    .s_idle     (s_idle),
    .msg_bit    (msg_bit),
    .test       (test),
    .ff_full    (ff_full)
  );

endmodule
