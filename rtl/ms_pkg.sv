// Shared constants of the master/slave ISA card.
//
// The card puts four slave microcontrollers behind eight ISA IO ports,
// 0x3E0..0x3E7. Each slave owns an even port (write: command/parameter
// byte to the slave; read: next byte of the slave's result FIFO) and an odd
// port (read: the slave's status byte). This package holds the address map,
// the status byte layout and the task codes the slave firmware understands.
//
// From the document: the base address and port map, the task codes, bit 7
// (byte buffer to the slave full) and bit 6 (slave busy) of the status byte,
// and bits 1/0 carrying the slave's idle and input-ready pins. Bit 5 (result
// FIFO full) is this design's choice; bits 4..2 read as zero.
package ms_pkg;

  // ISA IO address window decoded on the board (10 bit ISA IO addresses).
  localparam logic [9:0] BASE_ADDR_DEFAULT = 10'h3E0;

  // Number of slave processors served by one card (three address bits,
  // two ports per slave).
  localparam int unsigned N_SLAVES_MAX = 4;

  // Status byte bit positions (odd IO port).
  localparam int unsigned ST_MSG_FULL  = 7;  // command byte not yet taken by the slave
  localparam int unsigned ST_BUSY      = 6;  // slave not idle
  localparam int unsigned ST_FIFO_FULL = 5;  // result FIFO full
  localparam int unsigned ST_IDLE      = 1;  // slave idle pin (P1.2)
  localparam int unsigned ST_INPUT_RDY = 0;  // slave ready-for-input pin (P1.1)

  // Task codes sent as the first byte of a task.
  typedef enum logic [7:0] {
    TASK_ADD  = 8'h01,  // two bytes in, one byte (8 bit sum) out
    TASK_MULT = 8'h02,  // two 16 bit big endian words in, 16 bit product out
    TASK_PI   = 8'h03   // m, ic[15:8], ic[7:0] in; six decimal digits and 8'hAA out
  } task_e;

  // Byte the pi task writes after its six result digits.
  localparam logic [7:0] PI_SPACER = 8'hAA;

endpackage
