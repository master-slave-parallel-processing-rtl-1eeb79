// Interface logic for one slave processor.
//
// Each slave processor is served by one copy of this module. It has three
// parts:
//  * Message register: an 8 bit register written by the master through the
//    slave's even IO port. Writing it sets MSG_BIT, which tells the slave a
//    command or parameter byte is waiting. The slave reads the byte by
//    pulling slave_oen_n low; slave_in_oe then enables the byte onto the
//    slave's input port and the end of the read clears MSG_BIT. The
//    buffer is one byte deep: a second write before the slave has read the
//    first overwrites it, so the master must watch status bit 7.
//  * Result FIFO: the slave writes result bytes by setting its output port
//    and pulsing wr_req high. A read of the even IO port returns the oldest
//    byte; the byte is removed when the read strobe ends.
//  * Status register: the odd IO port returns
//    {MSG_BIT, busy, FIFO full, 3'b000, idle, input ready}, sampled every
//    ISA clock.
// Slave strobes and ISA read strobes go through three-flop edge detectors
// running at half the ISA clock, so each strobe moves the FIFO exactly
// once. The FIFO shares the ISA clock.
//
// Timing: ISA signals are synchronous to isa_clk. The message register
// follows the data bus during a write and keeps the last value; MSG_BIT
// rises one clock after the write strobe ends and falls 3 clocks after the
// slave's read strobe ends. A FIFO pop takes effect 4 to
// 6 ISA clocks after a data-port read ends, so two reads of the same data
// port must be at least 8 ISA clocks apart. A slave write lands in the FIFO
// 4 to 6 ISA clocks after wr_req rises.
//
// From the document: the 8 bit message register clocked by the ISA write,
// MSG_BIT set by the write and cleared by SLAVE_OEN, the FIFO written by the
// slave and read by the master, the status bits 7, 6, 1 and 0, and the
// three-flop half-clock edge detectors. This design's own choices: pop on
// the end of the read, MSG_BIT cleared at the end of the slave read (so the
// master cannot replace the byte while the slave is still latching it) with
// a new write winning over the clear, status bit 5 (FIFO full), and the
// synchronous reset.
module slave_port
  import ms_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic       isa_clk,
  input  logic       isa_rst,
  // ISA side (active-low selects and strobes, already qualified)
  input  logic       data_sel_n,     // even port of this slave
  input  logic       stat_sel_n,     // odd port of this slave
  input  logic       isa_rdn,
  input  logic       isa_wrn,
  input  logic [7:0] isa_d_in,
  output logic [7:0] isa_d_out,
  output logic       isa_d_oe,
  // slave side
  output logic [7:0] slave_in,       // to slave P0
  output logic       slave_in_oe,    // tristate enable of slave_in
  input  logic       slave_oen_n,    // slave read strobe, active low
  input  logic [7:0] slave_out,      // from slave P2
  input  logic       wr_req,         // slave write strobe, active high
  input  logic       input_rdy,      // slave P1.1
  input  logic       s_idle,         // slave P1.2
  output logic       msg_bit,        // to slave INT0 pin
  output logic       test,           // debug pin, mirrors MSG_BIT
  output logic       ff_full         // result FIFO full
);

  // ---------------------------------------------------------------- clock
  // Half-rate enable: a toggle flop, high every other ISA clock.
  logic ce;
  always_ff @(posedge isa_clk) begin
    if (isa_rst) ce <= 1'b0;
    else         ce <= !ce;
  end

  // ---------------------------------------------------- message register
  logic wr_data, wr_data_q;
  assign wr_data = !data_sel_n && !isa_wrn;

  logic [7:0] msg_reg;
  always_ff @(posedge isa_clk) begin
    if (isa_rst)      msg_reg <= '0;
    else if (wr_data) msg_reg <= isa_d_in;
  end

  // Slave read strobe: two-flop synchroniser and rising-edge (end of read)
  // detect.
  logic [2:0] oen_q;
  logic       oen_rise;
  always_ff @(posedge isa_clk) begin
    if (isa_rst) begin
      oen_q     <= 3'b111;
      wr_data_q <= 1'b0;
    end else begin
      oen_q     <= {oen_q[1:0], slave_oen_n};
      wr_data_q <= wr_data;
    end
  end
  assign oen_rise = !oen_q[2] && oen_q[1];

  logic wr_end;
  assign wr_end = wr_data_q && !wr_data;

  always_ff @(posedge isa_clk) begin
    if (isa_rst)       msg_bit <= 1'b0;
    else if (wr_end)   msg_bit <= 1'b1;
    else if (oen_rise) msg_bit <= 1'b0;
  end

  assign slave_in    = msg_reg;
  assign slave_in_oe = !slave_oen_n;
  assign test        = msg_bit;

  // --------------------------------------------------------- result FIFO
  logic rd_data, slv_wr_pulse, isa_rd_pulse;
  assign rd_data = !data_sel_n && !isa_rdn;

  edge_pulse #(.RISING(1'b1)) u_wr_edge (
    .clk(isa_clk), .rst(isa_rst), .ce(ce), .strobe(wr_req), .pulse(slv_wr_pulse)
  );
  edge_pulse #(.RISING(1'b0)) u_rd_edge (
    .clk(isa_clk), .rst(isa_rst), .ce(ce), .strobe(rd_data), .pulse(isa_rd_pulse)
  );

  logic [7:0] fifo_q;
  logic       fifo_empty;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk    (isa_clk),
    .rst    (isa_rst),
    .wr_en  (slv_wr_pulse && ce),
    .wr_data(slave_out),
    .rd_en  (isa_rd_pulse && ce),
    .rd_data(fifo_q),
    .full   (ff_full),
    .empty  (fifo_empty),
    .count  ()
  );

  // ----------------------------------------------------- status register
  logic [7:0] status_q;
  always_ff @(posedge isa_clk) begin
    if (isa_rst) status_q <= '0;
    else begin
      status_q               <= '0;
      status_q[ST_MSG_FULL]  <= msg_bit;
      status_q[ST_BUSY]      <= !s_idle;
      status_q[ST_FIFO_FULL] <= ff_full;
      status_q[ST_IDLE]      <= s_idle;
      status_q[ST_INPUT_RDY] <= input_rdy;
    end
  end

  // ------------------------------------------------------ ISA read drive
  logic rd_stat;
  assign rd_stat = !stat_sel_n && !isa_rdn;

  always_comb begin
    isa_d_oe  = rd_data || rd_stat;
    isa_d_out = rd_stat ? status_q : (fifo_empty ? 8'h00 : fifo_q);
  end

  // Only one of this module's two ports can be selected at a time.
  assert property (@(posedge isa_clk) disable iff (isa_rst) !(!data_sel_n && !stat_sel_n));

endmodule
