// FPGA glue logic between the ISA bus and the slave processors.
//
// The FPGA holds an address decoder and one slave_port per slave processor.
// The decoder turns the board's chip select and address bits A2..A0 into
// eight port selects; slave s (0-based) owns ports 2s (commands in, results
// out) and 2s+1 (status). On an ISA read the selected slave_port drives the
// data; this module merges the drivers into one output with an enable
// (isa_d_out / isa_d_oe) for the bidirectional ISA data pins. Each slave's
// ports are brought out as packed arrays indexed by slave number.
//
// The decoder, four identical slave modules and the shared ISA clock follow
// the document. The merged read mux in place of internal tristate buses and
// the synchronous active-high reset are this design's choices. N_SLAVES may
// be 1..4; the three address bits allow no more on one card.
module glue_fpga
  import ms_pkg::*;
#(
  parameter int unsigned N_SLAVES   = 4,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                     isa_clk,
  input  logic                     isa_rst,
  input  logic                     isa_cs_n,
  input  logic [2:0]               isa_a,
  input  logic                     isa_rdn,
  input  logic                     isa_wrn,
  input  logic [7:0]               isa_d_in,
  output logic [7:0]               isa_d_out,
  output logic                     isa_d_oe,
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

  if (N_SLAVES < 1 || N_SLAVES > N_SLAVES_MAX) begin : g_bad_n
    $error("glue_fpga: N_SLAVES must be 1..4");
  end

  logic [7:0] port_sel_n;

  isa_port_decode u_decode (
    .isa_cs_n  (isa_cs_n),
    .isa_a     (isa_a),
    .port_sel_n(port_sel_n)
  );

  logic [N_SLAVES-1:0][7:0] d_out;
  logic [N_SLAVES-1:0]      d_oe;

  for (genvar s = 0; s < N_SLAVES; s++) begin : g_slave
    slave_port #(.FIFO_DEPTH(FIFO_DEPTH)) u_port (
      .isa_clk    (isa_clk),
      .isa_rst    (isa_rst),
      .data_sel_n (port_sel_n[2*s]),
      .stat_sel_n (port_sel_n[2*s+1]),
      .isa_rdn    (isa_rdn),
      .isa_wrn    (isa_wrn),
      .isa_d_in   (isa_d_in),
      .isa_d_out  (d_out[s]),
      .isa_d_oe   (d_oe[s]),
      .slave_in   (slave_in[s]),
      .slave_in_oe(slave_in_oe[s]),
      .slave_oen_n(slave_oen_n[s]),
      .slave_out  (slave_out[s]),
      .wr_req     (wr_req[s]),
      .input_rdy  (input_rdy[s]),
      .s_idle     (s_idle[s]),
      .msg_bit    (msg_bit[s]),
      .test       (test[s]),
      .ff_full    (ff_full[s])
    );
  end

  always_comb begin
    isa_d_out = '0;
    for (int s = 0; s < N_SLAVES; s++) begin
      if (d_oe[s]) isa_d_out = isa_d_out | d_out[s];
    end
    isa_d_oe = |d_oe;
  end

  // At most one slave drives the ISA data bus.
  assert property (@(posedge isa_clk) disable iff (isa_rst) $onehot0(d_oe));

endmodule
