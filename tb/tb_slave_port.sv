// Testbench for one slave module. The ISA side is driven cycle by cycle
// like the bus (selects and strobes synchronous to a 68 ns clock); the
// slave side is driven directly with the slave's pin protocol. Checks:
// message register and MSG_BIT set by a master write and cleared by the
// slave read, overwrite of an unread byte, the P0 drive enable, status byte
// layout, result FIFO order with exactly one pop per master read, FIFO full
// with the status full bit and the dropped write, and the read drive
// enables.
module tb_slave_port;
  import ms_pkg::*;
  localparam int unsigned DEPTH = 16;

  logic clk = 0, rst;
  logic data_sel_n, stat_sel_n, rdn, wrn;
  logic [7:0] d_in, d_out, slave_in, slave_out;
  logic d_oe, slave_in_oe, slave_oen_n, wr_req, input_rdy, s_idle;
  logic msg_bit, test, ff_full;
  int checks = 0, failures = 0;

  always #34ns clk = ~clk;

  slave_port #(.FIFO_DEPTH(DEPTH)) dut (
    .isa_clk(clk), .isa_rst(rst),
    .data_sel_n, .stat_sel_n, .isa_rdn(rdn), .isa_wrn(wrn),
    .isa_d_in(d_in), .isa_d_out(d_out), .isa_d_oe(d_oe),
    .slave_in, .slave_in_oe, .slave_oen_n, .slave_out, .wr_req,
    .input_rdy, .s_idle, .msg_bit, .test, .ff_full
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("%t FAIL %s", $time, what);
    end
  endtask

  task automatic isa_write(input logic [7:0] b);
    @(negedge clk); data_sel_n = 0; d_in = b;
    @(negedge clk); wrn = 0;
    repeat (6) @(negedge clk);
    wrn = 1;
    @(negedge clk); data_sel_n = 1; d_in = 8'h00;
    repeat (8) @(negedge clk);
  endtask

  task automatic isa_read(input bit stat, output logic [7:0] b);
    @(negedge clk); if (stat) stat_sel_n = 0; else data_sel_n = 0;
    @(negedge clk); rdn = 0;
    repeat (5) @(negedge clk);
    check(d_oe, "read data not driven");
    b = d_out;
    @(negedge clk); rdn = 1;
    #1ns;
    check(!d_oe, "data still driven after the read strobe");
    @(negedge clk); stat_sel_n = 1; data_sel_n = 1;
    repeat (8) @(negedge clk);
  endtask

  task automatic slave_read(output logic [7:0] b);
    // 8051-style read: OEN low for about one machine cycle.
    slave_oen_n = 0;
    repeat (3) @(negedge clk);
    check(slave_in_oe, "P0 not driven during slave read");
    repeat (18) @(negedge clk);
    b = slave_in;
    slave_oen_n = 1;
    repeat (22) @(negedge clk);
  endtask

  task automatic slave_write(input logic [7:0] b);
    slave_out = b; wr_req = 1;
    repeat (22) @(negedge clk);
    wr_req = 0;
    repeat (22) @(negedge clk);
  endtask

  logic [7:0] expect_status;
  function automatic logic [7:0] status_of(input logic mb, input logic idle, input logic ff, input logic rdy);
    logic [7:0] s = '0;
    s[ST_MSG_FULL] = mb; s[ST_BUSY] = !idle; s[ST_FIFO_FULL] = ff; s[ST_IDLE] = idle; s[ST_INPUT_RDY] = rdy;
    return s;
  endfunction

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, q[$];
    int n_pops;
    rst = 1; data_sel_n = 1; stat_sel_n = 1; rdn = 1; wrn = 1; d_in = 0;
    slave_out = 0; slave_oen_n = 1; wr_req = 0; input_rdy = 1; s_idle = 1;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);

    // status at rest, all four combinations of the slave's status pins
    for (int c = 0; c < 4; c++) begin
      {s_idle, input_rdy} = 2'(c);
      repeat (2) @(negedge clk);
      isa_read(1, b);
      check(b == status_of(0, s_idle, 0, input_rdy), $sformatf("status %h for idle=%b rdy=%b", b, s_idle, input_rdy));
      check(!msg_bit && !test, "MSG_BIT set at rest");
    end
    s_idle = 1; input_rdy = 1;

    // a command byte: message register, MSG_BIT, status bit 7
    isa_write(8'h03);
    check(msg_bit && test, "MSG_BIT not set by the master write");
    check(slave_in == 8'h03, $sformatf("message register %h", slave_in));
    check(!slave_in_oe, "P0 driven without a slave read");
    isa_read(1, b);
    check(b == status_of(1, 1, 0, 1), $sformatf("status %h with byte pending", b));
    slave_read(b);
    check(b == 8'h03, "slave read wrong byte");
    check(!msg_bit, "MSG_BIT not cleared by the slave read");
    isa_read(1, b);
    check(b == status_of(0, 1, 0, 1), $sformatf("status %h after slave read", b));

    // overwrite of an unread byte: the second value wins
    isa_write(8'h11);
    isa_write(8'h22);
    check(msg_bit, "MSG_BIT lost");
    slave_read(b);
    check(b == 8'h22, $sformatf("overwritten byte %h", b));

    // result FIFO: five bytes, then five reads
    for (int i = 0; i < 5; i++) begin
      slave_write(8'h40 + 8'(i));
      q.push_back(8'h40 + 8'(i));
    end
    // a status read must not pop
    isa_read(1, b);
    for (int i = 0; i < 5; i++) begin
      isa_read(0, b);
      check(b == q[0], $sformatf("FIFO read %h expected %h", b, q[0]));
      void'(q.pop_front());
    end
    isa_read(0, b);
    check(b == 8'h00, "read of an empty FIFO");

    // fill past full: 17 writes, 16 kept, full flag and status bit 5
    for (int i = 0; i < DEPTH + 1; i++) begin
      slave_write(8'(8'h80 + i));
      if (i < DEPTH) q.push_back(8'(8'h80 + i));
    end
    check(ff_full, "FIFO full flag");
    isa_read(1, b);
    check(b == status_of(0, 1, 1, 1), $sformatf("status %h with FIFO full", b));
    n_pops = 0;
    for (int i = 0; i < DEPTH; i++) begin
      isa_read(0, b);
      check(b == q[0], $sformatf("full FIFO read %0d: %h expected %h", i, b, q[0]));
      void'(q.pop_front());
      n_pops++;
    end
    check(!ff_full, "full flag after draining");
    isa_read(0, b);
    check(b == 8'h00, "FIFO not empty after draining (dropped write kept?)");

    // simultaneous traffic: slave writes while the master reads
    fork
      for (int i = 0; i < 6; i++) slave_write(8'hC0 + 8'(i));
      begin
        repeat (50) @(negedge clk);
        for (int i = 0; i < 6; i++) begin
          isa_read(0, b);
          check(b == 8'hC0 + 8'(i), $sformatf("concurrent read %h expected %h", b, 8'hC0 + 8'(i)));
          repeat (40) @(negedge clk);
        end
      end
    join

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
