// Testbench for the FPGA glue logic with four slave modules. Slave pins
// are driven directly. Checks the port map (even port: message register
// and FIFO of that slave only; odd port: that slave's status), that a write
// to one slave touches no other slave's MSG_BIT or message register, that
// results of all four slaves stay in their own FIFOs, that only the
// selected slave drives the ISA data bus, and that nothing answers without
// the chip select.
module tb_glue_fpga;
  import ms_pkg::*;
  localparam int unsigned N = 4;

  logic clk = 0, rst;
  logic cs_n, rdn, wrn;
  logic [2:0] a;
  logic [7:0] d_in, d_out;
  logic d_oe;
  logic [N-1:0][7:0] slave_in, slave_out;
  logic [N-1:0] slave_in_oe, slave_oen_n, wr_req, input_rdy, s_idle, msg_bit, test, ff_full;
  int checks = 0, failures = 0;

  always #34ns clk = ~clk;

  glue_fpga dut (
    .isa_clk(clk), .isa_rst(rst), .isa_cs_n(cs_n), .isa_a(a),
    .isa_rdn(rdn), .isa_wrn(wrn), .isa_d_in(d_in), .isa_d_out(d_out), .isa_d_oe(d_oe),
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

  task automatic isa_write(input logic [2:0] port, input logic [7:0] b);
    @(negedge clk); cs_n = 0; a = port; d_in = b;
    @(negedge clk); wrn = 0;
    repeat (6) @(negedge clk);
    wrn = 1;
    @(negedge clk); cs_n = 1; d_in = 0;
    repeat (8) @(negedge clk);
  endtask

  task automatic isa_read(input logic [2:0] port, input bit sel, output logic [7:0] b, output logic oe);
    @(negedge clk); cs_n = !sel; a = port;
    @(negedge clk); rdn = 0;
    repeat (5) @(negedge clk);
    b = d_out; oe = d_oe;
    @(negedge clk); rdn = 1;
    @(negedge clk); cs_n = 1;
    repeat (8) @(negedge clk);
  endtask

  task automatic slave_write(input int s, input logic [7:0] b);
    slave_out[s] = b; wr_req[s] = 1;
    repeat (22) @(negedge clk);
    wr_req[s] = 0;
    repeat (22) @(negedge clk);
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    logic oe;
    rst = 1; cs_n = 1; rdn = 1; wrn = 1; a = 0; d_in = 0;
    slave_out = '0; slave_oen_n = '1; wr_req = '0;
    input_rdy = 4'b0101; s_idle = 4'b0011;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);

    // status ports show each slave's own pins
    for (int s = 0; s < N; s++) begin
      logic [7:0] e;
      isa_read(3'(2*s+1), 1, b, oe);
      e = '0; e[ST_BUSY] = !s_idle[s]; e[ST_IDLE] = s_idle[s]; e[ST_INPUT_RDY] = input_rdy[s];
      check(oe && b == e, $sformatf("slave %0d status %h expected %h", s, b, e));
    end

    // writes to each slave in turn reach only that slave
    for (int s = 0; s < N; s++) begin
      isa_write(3'(2*s), 8'h10 * 8'(s + 1));
      for (int o = 0; o < N; o++) begin
        check(msg_bit[o] == (o <= s), $sformatf("after write to %0d: msg_bit[%0d]=%b", s, o, msg_bit[o]));
        if (o <= s) check(slave_in[o] == 8'h10 * 8'(o + 1), $sformatf("slave_in[%0d]=%h", o, slave_in[o]));
      end
    end
    // status bit 7 of each slave
    for (int s = 0; s < N; s++) begin
      isa_read(3'(2*s+1), 1, b, oe);
      check(b[ST_MSG_FULL], $sformatf("slave %0d status bit 7 not set", s));
    end
    // slave 2 reads its byte; only its MSG_BIT clears
    slave_oen_n[2] = 0;
    repeat (20) @(negedge clk);
    check(slave_in_oe == 4'b0100, "P0 enables");
    slave_oen_n[2] = 1;
    repeat (4) @(negedge clk);
    check(msg_bit == 4'b1011, $sformatf("msg_bit %b after slave 2 read", msg_bit));

    // each slave writes two results; reads return them per slave
    fork
      begin slave_write(0, 8'hA0); slave_write(0, 8'hA1); end
      begin slave_write(1, 8'hB0); slave_write(1, 8'hB1); end
      begin slave_write(2, 8'hC0); slave_write(2, 8'hC1); end
      begin slave_write(3, 8'hD0); slave_write(3, 8'hD1); end
    join
    for (int s = N - 1; s >= 0; s--) begin
      for (int i = 0; i < 2; i++) begin
        isa_read(3'(2*s), 1, b, oe);
        check(oe && b == 8'hA0 + 8'h10 * 8'(s) + 8'(i), $sformatf("slave %0d result %0d: %h", s, i, b));
      end
    end

    // without the chip select nobody answers and nothing changes
    slave_write(1, 8'h5A);
    isa_read(3'd2, 0, b, oe);
    check(!oe, "bus driven without chip select");
    isa_read(3'd2, 1, b, oe);
    check(oe && b == 8'h5A, $sformatf("FIFO popped without chip select: %h", b));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
