// End-to-end testbench of the master/slave card at its default size: four
// slave processor models on the card, a master issuing ISA IO cycles.
//
// The master works as the host program would: before each byte to a slave
// it polls that slave's status port until the byte buffer is free (bit 7),
// it dispatches tasks to all four slaves and then collects each result
// once the slave's status reads idle and ready (8'h03, ignoring the FIFO
// full bit). Runs:
//  * 8 bit addition and 16 bit multiplication on all four slaves;
//  * pi: for each digit position d of the prototype's timing table
//    (10, 50, 100, 150, 200) the four slaves compute the four series of the
//    Bailey-Borwein-Plouffe formula (m = 1, 4, 5, 6) in parallel; the
//    master checks each six-digit result against its own double-precision
//    series, combines the four with the tail terms and compares the hex
//    digit at position d+1 with the known expansion of pi;
//  * two pi tasks queued on one slave, results queued in its FIFO;
//  * seventeen one-byte results into a sixteen-byte FIFO: status bit 5 and
//    the first sixteen results kept;
//  * a DMA cycle (AEN high) and an address outside the card's window,
//    both ignored; an unknown task code, answered with nothing.
// Each mechanism is counted and must have happened at least once. A
// monitor checks that MSG_BIT rises within two clocks of the end of every
// write to a data port.
module tb_ms_board;
  import ms_pkg::*;
  localparam int unsigned N = 4;
  localparam int unsigned DEPTH = 16;

  logic clk = 0, rst;
  logic [9:0] sa;
  logic aen, iorn, iown, d_oe;
  logic [7:0] d_m2c, d_c2m;
  logic [N-1:0][7:0] slave_in, slave_out;
  logic [N-1:0] slave_in_oe, slave_oen_n, wr_req, input_rdy, s_idle, msg_bit, test, ff_full, led;
  int checks = 0, failures = 0;

  // 14.7 MHz ISA clock
  always #34ns clk = ~clk;

  ms_board dut (
    .isa_clk(clk), .isa_rst(rst), .isa_sa(sa), .isa_aen(aen), .isa_iorn(iorn), .isa_iown(iown),
    .isa_d_in(d_m2c), .isa_d_out(d_c2m), .isa_d_oe(d_oe),
    .slave_in, .slave_in_oe, .slave_oen_n, .slave_out, .wr_req,
    .input_rdy, .s_idle, .msg_bit, .test, .ff_full
  );

  isa_master_bfm bfm (
    .clk, .sa, .aen, .iorn, .iown, .d_out(d_m2c), .d_in(d_c2m), .d_oe
  );

  for (genvar s = 0; s < N; s++) begin : g_slave
    slave_89c52_model #(.MC_NS(1500), .ITER_NS(3000)) u_slave (
      .p0(slave_in[s]), .p0_oe(slave_in_oe[s]), .msg_bit(msg_bit[s]),
      .p2(slave_out[s]), .wr_req(wr_req[s]), .oen_n(slave_oen_n[s]),
      .input_rdy(input_rdy[s]), .idle(s_idle[s]), .led(led[s])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("%t FAIL %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ MSG_BIT latency monitor
  int n_msg_writes = 0;
  int wr_wait = -1;
  int wr_slave = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (wr_wait >= 0) begin
        if (msg_bit[wr_slave]) begin
          check(wr_wait <= 2, $sformatf("MSG_BIT after %0d clocks", wr_wait));
          wr_wait = -1;
        end else if (wr_wait > 2) begin
          check(0, "MSG_BIT did not rise after a data-port write");
          wr_wait = -1;
        end else wr_wait++;
      end
    end
  end
  logic iown_q = 1;
  always @(posedge clk) begin
    if (!iown && !aen && sa[9:3] == 7'(10'h3E0 >> 3) && !sa[0]) wr_slave = int'(sa[2:1]);
    if (iown && !iown_q && !aen && sa[9:3] == 7'(10'h3E0 >> 3) && !sa[0]) begin
      wr_wait = 0;
      n_msg_writes++;
    end
    iown_q = iown;
  end

  // ----------------------------------------------------- master routines
  int n_buf_stalls = 0, n_parallel = 0, n_fifo_full = 0, n_queued = 0;
  int n_dma_ignored = 0, n_window_ignored = 0, n_unknown_task = 0, n_done_polls = 0;

  function automatic logic [9:0] dport(input int s); return 10'h3E0 + 10'(2 * s); endfunction
  function automatic logic [9:0] sport(input int s); return 10'h3E1 + 10'(2 * s); endfunction

  task automatic get_status(input int s, output logic [7:0] st);
    logic drv;
    bfm.io_read(sport(s), st, drv);
    check(drv, "status read not driven");
  endtask

  task automatic send(input int s, input logic [7:0] b);
    logic [7:0] st;
    get_status(s, st);
    while (st[ST_MSG_FULL]) begin
      n_buf_stalls++;
      bfm.idle(40);
      get_status(s, st);
    end
    bfm.io_write(dport(s), b);
  endtask

  task automatic wait_done(input int s);
    logic [7:0] st;
    bfm.idle(60);
    get_status(s, st);
    // idle and ready, byte buffer empty; a full result FIFO may be set
    while ((st & ~(8'(1) << ST_FIFO_FULL)) != 8'h03) begin
      n_done_polls++;
      bfm.idle(200);
      get_status(s, st);
    end
  endtask

  task automatic get_result(input int s, output logic [7:0] b);
    logic drv;
    bfm.io_read(dport(s), b, drv);
    check(drv, "result read not driven");
  endtask

  // ------------------------------------------------ pi reference (master)
  // 16^e mod n, right-to-left binary method.
  function automatic longint powmod16(input longint e, input longint n);
    longint r, b;
    if (n == 1) return 0;
    r = 1; b = 16 % n;
    while (e > 0) begin
      if (e[0]) r = (r * b) % n;
      b = (b * b) % n;
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic real head_sum(input int m, input int d);
    real s = 0.0;
    for (int k = 0; k < d; k++) begin
      s += real'(powmod16(longint'(d - k), longint'(8 * k + m))) / real'(8 * k + m);
      s -= $floor(s);
    end
    return s;
  endfunction

  function automatic real tail_sum(input int m, input int d);
    real s = 0.0, p = 1.0;
    for (int k = d; k < d + 20; k++) begin
      s += p / real'(8 * k + m);
      p = p / 16.0;
    end
    return s;
  endfunction

  // Hex digits of pi after the point at positions 11, 51, 101, 151, 201.
  localparam int PI_D[5]     = '{10, 50, 100, 150, 200};
  localparam int PI_DIGIT[5] = '{4'hA, 4'h2, 4'h2, 4'hA, 4'hF};
  localparam int PI_M[4]     = '{1, 4, 5, 6};

  task automatic read_pi(input int s, input int m, input int d, output real val);
    logic [7:0] b;
    real got, ref_s;
    got = 0.0;
    for (int i = 0; i < 6; i++) begin
      get_result(s, b);
      check(b <= 8'd9, $sformatf("pi digit byte %h out of range", b));
      got += real'(b) / (10.0 ** (i + 1));
    end
    get_result(s, b);
    check(b == PI_SPACER, $sformatf("pi spacer %h", b));
    ref_s = head_sum(m, d);
    check(got <= ref_s + 1e-9 && got > ref_s - 2e-6,
          $sformatf("series m=%0d d=%0d: %f expected %f", m, d, got, ref_s));
    val = got;
  endtask

  task automatic send_pi(input int s, input int m, input int d);
    send(s, TASK_PI);
    send(s, 8'(m));
    send(s, 8'(d >> 8));
    send(s, 8'(d));
  endtask

  // --------------------------------------------------------------- main
  initial begin
    logic [7:0] a[N], b[N], r, st;
    logic [15:0] x[N], y[N], p;
    logic drv;
    real sv[4], f;
    int busy;

    rst = 1;
    repeat (6) @(negedge clk);
    rst = 0;
    repeat (6) @(negedge clk);

    for (int s = 0; s < N; s++) begin
      get_status(s, st);
      check(st == 8'h03, $sformatf("slave %0d status after reset %h", s, st));
    end

    // addition on all four slaves
    for (int s = 0; s < N; s++) begin
      a[s] = 8'($urandom); b[s] = 8'($urandom);
      send(s, TASK_ADD); send(s, a[s]); send(s, b[s]);
    end
    for (int s = 0; s < N; s++) begin
      wait_done(s);
      get_result(s, r);
      check(r == a[s] + b[s], $sformatf("add slave %0d: %h + %h = %h", s, a[s], b[s], r));
    end

    // 16 bit multiplication on all four slaves
    for (int s = 0; s < N; s++) begin
      x[s] = 16'($urandom); y[s] = 16'($urandom);
      send(s, TASK_MULT);
      send(s, x[s][15:8]); send(s, x[s][7:0]); send(s, y[s][15:8]); send(s, y[s][7:0]);
    end
    for (int s = 0; s < N; s++) begin
      wait_done(s);
      get_result(s, p[15:8]);
      get_result(s, p[7:0]);
      check(p == 16'(x[s] * y[s]), $sformatf("mult slave %0d: %h * %h = %h", s, x[s], y[s], p));
    end

    // pi: one hex digit per position, the four series on four slaves
    for (int t = 0; t < 5; t++) begin
      for (int s = 0; s < N; s++) send_pi(s, PI_M[s], PI_D[t]);
      busy = 0;
      for (int s = 0; s < N; s++) begin
        get_status(s, st);
        if (st[ST_BUSY]) busy++;
      end
      if (busy == N) n_parallel++;
      for (int s = 0; s < N; s++) begin
        wait_done(s);
        read_pi(s, PI_M[s], PI_D[t], sv[s]);
      end
      f = 4.0 * (sv[0] + tail_sum(1, PI_D[t])) - 2.0 * (sv[1] + tail_sum(4, PI_D[t]))
          - (sv[2] + tail_sum(5, PI_D[t])) - (sv[3] + tail_sum(6, PI_D[t]));
      f = f - $floor(f);
      check(int'($floor(16.0 * f)) == PI_DIGIT[t],
            $sformatf("pi hex digit %0d: %0h expected %0h", PI_D[t] + 1, int'($floor(16.0 * f)), PI_DIGIT[t]));
      $display("pi hex digit at position %0d = %0h", PI_D[t] + 1, int'($floor(16.0 * f)));
    end

    // two pi tasks queued on slave 0; fourteen bytes queue in its FIFO
    send_pi(0, 1, 20);
    send_pi(0, 4, 20);
    wait_done(0);
    read_pi(0, 1, 20, f);
    read_pi(0, 4, 20, f);
    n_queued++;

    // FIFO overflow on slave 1: seventeen one-byte results, sixteen kept
    for (int i = 0; i < DEPTH + 1; i++) begin
      send(1, TASK_ADD); send(1, 8'(i + 1)); send(1, 8'h20);
    end
    wait_done(1);
    bfm.idle(200);
    get_status(1, st);
    check(st[ST_FIFO_FULL] && ff_full[1], $sformatf("FIFO full not reported, status %h", st));
    if (st[ST_FIFO_FULL]) n_fifo_full++;
    for (int i = 0; i < DEPTH; i++) begin
      get_result(1, r);
      check(r == 8'(i + 1) + 8'h20, $sformatf("overflow run result %0d: %h", i, r));
    end
    get_status(1, st);
    check(!st[ST_FIFO_FULL], "FIFO still full after draining");
    get_result(1, r);
    check(r == 8'h00, $sformatf("seventeenth result was kept: %h", r));

    // DMA cycle and an address outside the window are ignored
    bfm.dma_write(dport(2), 8'h01);
    bfm.idle(10);
    check(!msg_bit[2], "write during a DMA cycle was taken");
    if (!msg_bit[2]) n_dma_ignored++;
    bfm.io_write(10'h3E8, 8'h01);
    bfm.io_write(10'h2E0, 8'h01);
    bfm.idle(10);
    check(msg_bit == '0, "write outside the window was taken");
    bfm.io_read(10'h3E9, r, drv);
    check(!drv, "card answered outside its window");
    if (msg_bit == '0 && !drv) n_window_ignored++;

    // unknown task code: taken, nothing returned
    send(3, 8'h07);
    wait_done(3);
    bfm.idle(400);
    get_result(3, r);
    check(r == 8'h00 && g_slave[3].u_slave.bytes_written == 0 + 7 * 5 + 1 + 2,
          $sformatf("unknown task produced output (%h)", r));
    if (r == 8'h00) n_unknown_task++;

    // model-side protocol errors
    check(g_slave[0].u_slave.p0_errors == 0 && g_slave[1].u_slave.p0_errors == 0 &&
          g_slave[2].u_slave.p0_errors == 0 && g_slave[3].u_slave.p0_errors == 0,
          "a slave read P0 while the card was not driving it");

    $display("byte-buffer stalls=%0d all-four-busy=%0d done polls=%0d fifo-full=%0d queued=%0d",
             n_buf_stalls, n_parallel, n_done_polls, n_fifo_full, n_queued);
    $display("dma ignored=%0d window ignored=%0d unknown task=%0d MSG_BIT writes=%0d ISA cycles=%0d",
             n_dma_ignored, n_window_ignored, n_unknown_task, n_msg_writes, bfm.n_cycles);
    check(n_buf_stalls > 0, "byte buffer never full");
    check(n_parallel > 0, "four slaves never busy together");
    check(n_done_polls > 0, "never waited for a slave");
    check(n_fifo_full > 0, "FIFO never full");
    check(n_queued > 0, "no queued results");
    check(n_dma_ignored > 0 && n_window_ignored > 0 && n_unknown_task > 0, "ignore cases");
    check(n_msg_writes > 0, "no data-port write seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
