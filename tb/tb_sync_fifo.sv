// Testbench for the result FIFO: random pushes and pops, including pushes
// when full and pops when empty, against a queue reference model. Checks
// data order, the show-ahead output, full/empty/count every cycle, and
// that the FIFO fills at exactly DEPTH entries.
module tb_sync_fifo;
  localparam int unsigned DEPTH = 16;
  logic clk = 0, rst;
  logic wr_en, rd_en, full, empty;
  logic [7:0] wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  int n_full = 0, n_drop = 0, n_empty_rd = 0;
  logic [7:0] q[$];

  always #5ns clk = ~clk;

  sync_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (
    .clk, .rst, .wr_en, .wr_data, .rd_en, .rd_data, .full, .empty, .count
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%t FAIL %s", $time, what);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 4000; i++) begin
      int phase;
      phase = (i / 500) % 3;   // fill-biased, drain-biased, balanced
      @(negedge clk);
      wr_en   = ($urandom_range(0, 9) < (phase == 0 ? 8 : phase == 1 ? 2 : 5));
      rd_en   = ($urandom_range(0, 9) < (phase == 0 ? 2 : phase == 1 ? 8 : 5));
      wr_data = 8'($urandom);
      // checks before the edge
      check(count == q.size(), $sformatf("count %0d expected %0d", count, q.size()));
      check(full == (q.size() == DEPTH), "full flag");
      check(empty == (q.size() == 0), "empty flag");
      if (q.size() > 0) check(rd_data == q[0], $sformatf("head %h expected %h", rd_data, q[0]));
      @(posedge clk);
      // reference update uses the values seen at this edge
      begin
        bit do_wr, do_rd;
        do_wr = wr_en && (q.size() < DEPTH);
        do_rd = rd_en && (q.size() > 0);
        if (wr_en && !do_wr) n_drop++;
        if (rd_en && !do_rd) n_empty_rd++;
        if (do_rd) void'(q.pop_front());
        if (do_wr) q.push_back(wr_data);
        if (q.size() == DEPTH) n_full++;
      end
    end
    check(n_full > 0, "FIFO never became full");
    check(n_drop > 0, "no write to a full FIFO was tried");
    check(n_empty_rd > 0, "no read of an empty FIFO was tried");
    $display("full cycles=%0d dropped writes=%0d empty reads=%0d", n_full, n_drop, n_empty_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
