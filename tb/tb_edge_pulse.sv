// Testbench for the three-flop edge detector: random strobes of random
// length, both edge polarities. Every selected edge must give exactly one
// pulse, the pulse must last exactly two clocks, it must cover exactly one
// half-rate enable, and it must be seen 3 or 4 clocks after the
// first clock that sees the edge.
module tb_edge_pulse;
  logic clk = 0, rst, ce, strobe;
  logic pulse_r, pulse_f;
  int checks = 0, failures = 0;

  always #5ns clk = ~clk;

  always_ff @(posedge clk) begin
    if (rst) ce <= 1'b0;
    else     ce <= !ce;
  end

  edge_pulse #(.RISING(1'b1)) dut_r (.clk, .rst, .ce, .strobe, .pulse(pulse_r));
  edge_pulse #(.RISING(1'b0)) dut_f (.clk, .rst, .ce, .strobe, .pulse(pulse_f));

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

  // Measure each pulse of each detector.
  int n_rise = 0, n_fall = 0, p_rise = 0, p_fall = 0;
  longint t_rise, t_fall;     // clock index of the last edge
  longint cyc = 0;
  int len_r = 0, len_f = 0, ce_r = 0, ce_f = 0;
  logic strobe_q = 0;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (pulse_r) begin
        if (len_r == 0) begin
          p_rise++;
          check(cyc - t_rise >= 3 && cyc - t_rise <= 4, $sformatf("rise latency %0d", cyc - t_rise));
        end
        len_r++; if (ce) ce_r++;
      end else if (len_r != 0) begin
        check(len_r == 2, $sformatf("rise pulse length %0d", len_r));
        check(ce_r == 1, "rise pulse must cover one enable");
        len_r = 0; ce_r = 0;
      end
      if (pulse_f) begin
        if (len_f == 0) begin
          p_fall++;
          check(cyc - t_fall >= 3 && cyc - t_fall <= 4, $sformatf("fall latency %0d", cyc - t_fall));
        end
        len_f++; if (ce) ce_f++;
      end else if (len_f != 0) begin
        check(len_f == 2, $sformatf("fall pulse length %0d", len_f));
        check(ce_f == 1, "fall pulse must cover one enable");
        len_f = 0; ce_f = 0;
      end
    end
  end

  initial begin
    rst = 1; strobe = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (4) @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      strobe = 1; n_rise++; t_rise = cyc + 1;
      repeat ($urandom_range(5, 20)) @(negedge clk);
      strobe = 0; n_fall++; t_fall = cyc + 1;
      repeat ($urandom_range(5, 20)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(p_rise == n_rise, $sformatf("rising pulses %0d for %0d edges", p_rise, n_rise));
    check(p_fall == n_fall, $sformatf("falling pulses %0d for %0d edges", p_fall, n_fall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
