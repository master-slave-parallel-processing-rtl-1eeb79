// Testbench for the FPGA port decoder: all chip-select and address
// combinations; exactly the addressed select may be low.
module tb_isa_port_decode;
  logic cs_n;
  logic [2:0] a;
  logic [7:0] sel_n;
  int checks = 0, failures = 0;

  isa_port_decode dut (.isa_cs_n(cs_n), .isa_a(a), .port_sel_n(sel_n));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      logic [7:0] exp_n;
      {cs_n, a} = 4'(c);
      #1ns;
      exp_n = cs_n ? 8'hFF : ~(8'h01 << a);
      checks++;
      if (sel_n !== exp_n) begin
        failures++;
        $display("cs_n=%b a=%0d sel_n=%b expected %b", cs_n, a, sel_n, exp_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
