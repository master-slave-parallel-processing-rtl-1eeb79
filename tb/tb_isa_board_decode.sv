// Testbench for the board address qualifier: every IO address with AEN low
// and high, and every IOR/IOW combination, compared with the expected
// window 0x3E0..0x3E7.
module tb_isa_board_decode;
  logic [9:0] sa;
  logic aen, iorn, iown, cs_n, rdn, wrn;
  int checks = 0, failures = 0;

  isa_board_decode dut (
    .isa_sa(sa), .isa_aen(aen), .isa_iorn(iorn), .isa_iown(iown),
    .isa_cs_n(cs_n), .isa_rdn(rdn), .isa_wrn(wrn)
  );

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 1024; a++) begin
      for (int c = 0; c < 8; c++) begin
        logic hit;
        sa = 10'(a); {aen, iorn, iown} = 3'(c);
        #1ns;
        hit = (a >= 'h3E0) && (a <= 'h3E7) && !aen;
        checks++;
        if (cs_n !== !hit || rdn !== (iorn || !hit) || wrn !== (iown || !hit)) begin
          failures++;
          if (failures < 10) $display("mismatch sa=%h aen=%b iorn=%b iown=%b -> cs_n=%b rdn=%b wrn=%b",
                                      sa, aen, iorn, iown, cs_n, rdn, wrn);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
