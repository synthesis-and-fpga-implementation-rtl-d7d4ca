// tb_sm_to_twos: checks the sign-magnitude to two's complement converter on
// all 512 codes and on the three worked values of the number format
// (+0.25, -3.53125, +5.78125).
module tb_sm_to_twos;
  import nadc_pkg::*;

  sm_t sm;
  tc_t tc;
  int  checks = 0, failures = 0;

  sm_to_twos dut (.sm(sm), .tc(tc));

  task automatic check(input int expect_v, input string what);
    checks++;
    if (int'(tc) != expect_v) begin
      failures++;
      $display("FAIL %s: code %b got %0d expected %0d", what, sm, tc, expect_v);
    end
  endtask

  initial begin
    for (int c = 0; c < 512; c++) begin
      sm = sm_t'(c);
      #1;
      check(sm.pos ? int'(sm.mag) : -int'(sm.mag), "sweep");
    end
    // Worked values, in units of 1/32.
    sm = 9'b1_0000_1000; #1; check(8, "+0.25");
    sm = 9'b0_0111_0001; #1; check(-113, "-3.53125");
    sm = 9'b1_1011_1001; #1; check(185, "+5.78125");
    sm = 9'b0_1111_1111; #1; check(-255, "smallest");
    sm = 9'b1_1111_1111; #1; check(255, "largest");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
