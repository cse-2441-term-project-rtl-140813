// tb_ripple_carry_adder: exhaustive test of the 4-bit adder/subtractor.
// For every a, b and both values of sub, the sum, carry out and signed
// overflow are compared with integer arithmetic.
module tb_ripple_carry_adder;
  logic [3:0] a, b, s;
  logic       sub, ovr, cout;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.N(4)) dut (.a(a), .b(b), .sub(sub), .s(s), .ovr(ovr), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ua, ub, full, sa, sb, sres;
    for (int i = 0; i < 2; i++)
      for (ua = 0; ua < 16; ua++)
        for (ub = 0; ub < 16; ub++) begin
          a = 4'(ua); b = 4'(ub); sub = i[0];
          #1;
          full = sub ? ua + (15 - ub) + 1 : ua + ub;
          sa   = ua > 7 ? ua - 16 : ua;
          sb   = ub > 7 ? ub - 16 : ub;
          sres = sub ? sa - sb : sa + sb;
          checks++;
          if (int'(s) != (full % 16) || int'(cout) != (full / 16) ||
              ovr != (sres > 7 || sres < -8)) begin
            failures++;
            $display("FAIL a=%0d b=%0d sub=%0d: s=%0d cout=%0d ovr=%0d", ua, ub, sub, s, cout, ovr);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
