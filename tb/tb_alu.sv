// tb_alu: exhaustive test of the TRISC ALU over all operands and all four
// functions (s1 s0: 00 add, 01 subtract, 10 and, 11 xor), including the
// overflow and carry flags, which must be 0 for the logic functions.
module tb_alu;
  logic [3:0] a, b, r;
  logic       s0, s1, ovr, cout;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .s0(s0), .s1(s1), .r(r), .ovr(ovr), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int er, ec, eo, sa, sb, sr;
    for (int f = 0; f < 4; f++)
      for (int ua = 0; ua < 16; ua++)
        for (int ub = 0; ub < 16; ub++) begin
          a = 4'(ua); b = 4'(ub); {s1, s0} = 2'(f);
          #1;
          sa = ua > 7 ? ua - 16 : ua;
          sb = ub > 7 ? ub - 16 : ub;
          case (f)
            0: begin er = (ua + ub) % 16; ec = (ua + ub) / 16;
                     sr = sa + sb; eo = (sr > 7 || sr < -8); end
            1: begin er = (ua - ub + 16) % 16; ec = (ua >= ub);
                     sr = sa - sb; eo = (sr > 7 || sr < -8); end
            2: begin er = ua & ub; ec = 0; eo = 0; end
            default: begin er = ua ^ ub; ec = 0; eo = 0; end
          endcase
          checks++;
          if (int'(r) != er || int'(cout) != ec || int'(ovr) != eo) begin
            failures++;
            $display("FAIL f=%0d a=%0d b=%0d: r=%0d cout=%0d ovr=%0d exp %0d %0d %0d",
                     f, ua, ub, r, cout, ovr, er, ec, eo);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
