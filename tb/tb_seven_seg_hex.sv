// tb_seven_seg_hex: every digit, in both polarities. The expected patterns
// are built from the list of lit segments of each digit shape.
module tb_seven_seg_hex;
  logic [3:0] digit;
  logic [6:0] seg_l, seg_h;
  int checks = 0, failures = 0;

  seven_seg_hex #(.ACTIVE_LOW(1'b1)) dut_l (.digit(digit), .seg(seg_l));
  seven_seg_hex #(.ACTIVE_LOW(1'b0)) dut_h (.digit(digit), .seg(seg_h));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string shapes [16];
    logic [6:0] exp;
    shapes = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
               "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    for (int i = 0; i < 16; i++) begin
      digit = 4'(i);
      exp = '0;
      foreach (shapes[i][k]) exp[shapes[i][k] - "a"] = 1'b1;
      #1;
      checks += 2;
      if (seg_h != exp) begin failures++; $display("FAIL %0h: %b exp %b", i, seg_h, exp); end
      if (seg_l != ~exp) begin failures++; $display("FAIL active-low %0h", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
