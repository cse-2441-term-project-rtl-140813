// tb_controller: the TRISC controller state machine, state by state.
//
// For each executed instruction (INC, CLR, JMP, LDA, STA, ADD) the decoder
// lines are set, the machine is started from reset and the control word of
// every state is compared with the signals listed for that state in the
// expected sequence: A (C0), fetch B (C3), C and D (C3 C4), decode E (C2 C3
// C7), then the instruction's execute states, then B again. This also checks
// the instruction's length in clocks. An opcode with no execute sequence
// must keep the machine in E with C2 low and halted set.
module tb_controller;
  import trisc_pkg::*;
  logic    clk = 1'b0, rst_n;
  decode_t dec;
  ctrl_t   ctrl;
  state_e  state;
  logic    halted;
  int checks = 0, failures = 0;

  controller dut (.clk(clk), .rst_n(rst_n), .dec(dec), .ctrl(ctrl), .state(state),
                  .halted(halted));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Control word from a list of signal names such as "C3 C4".
  function automatic ctrl_t word(input string names);
    ctrl_t w;
    int    i, n;
    w = '0;
    i = 0;
    while (i < names.len()) begin
      if (names[i] == "C") begin
        n = 0;
        i++;
        while (i < names.len() && names[i] >= "0" && names[i] <= "9") begin
          n = n * 10 + (names[i] - "0");
          i++;
        end
        case (n)
          0: w.c0 = 1;  1: w.c1 = 1;  2: w.c2 = 1;  3: w.c3 = 1;  4: w.c4 = 1;
          5: w.c5 = 1;  7: w.c7 = 1;  8: w.c8 = 1;  9: w.c9 = 1;  10: w.c10 = 1;
          11: w.c11 = 1; 12: w.c12 = 1; 13: w.c13 = 1; 14: w.c14 = 1;
          default: $display("bad name");
        endcase
      end else i++;
    end
    return w;
  endfunction

  task automatic expect_word(input string names, input string where);
    checks++;
    if (ctrl !== word(names)) begin
      failures++;
      $display("FAIL %s: ctrl=%b exp %s (state %s)", where, ctrl, names, state.name());
    end
  endtask

  task automatic run(input string instr, input decode_t d, input string exec []);
    @(negedge clk);
    rst_n = 1'b0;
    dec = d;
    @(negedge clk);
    rst_n = 1'b1;
    expect_word("C0", {instr, " A"});
    @(negedge clk) expect_word("C3", {instr, " B"});
    @(negedge clk) expect_word("C3 C4", {instr, " C"});
    @(negedge clk) expect_word("C3 C4", {instr, " D"});
    @(negedge clk) expect_word("C2 C3 C7", {instr, " E"});
    foreach (exec[k]) begin
      @(negedge clk);
      expect_word(exec[k], $sformatf("%s execute %0d", instr, k));
    end
    @(negedge clk) expect_word("C3", {instr, " back to B"});
    checks++;
    if (state != S_B) begin failures++; $display("FAIL %s did not return to B", instr); end
  endtask

  initial begin
    decode_t d;
    rst_n = 1'b0;
    dec = '0;
    d = '0; d.inc = 1; run("INC", d, '{"C9"});
    d = '0; d.clr = 1; run("CLR", d, '{"C8"});
    d = '0; d.jmp = 1; run("JMP", d, '{"C1"});
    d = '0; d.lda = 1; run("LDA", d, '{"", "C4", "C4", "C11"});
    d = '0; d.sta = 1; run("STA", d, '{"", "C4 C5", "C4 C5"});
    d = '0; d.add = 1; run("ADD", d, '{"", "C4", "C4", "", "C10 C11 C14"});
    // Halt on a line without an execute sequence.
    d = '0; d.sub = 1;
    @(negedge clk);
    rst_n = 1'b0;
    dec = d;
    @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    repeat (5) begin
      @(negedge clk);
      expect_word("C3 C7", "halted in E");
      checks++;
      if (!halted || state != S_E) begin failures++; $display("FAIL not halted"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
