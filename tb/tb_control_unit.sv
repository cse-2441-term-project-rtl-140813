// tb_control_unit: the decoder and controller together, driven by an IR
// opcode. For each executed opcode the number of clocks from one fetch state
// B to the next (5 for INC, CLR, JMP; 8 for LDA; 7 for STA; 9 for ADD) and the
// signals that occur during the instruction are checked; an opcode with no
// execute sequence (SUB) must halt.
module tb_control_unit;
  import trisc_pkg::*;
  logic       clk = 1'b0, rst_n;
  logic [3:0] ir;
  ctrl_t      ctrl;
  state_e     state;
  logic       halted;
  int checks = 0, failures = 0;

  control_unit dut (.clk(clk), .rst_n(rst_n), .ir(ir), .ctrl(ctrl), .state(state),
                    .halted(halted));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs one instruction from the B after reset; returns clocks until the
  // next B and the OR of all control words seen in between.
  task automatic one(input logic [3:0] op, output int len, output ctrl_t seen);
    @(negedge clk);
    rst_n = 1'b0;
    ir = op;
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);                    // now in B
    len = 0;
    seen = '0;
    do begin
      seen |= ctrl;
      @(negedge clk);
      len++;
    end while (ctrl != 14'b0001_0000_0000_00 && len < 30);
  endtask

  task automatic check_instr(input string name, input logic [3:0] op, input int exp_len,
                             input ctrl_t must);
    int    len;
    ctrl_t seen;
    one(op, len, seen);
    checks++;
    if (len != exp_len) begin
      failures++;
      $display("FAIL %s took %0d clocks, expected %0d", name, len, exp_len);
    end
    checks++;
    if ((seen & must) != must) begin
      failures++;
      $display("FAIL %s signals %b lack %b", name, seen, must);
    end
  endtask

  initial begin
    ctrl_t m;
    rst_n = 1'b0;
    ir = '0;
    m = '0; m.c9 = 1;                       check_instr("INC", 4'b0110, 5, m);
    m = '0; m.c8 = 1;                       check_instr("CLR", 4'b0111, 5, m);
    m = '0; m.c1 = 1;                       check_instr("JMP", 4'b1000, 5, m);
    m = '0; m.c11 = 1;                      check_instr("LDA", 4'b0000, 8, m);
    m = '0; m.c4 = 1; m.c5 = 1;             check_instr("STA", 4'b0001, 7, m);
    m = '0; m.c10 = 1; m.c11 = 1; m.c14 = 1; check_instr("ADD", 4'b0010, 9, m);
    // SUB has no execute sequence: the unit halts in E.
    @(negedge clk);
    rst_n = 1'b0;
    ir = 4'b0011;
    @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    checks++;
    if (!halted || state != S_E || ctrl.c2) begin failures++; $display("FAIL no halt"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
