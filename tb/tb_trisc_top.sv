// tb_trisc_top: end-to-end test of the TRISC processor at its default
// parameters, driven only through the board-level ports.
//
// 1. Program-load mode: the 16-word test program (addresses 0-F: 0F 61 62
//    1E 74 0E 66 89 88 69 2E 7B 6C 88 EE FF) is written word by word with
//    the data switches and the load key, and every word is read back on the
//    MDO displays before the address generator moves on.
// 2. Run mode: the program executes. Each return of the controller to fetch
//    state B (control LEDs showing only C3) ends an instruction; the PC
//    display, the accumulator (low nibble of the RAM data display) and the
//    number of clocks the instruction took are compared with an instruction
//    level reference model, and the accumulator with the expected result
//    for that program address: F 0 1 1 0 1 2 2 1 3 4 0 1 1 for addresses
//    0-D (the program ends jumping to itself at address 8).
// 3. Random programs of LDA/STA/ADD/INC/CLR/JMP words are loaded and run
//    against the same model.
// 4. A program reaching an opcode without an execute sequence must halt the
//    machine in the decode state with the PC on that instruction.
// Every mechanism (each instruction, load writes and readbacks, RAM writes
// by STA, accumulator wrap-around, halt, stop/reset) is counted and must
// occur at least once.
module tb_trisc_top;
  logic        clk = 1'b0;
  logic        start_stop, mode, clock_in, clear_addr_gen_n, rw_n;
  logic [7:0]  data_in;
  logic [14:0] cled;
  logic [6:0]  hex5, hex4, hex3, hex2, hex1, hex0;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  trisc_top dut (
    .sys_clock       (clk),
    .start_stop      (start_stop),
    .mode            (mode),
    .clock_in        (clock_in),
    .clear_addr_gen_n(clear_addr_gen_n),
    .rw_n            (rw_n),
    .data_in         (data_in),
    .cled            (cled),
    .hex5_out        (hex5),
    .hex4_out        (hex4),
    .hex3_out        (hex3),
    .hex2_out        (hex2),
    .hex1_out        (hex1),
    .hex0_out        (hex0)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("WATCHDOG: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- helpers
  // Active-low seven-segment pattern {g..a} back to the digit it shows.
  function automatic int seg2hex(input logic [6:0] seg);
    logic [6:0] lit;
    lit = ~seg;
    case (lit)
      7'h3F: return 0;  7'h06: return 1;  7'h5B: return 2;  7'h4F: return 3;
      7'h66: return 4;  7'h6D: return 5;  7'h7D: return 6;  7'h07: return 7;
      7'h7F: return 8;  7'h6F: return 9;  7'h77: return 10; 7'h7C: return 11;
      7'h39: return 12; 7'h5E: return 13; 7'h79: return 14; 7'h71: return 15;
      default: return -1;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Mechanism counters.
  int n_inc, n_clr, n_jmp, n_lda, n_sta, n_add, n_wrap, n_load_wr, n_readback,
      n_halt, n_reset, n_sta_code;

  // Reference model state.
  logic [7:0] mem [16];
  logic [3:0] m_pc, m_acc;

  // --------------------------------------------------------- load program
  task automatic load_program(input logic [7:0] prog [16]);
    @(negedge clk);
    start_stop = 1'b0;
    mode = 1'b1;
    clock_in = 1'b0;
    rw_n = 1'b1;
    clear_addr_gen_n = 1'b0;
    @(negedge clk);
    clear_addr_gen_n = 1'b1;
    n_reset++;
    for (int a = 0; a < 16; a++) begin
      check(seg2hex(hex4) == a, $sformatf("load address display %0d", seg2hex(hex4)));
      data_in = prog[a];
      rw_n = 1'b0;                 // key pressed: write
      clock_in = 1'b1;
      @(negedge clk);
      clock_in = 1'b0;
      rw_n = 1'b1;
      @(negedge clk);
      n_load_wr++;
      clock_in = 1'b1;             // second press: read back, next address
      @(negedge clk);
      clock_in = 1'b0;
      check(seg2hex(hex3) == int'(prog[a][7:4]) && seg2hex(hex2) == int'(prog[a][3:0]),
            $sformatf("readback addr %0d: %0d%0d exp %02h", a, seg2hex(hex3),
                      seg2hex(hex2), prog[a]));
      n_readback++;
      // Data-in displays show the switches in load mode.
      check(seg2hex(hex1) == int'(data_in[7:4]) && seg2hex(hex0) == int'(data_in[3:0]),
            "data switch display");
      @(negedge clk);
    end
    check(seg2hex(hex4) == 0, "address generator wraps to 0 after 16 words");
    for (int a = 0; a < 16; a++) mem[a] = prog[a];
  endtask

  // Cycles of one instruction, fetch included.
  function automatic int cyc_of(input logic [3:0] op);
    case (op)
      4'b0110, 4'b0111, 4'b1000: return 5;
      4'b0000: return 8;
      4'b0001: return 7;
      4'b0010: return 9;
      default: return -1;
    endcase
  endfunction

  // Execute one instruction in the model; returns its opcode.
  function automatic logic [3:0] model_step();
    logic [7:0] w;
    logic [4:0] sum;
    w = mem[m_pc];
    m_pc = m_pc + 1;
    case (w[7:4])
      4'b0000: begin m_acc = mem[w[3:0]][3:0]; n_lda++; end
      4'b0001: begin
        mem[w[3:0]] = {4'b0000, m_acc};
        n_sta++;
      end
      4'b0010: begin
        sum = {1'b0, m_acc} + {1'b0, mem[w[3:0]][3:0]};
        if (sum[4]) n_wrap++;
        m_acc = sum[3:0];
        n_add++;
      end
      4'b0110: begin if (m_acc == 4'hF) n_wrap++; m_acc = m_acc + 1; n_inc++; end
      4'b0111: begin m_acc = 4'h0; n_clr++; end
      4'b1000: begin m_pc = w[3:0]; n_jmp++; end
      default: ;
    endcase
    return w[7:4];
  endfunction

  function automatic bit is_fetch_b(input logic [14:0] l);
    return l == 15'h0008;
  endfunction

  // Run n_instr instructions from reset, checking each against the model.
  // expect_tab, when use_tab is set, gives the accumulator expected after the
  // instruction at each address.
  task automatic run_program(input int n_instr, input bit use_tab,
                             input int expect_tab [16]);
    int start, len;
    logic [3:0] op, addr;
    @(negedge clk);
    mode = 1'b0;
    start_stop = 1'b1;
    m_pc = 0;
    m_acc = 0;
    // State A clears the PC.
    check(cled == 15'h0001, $sformatf("state A after start, cled=%h", cled));
    @(negedge clk);
    check(is_fetch_b(cled), "first fetch state B");
    check(seg2hex(hex5) == 0 && seg2hex(hex0) == 0, "PC and ACC start at 0");
    start = cycle;
    for (int i = 0; i < n_instr; i++) begin
      addr = m_pc;
      op = model_step();
      // Wait for the next state B.
      @(negedge clk);
      while (!is_fetch_b(cled) && cycle - start < 20) @(negedge clk);
      len = cycle - start;
      start = cycle;
      check(len == cyc_of(op), $sformatf("instr %0d op %b at %h took %0d cycles",
                                         i, op, addr, len));
      check(seg2hex(hex5) == int'(m_pc), $sformatf("PC %0d exp %0d after op %b at %h",
                                                   seg2hex(hex5), m_pc, op, addr));
      check(seg2hex(hex0) == int'(m_acc), $sformatf("ACC %0d exp %0d after op %b at %h",
                                                    seg2hex(hex0), m_acc, op, addr));
      check(seg2hex(hex1) == 0, "MDI high nibble is 0");
      if (use_tab)
        check(seg2hex(hex0) == expect_tab[addr],
              $sformatf("position %h shows %0d, expected %0d", addr, seg2hex(hex0),
                        expect_tab[addr]));
    end
  endtask

  // Stop the processor and read memory back through load mode.
  task automatic verify_memory();
    @(negedge clk);
    start_stop = 1'b0;
    mode = 1'b1;
    rw_n = 1'b1;
    clear_addr_gen_n = 1'b0;
    @(negedge clk);
    clear_addr_gen_n = 1'b1;
    for (int a = 0; a < 16; a++) begin
      repeat (2) begin
        clock_in = 1'b1;
        @(negedge clk);
        clock_in = 1'b0;
        @(negedge clk);
      end
      check(seg2hex(hex3) == int'(mem[a][7:4]) && seg2hex(hex2) == int'(mem[a][3:0]),
            $sformatf("memory after run, addr %0d: %0d%0d exp %02h", a,
                      seg2hex(hex3), seg2hex(hex2), mem[a]));
    end
  endtask

  // --------------------------------------------------------------- stimulus
  logic [7:0] test_prog [16];
  logic [7:0] rprog [16];
  int         tab4 [16];
  logic [3:0] pc_at_halt;

  initial begin
    logic [3:0] ops [6];
    start_stop = 1'b0;
    mode = 1'b0;
    clock_in = 1'b0;
    rw_n = 1'b1;
    clear_addr_gen_n = 1'b1;
    data_in = 8'h00;
    {n_inc, n_clr, n_jmp, n_lda, n_sta, n_add, n_wrap, n_load_wr, n_readback,
     n_halt, n_reset, n_sta_code} = '0;
    repeat (3) @(negedge clk);

    // ---- the test program and its expected results
    test_prog = '{8'h0F, 8'h61, 8'h62, 8'h1E, 8'h74, 8'h0E, 8'h66, 8'h89,
                  8'h88, 8'h69, 8'h2E, 8'h7B, 8'h6C, 8'h88, 8'hEE, 8'hFF};
    tab4 = '{15, 0, 1, 1, 0, 1, 2, 2, 1, 3, 4, 0, 1, 1, -1, -1};
    load_program(test_prog);
    run_program(20, 1'b1, tab4);
    verify_memory();
    check(mem[14] == 8'h01, "STA wrote 01 to address E");

    // ---- random programs
    ops = '{4'b0000, 4'b0001, 4'b0010, 4'b0110, 4'b0111, 4'b1000};
    for (int p = 0; p < 6; p++) begin
      for (int a = 0; a < 16; a++)
        rprog[a] = {ops[$urandom_range(5)], 4'($urandom_range(15))};
      // Keep control inside the program: no word may jump out or be an
      // unknown opcode, which the op table already guarantees.
      load_program(rprog);
      run_program(60, 1'b0, tab4);
      verify_memory();
    end

    // ---- halt on an opcode with no execute sequence (SUB = 0011)
    rprog = '{8'h66, 8'h6F, 8'h3F, 8'h61, 8'h00, 8'h00, 8'h00, 8'h00,
              8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
    load_program(rprog);
    run_program(2, 1'b0, tab4);
    // Now fetching address 2: B, C, D, then E forever.
    repeat (3) @(negedge clk);
    pc_at_halt = 4'(seg2hex(hex5));
    repeat (10) begin
      @(negedge clk);
      check(cled == 15'h0088, $sformatf("halted in E with C3 C7 only, cled=%h", cled));
      check(seg2hex(hex5) == 2 && seg2hex(hex0) == 2, "PC and ACC hold while halted");
    end
    check(pc_at_halt == 4'd2, "PC stays on the halting instruction");
    if (cled == 15'h0088) n_halt++;
    // Stop/reset leaves the halt.
    @(negedge clk);
    start_stop = 1'b0;
    @(negedge clk);
    check(cled == 15'h0001 && seg2hex(hex5) == 0 && seg2hex(hex0) == 0,
          "Start/Stop low returns to state A with PC and ACC cleared");
    n_reset++;

    // ---- every mechanism must have happened
    check(n_inc > 0, "INC executed");
    check(n_clr > 0, "CLR executed");
    check(n_jmp > 0, "JMP executed");
    check(n_lda > 0, "LDA executed");
    check(n_sta > 0, "STA executed");
    check(n_add > 0, "ADD executed");
    check(n_wrap > 0, "accumulator wrap-around occurred");
    check(n_load_wr > 0, "program-load writes occurred");
    check(n_readback > 0, "program-load readbacks occurred");
    check(n_halt > 0, "halt occurred");
    check(n_reset > 0, "stop/reset occurred");
    $display("mechanisms: INC=%0d CLR=%0d JMP=%0d LDA=%0d STA=%0d ADD=%0d wrap=%0d load=%0d readback=%0d halt=%0d reset=%0d",
             n_inc, n_clr, n_jmp, n_lda, n_sta, n_add, n_wrap, n_load_wr, n_readback,
             n_halt, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
