// tb_instruction_decoder: all sixteen opcodes. Each defined code must raise
// exactly its own line; the unassigned codes (0101, 1010, 1011, 1101, 1110,
// 1111) must raise none.
module tb_instruction_decoder;
  import trisc_pkg::*;
  logic [3:0] opcode;
  decode_t    dec;
  int checks = 0, failures = 0;

  instruction_decoder dut (.opcode(opcode), .dec(dec));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [10:0] exp;   // {LDA STA ADD SUB XOR INC CLR JMP JPZ JPN HLT}
    for (int i = 0; i < 16; i++) begin
      opcode = 4'(i);
      #1;
      case (i)
        0:  exp = 11'b100_0000_0000;
        1:  exp = 11'b010_0000_0000;
        2:  exp = 11'b001_0000_0000;
        3:  exp = 11'b000_1000_0000;
        4:  exp = 11'b000_0100_0000;
        6:  exp = 11'b000_0010_0000;
        7:  exp = 11'b000_0001_0000;
        8:  exp = 11'b000_0000_1000;
        12: exp = 11'b000_0000_0010;
        9:  exp = 11'b000_0000_0001;
        default: exp = '0;
      endcase
      checks++;
      if (dec != exp) begin
        failures++;
        $display("FAIL opcode %b: %b exp %b", opcode, dec, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
