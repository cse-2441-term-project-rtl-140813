// instruction_decoder: the TRISC four-to-eleven instruction decoder.
//
// Combinational. The 4-bit opcode from the instruction register raises one
// of eleven lines (LDA, STA, ADD, SUB, XOR, INC, CLR, JMP, JPZ, JPN, HLT);
// any other code raises none. Codes: LDA 0000, STA 0001, ADD 0010,
// SUB 0011, XOR 0100, INC 0110, CLR 0111, JMP 1000, JPN 1100, HLT 1001.
// No code raises JPZ: the line exists for a jump-on-zero instruction that
// this instruction set does not assign. Only LDA, STA, ADD, INC, CLR and JMP
// are executed by the controller.
module instruction_decoder
  import trisc_pkg::*;
(
  input  logic [3:0] opcode,
  output decode_t    dec
);
  always_comb begin
    dec = '0;
    case (opcode)
      OP_LDA: dec.lda    = 1'b1;
      OP_STA: dec.sta    = 1'b1;
      OP_ADD: dec.add    = 1'b1;
      OP_SUB: dec.sub    = 1'b1;
      OP_XOR: dec.xor_op = 1'b1;
      OP_INC: dec.inc    = 1'b1;
      OP_CLR: dec.clr    = 1'b1;
      OP_JMP: dec.jmp    = 1'b1;
      OP_JPN: dec.jpn    = 1'b1;
      OP_HLT: dec.hlt    = 1'b1;
      default: dec = '0;
    endcase
  end
endmodule
