// trisc_pkg: types and constants shared by the TRISC modules.
//
// TRISC is a 4-bit accumulator machine with an 8-bit instruction word
// {opcode[3:0], address[3:0]} held in a 16 x 8 RAM. This package defines the
// opcode encoding, the one-hot lines of the four-to-eleven instruction
// decoder, the control word C0..C14 (there is no C6) and the controller's
// state names A..T with their encodings 0..19.
package trisc_pkg;

  // Opcodes. LDA, STA, ADD, INC, CLR and JMP are the executed instruction
  // set. SUB and XOR are decoded but have no execute sequence in the
  // controller.
  typedef enum logic [3:0] {
    OP_LDA = 4'b0000,
    OP_STA = 4'b0001,
    OP_ADD = 4'b0010,
    OP_SUB = 4'b0011,
    OP_XOR = 4'b0100,
    OP_INC = 4'b0110,
    OP_CLR = 4'b0111,
    OP_JMP = 4'b1000
  } opcode_e;

  // Further decoder input codes (no execute sequence in the controller).
  localparam logic [3:0] OP_JPN = 4'b1100;
  localparam logic [3:0] OP_HLT = 4'b1001;

  // One-hot outputs of the instruction decoder, in the decoder's bit order.
  typedef struct packed {
    logic lda;
    logic sta;
    logic add;
    logic sub;
    logic xor_op;
    logic inc;
    logic clr;
    logic jmp;
    logic jpz;
    logic jpn;
    logic hlt;
  } decode_t;

  // Control word. Field meanings (all active high):
  //   c0  clear PC                  c8  clear ACC
  //   c1  load PC from MDO[3:0]     c9  increment ACC
  //   c2  increment PC              c10 ACC source: 0 = MDO, 1 = ALU via BR
  //   c3  RAM address: 0 = MDO[3:0], 1 = PC
  //   c4  RAM cycle (clock enable)  c11 load ACC
  //   c5  RAM write enable          c12, c13 ALU function (see alu_fn_e)
  //   c7  load IR                   c14 load BR
  typedef struct packed {
    logic c0;
    logic c1;
    logic c2;
    logic c3;
    logic c4;
    logic c5;
    logic c7;
    logic c8;
    logic c9;
    logic c10;
    logic c11;
    logic c12;
    logic c13;
    logic c14;
  } ctrl_t;

  localparam ctrl_t CTRL_NONE = '0;

  // ALU function code {C12, C13}; C12 drives the ALU's S0, C13 its S1.
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b10,
    ALU_AND = 2'b01,
    ALU_XOR = 2'b11
  } alu_fn_e;

  // Controller states with the encodings of the original state table.
  typedef enum logic [4:0] {
    S_A = 5'd0,  S_B = 5'd1,  S_C = 5'd2,  S_D = 5'd3,  S_E = 5'd4,
    S_F = 5'd5,  S_G = 5'd6,  S_H = 5'd7,  S_I = 5'd8,  S_J = 5'd9,
    S_K = 5'd10, S_L = 5'd11, S_M = 5'd12, S_N = 5'd13, S_O = 5'd14,
    S_P = 5'd15, S_Q = 5'd16, S_R = 5'd17, S_S = 5'd18, S_T = 5'd19
  } state_e;

endpackage
