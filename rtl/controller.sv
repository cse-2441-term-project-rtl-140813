// controller: the TRISC control finite state machine.
//
// A Moore machine of twenty states, A to T, one clock per state. Each state
// drives a fixed control word; the registers of the datapath act on the
// rising edge that ends the state in which their control signal is high.
//   A        C0        clear PC (entered on reset)
//   B        C3        select the PC as RAM address
//   C, D     C3 C4     two RAM cycles: the instruction word appears on MDO
//   E        C2 C3 C7  load IR, increment PC, branch on the decoded opcode
//   INC: F   C9        CLR: G  C8        JMP: H  C1
//   LDA: I (address from MDO), J C4, K C4, L C11
//   STA: M (address from MDO), N C4 C5, O C4 C5
//   ADD: P (address from MDO), Q C4, R C4, S (ALU settles),
//        T C10 C11 C14 (BR takes the sum, ACC takes the BR)
// Every execute sequence returns to B. An instruction therefore takes 4
// fetch cycles plus 1 (INC, CLR, JMP), 3 (STA), 4 (LDA) or 5 (ADD).
// An opcode without an execute sequence leaves the machine in E, as in the
// original, where the next state is simply not updated; here C2 is then held
// low so that the PC is not advanced and the machine is halted on that
// instruction (halted = 1) until reset.
// rst_n is the active-low Start/Stop input: low forces state A.
// The state sequence and the signals per state follow the state diagram.
module controller
  import trisc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  decode_t dec,
  output ctrl_t   ctrl,
  output state_e  state,
  output logic    halted
);
  state_e next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_A;
    else        state <= next;
  end

  always_comb begin
    ctrl   = CTRL_NONE;
    next   = state;
    halted = 1'b0;
    unique case (state)
      S_A: begin ctrl.c0 = 1'b1; next = S_B; end
      S_B: begin ctrl.c3 = 1'b1; next = S_C; end
      S_C: begin ctrl.c3 = 1'b1; ctrl.c4 = 1'b1; next = S_D; end
      S_D: begin ctrl.c3 = 1'b1; ctrl.c4 = 1'b1; next = S_E; end
      S_E: begin
        ctrl.c3 = 1'b1;
        ctrl.c7 = 1'b1;
        ctrl.c2 = 1'b1;
        if      (dec.inc) next = S_F;
        else if (dec.clr) next = S_G;
        else if (dec.jmp) next = S_H;
        else if (dec.lda) next = S_I;
        else if (dec.sta) next = S_M;
        else if (dec.add) next = S_P;
        else begin
          ctrl.c2 = 1'b0;
          halted  = 1'b1;
          next    = S_E;
        end
      end
      S_F: begin ctrl.c9 = 1'b1; next = S_B; end
      S_G: begin ctrl.c8 = 1'b1; next = S_B; end
      S_H: begin ctrl.c1 = 1'b1; next = S_B; end
      S_I: next = S_J;
      S_J: begin ctrl.c4 = 1'b1; next = S_K; end
      S_K: begin ctrl.c4 = 1'b1; next = S_L; end
      S_L: begin ctrl.c11 = 1'b1; next = S_B; end
      S_M: next = S_N;
      S_N: begin ctrl.c4 = 1'b1; ctrl.c5 = 1'b1; next = S_O; end
      S_O: begin ctrl.c4 = 1'b1; ctrl.c5 = 1'b1; next = S_B; end
      S_P: next = S_Q;
      S_Q: begin ctrl.c4 = 1'b1; next = S_R; end
      S_R: begin ctrl.c4 = 1'b1; next = S_S; end
      S_S: next = S_T;
      S_T: begin
        ctrl.c10 = 1'b1;
        ctrl.c11 = 1'b1;
        ctrl.c14 = 1'b1;
        {ctrl.c12, ctrl.c13} = ALU_ADD;
        next = S_B;
      end
      default: next = S_A;
    endcase
  end

  // A RAM write is only meaningful inside a RAM cycle.
  a_write_in_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl.c5 |-> ctrl.c4);
  // At most one PC operation (clear, load, increment) per cycle.
  a_pc_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ctrl.c0, ctrl.c1, ctrl.c2}));
endmodule
