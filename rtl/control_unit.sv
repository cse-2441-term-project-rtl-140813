// control_unit: the TRISC control unit, an instruction decoder feeding the
// controller state machine.
//
// The 4-bit opcode from the instruction register is decoded into eleven
// one-hot lines, and the controller turns those and its state into the
// control word C0..C14 (see controller). Clocked by clk; rst_n is the
// active-low Start/Stop input. The structure is the original's; state and
// halted are brought out for observation.
module control_unit
  import trisc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] ir,
  output ctrl_t      ctrl,
  output state_e     state,
  output logic       halted
);
  decode_t dec;

  instruction_decoder u_id (
    .opcode(ir),
    .dec   (dec)
  );

  controller u_ctl (
    .clk   (clk),
    .rst_n (rst_n),
    .dec   (dec),
    .ctrl  (ctrl),
    .state (state),
    .halted(halted)
  );
endmodule
