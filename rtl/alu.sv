// alu: 4-bit arithmetic/logic unit of TRISC.
//
// Operand a is the accumulator (the MDI bus), operand b is MDO[3:0]. The
// select inputs come from the control word: s0 = C12, s1 = C13.
//   s1 s0 = 0 0  r = a + b        0 1  r = a - b
//           1 0  r = a & b        1 1  r = a ^ b
// Addition and subtraction use the ripple-carry adder with s0 as its
// subtract input; for the logic functions ovr and cout are forced to 0.
// This follows the original ALU. The controller only ever selects ADD.
// Combinational, no clock.
module alu (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       s0,
  input  logic       s1,
  output logic [3:0] r,
  output logic       ovr,
  output logic       cout
);
  logic [3:0] sum;
  logic       add_ovr;
  logic       add_cout;

  ripple_carry_adder #(.N(4)) u_rca (
    .a   (a),
    .b   (b),
    .sub (s0),
    .s   (sum),
    .ovr (add_ovr),
    .cout(add_cout)
  );

  always_comb begin
    if (!s1) begin
      r    = sum;
      ovr  = add_ovr;
      cout = add_cout;
    end else begin
      r    = s0 ? (a ^ b) : (a & b);
      ovr  = 1'b0;
      cout = 1'b0;
    end
  end
endmodule
