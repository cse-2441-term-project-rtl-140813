// ripple_carry_adder: N-bit two's-complement adder/subtractor.
//
// A chain of full adders. With sub = 0 it computes a + b; with sub = 1 each
// bit of b is inverted and sub is fed in as the carry into bit 0, giving
// a - b = a + ~b + 1. cout is the carry out of the top bit; ovr flags signed
// overflow as the XOR of the carries into and out of the top bit. This is the
// structure of the original adder; the width N (default 4) is a parameter.
// Combinational, no clock.
module ripple_carry_adder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,
  output logic [N-1:0] s,
  output logic         ovr,
  output logic         cout
);
  logic [N:0] c;

  assign c[0] = sub;

  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i] ^ sub),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[N];
  assign ovr  = c[N-1] ^ c[N];
endmodule
