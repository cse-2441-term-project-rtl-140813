// ram16x8: the TRISC main memory, 16 words of 8 bits (parameterised as
// 2^AW words of DW bits).
//
// A synchronous single-port RAM with a registered address and a registered
// output, advanced only on rising clock edges where the clock enable en is
// high (en = C4 in run mode, the load key strobe in program-load mode). On
// such an edge the RAM writes data to mem[addr] if we is high, captures addr
// into its address register and captures mem[address register] into q. A
// read therefore takes two enabled edges, which is why the controller holds
// C4 for two states in every memory access (C, D for fetch; J, K; N, O; Q, R).
// A write takes effect on the first enabled edge. The size, the two
// registered stages and the enable gating of the clock by C4 follow the
// original memory; the memory itself is written here as a plain array and
// powers up with undefined contents.
module ram16x8 #(
  parameter int unsigned AW = 4,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] data,
  output logic [DW-1:0] q
);
  logic [DW-1:0] mem [2**AW];
  logic [AW-1:0] addr_r;

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= data;
      addr_r <= addr;
      q      <= mem[addr_r];
    end
  end
endmodule
