// pipo_register: N-bit parallel-in/parallel-out register with load and
// clear. TRISC uses it twice: as the buffer register BR between the ALU and
// the accumulator (load = C14) and as the instruction register IR holding the
// opcode MDO[7:4] (load = C7). Both are cleared by the Start/Stop input.
//
// The stored value is captured on a rising clock edge while load is high and
// cleared asynchronously while clr_n is low. The output is write-through:
// while load is high, q already shows d. That gives the behaviour the
// controller's state table relies on, where a register loaded in a state is
// used in that same state: the decode state E branches on the opcode the IR
// is loading, and state T loads the ACC from the BR while the BR is loading
// the ALU result. The write-through output is this design's reading of the
// original register, which was loaded by the level of its control line.
module pipo_register #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic         load,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  logic [N-1:0] r;

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n)    r <= '0;
    else if (load) r <= d;
  end

  assign q = load ? d : r;
endmodule
