// up_counter: N-bit binary up counter with clear, parallel load and
// increment. It is the TRISC program counter (and the counter inside the
// accumulator and the program-load address generator).
//
// On a rising clock edge: clear has priority and sets q to 0, else load
// copies d, else inc adds 1 (wrapping modulo 2^N), else q holds. The priority
// clear > load > increment is the original counter's. The original counter
// was clocked by the falling edges of its active-low control lines; here all
// three are synchronous, active-high enables of one clock, and rst_n is an
// asynchronous active-low reset to 0 added so that the register never starts
// unknown. Ports: clk, rst_n, clear, load, inc, d[N-1:0] in; q[N-1:0] out.
module up_counter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         load,
  input  logic         inc,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clear) q <= '0;
    else if (load)  q <= d;
    else if (inc)   q <= q + 1'b1;
  end
endmodule
