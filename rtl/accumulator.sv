// accumulator: the 4-bit TRISC accumulator (ACC).
//
// A two-to-one mux picks the value to load: mdo (the low nibble of the RAM
// data out bus) when sel_alu = 0, or alu (the buffer register output carrying
// the ALU result) when sel_alu = 1. The mux feeds an up counter, so on a
// rising clock edge the ACC clears (clear = C8), else loads the mux output
// (load = C11, select = C10), else increments (inc = C9), else holds. The
// mux-plus-counter structure and the priority are the original's; the
// synchronous enables and the asynchronous reset rst_n are this design's.
// The select polarity (0 = MDO, 1 = ALU) is the one the controller's state
// sequence needs: LDA loads with C10 low and ADD with C10 high.
module accumulator (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] mdo,
  input  logic [3:0] alu,
  input  logic       sel_alu,
  input  logic       inc,
  input  logic       load,
  input  logic       clear,
  output logic [3:0] q
);
  logic [3:0] src;

  assign src = sel_alu ? alu : mdo;

  up_counter #(.N(4)) u_cnt (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(clear),
    .load (load),
    .inc  (inc),
    .d    (src),
    .q    (q)
  );
endmodule
