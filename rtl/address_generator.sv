// address_generator: the RAM address counter of TRISC's program-load mode.
//
// Every press of the load key (step, a one-clock strobe) gives the RAM one
// clock: the first writes the switch data and the second shows it on the
// data-out display. A divide-by-two toggle flip-flop counts the presses and
// the 4-bit address counter advances on every second one, when the toggle
// returns from 1 to 0. clear_n (active low, asynchronous) sets the address
// and the toggle to 0. The toggle-plus-counter structure follows the
// original; the synchronous strobe and the clearing of the toggle are this
// design's choices.
module address_generator (
  input  logic       clk,
  input  logic       clear_n,
  input  logic       step,
  output logic [3:0] addr
);
  logic toggle;

  always_ff @(posedge clk or negedge clear_n) begin
    if (!clear_n)  toggle <= 1'b0;
    else if (step) toggle <= ~toggle;
  end

  up_counter #(.N(4)) u_cnt (
    .clk  (clk),
    .rst_n(clear_n),
    .clear(1'b0),
    .load (1'b0),
    .inc  (step & toggle),
    .d    (4'd0),
    .q    (addr)
  );
endmodule
