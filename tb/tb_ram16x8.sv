// tb_ram16x8: the 16 x 8 RAM. Writes random words to every address, then
// reads them back with the two-enabled-edge read (address edge, then data
// edge), checks that edges with en low change nothing, and that a write
// with en low is ignored.
module tb_ram16x8;
  logic       clk = 1'b0, en, we;
  logic [3:0] addr;
  logic [7:0] data, q, prev_q;
  logic [7:0] model [16];
  int checks = 0, failures = 0;

  ram16x8 #(.AW(4), .DW(8)) dut (.clk(clk), .en(en), .we(we), .addr(addr), .data(data), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(input logic e, input logic w, input logic [3:0] a, input logic [7:0] dd);
    @(negedge clk);
    en = e; we = w; addr = a; data = dd;
    @(negedge clk);
    en = 0; we = 0;
  endtask

  initial begin
    en = 0; we = 0; addr = 0; data = 0;
    for (int a = 0; a < 16; a++) begin
      model[a] = 8'($urandom);
      tick(1, 1, 4'(a), model[a]);
    end
    for (int round = 0; round < 3; round++)
      for (int a = 0; a < 16; a++) begin
        int b;
        b = $urandom_range(15);
        tick(1, 0, 4'(b), 8'h00);   // address edge
        prev_q = q;
        tick(0, 0, 4'(a), 8'h00);   // disabled edge: nothing moves
        checks++;
        if (q != prev_q) begin failures++; $display("FAIL q moved with en low"); end
        tick(1, 0, 4'(a), 8'h00);   // data edge: q = word at b
        checks++;
        if (q != model[b]) begin
          failures++;
          $display("FAIL read %0d: %02h exp %02h", b, q, model[b]);
        end
      end
    // A write with en low is ignored.
    tick(0, 1, 4'd5, ~model[5]);
    tick(1, 0, 4'd5, 8'h00);
    tick(1, 0, 4'd5, 8'h00);
    checks++;
    if (q != model[5]) begin failures++; $display("FAIL disabled write took effect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
