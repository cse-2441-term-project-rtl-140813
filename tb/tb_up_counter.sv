// tb_up_counter: random clear/load/increment sequences on the 4-bit counter
// (the program counter), compared every clock with a reference that applies
// the priority clear > load > increment; also checks the asynchronous reset
// and the wrap from 15 to 0.
module tb_up_counter;
  logic       clk = 1'b0, rst_n, clear, load, inc;
  logic [3:0] d, q;
  logic [3:0] model;
  int checks = 0, failures = 0, wraps = 0;

  up_counter #(.N(4)) dut (.clk(clk), .rst_n(rst_n), .clear(clear), .load(load),
                           .inc(inc), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; clear = 0; load = 0; inc = 0; d = 0;
    #12;
    checks++;
    if (q != 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    model = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      clear = ($urandom_range(9) == 0);
      load  = ($urandom_range(4) == 0);
      inc   = ($urandom_range(1) == 0);
      d     = 4'($urandom);
      @(posedge clk);
      if (clear)     model = 0;
      else if (load) model = d;
      else if (inc) begin if (model == 15) wraps++; model = model + 1; end
      #1;
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL step %0d: q=%0d exp %0d", i, q, model);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
