// tb_pipo_register: the BR/IR register. Checks that the output follows d
// while load is high (write-through), holds the captured value after load
// falls, and is cleared asynchronously by clr_n.
module tb_pipo_register;
  logic       clk = 1'b0, clr_n, load;
  logic [3:0] d, q, held;
  int checks = 0, failures = 0;

  pipo_register #(.N(4)) dut (.clk(clk), .clr_n(clr_n), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (q=%0d)", what, q); end
  endtask

  initial begin
    clr_n = 1'b0; load = 0; d = 4'hA;
    #3;
    check(q == 0, "cleared");
    #10 clr_n = 1'b1;
    held = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load = 1'($urandom);
      d    = 4'($urandom);
      #1;
      check(q == (load ? d : held), "write-through / hold before edge");
      @(posedge clk);
      if (load) held = d;
      #1;
      d = ~d;        // input changes after the edge must not matter when not loading
      #1;
      if (!load) check(q == held, "hold after edge");
    end
    // Asynchronous clear between edges.
    @(negedge clk);
    load = 0;
    #2 clr_n = 1'b0;
    #1;
    check(q == 0, "asynchronous clear");
    clr_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
