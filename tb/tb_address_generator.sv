// tb_address_generator: the program-load address advances once per two
// load-key strobes, wraps after 15, ignores clocks without a strobe and is
// cleared by clear_n.
module tb_address_generator;
  logic       clk = 1'b0, clear_n, step;
  logic [3:0] addr;
  int checks = 0, failures = 0, steps = 0;

  address_generator dut (.clk(clk), .clear_n(clear_n), .step(step), .addr(addr));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear_n = 1'b0; step = 0;
    #12 clear_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      step = 1'($urandom);
      @(posedge clk);
      if (step) steps++;
      #1;
      checks++;
      if (int'(addr) != (steps / 2) % 16) begin
        failures++;
        $display("FAIL after %0d strobes addr=%0d", steps, addr);
      end
      if (i == 200) begin
        clear_n = 1'b0; #1;
        checks++;
        if (addr != 0) begin failures++; $display("FAIL clear"); end
        steps = 0;
        #1 clear_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
