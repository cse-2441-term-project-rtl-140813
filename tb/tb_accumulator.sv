// tb_accumulator: random sequences of clear (C8), increment (C9), load from
// MDO (C11 with C10 = 0) and load from the ALU side (C11 with C10 = 1),
// compared every clock with a reference model.
module tb_accumulator;
  logic       clk = 1'b0, rst_n, sel_alu, inc, load, clear;
  logic [3:0] mdo, alu_in, q, model;
  int checks = 0, failures = 0, n_mdo = 0, n_alu = 0;

  accumulator dut (.clk(clk), .rst_n(rst_n), .mdo(mdo), .alu(alu_in), .sel_alu(sel_alu),
                   .inc(inc), .load(load), .clear(clear), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; sel_alu = 0; inc = 0; load = 0; clear = 0; mdo = 0; alu_in = 0;
    #12;
    checks++;
    if (q != 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    model = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      clear   = ($urandom_range(9) == 0);
      load    = ($urandom_range(2) == 0);
      inc     = ($urandom_range(1) == 0);
      sel_alu = 1'($urandom);
      mdo     = 4'($urandom);
      alu_in  = 4'($urandom);
      @(posedge clk);
      if (clear) model = 0;
      else if (load) begin
        if (sel_alu) begin model = alu_in; n_alu++; end
        else begin model = mdo; n_mdo++; end
      end
      else if (inc) model = model + 1;
      #1;
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL step %0d: q=%0d exp %0d", i, q, model);
      end
    end
    checks++;
    if (n_alu == 0 || n_mdo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
