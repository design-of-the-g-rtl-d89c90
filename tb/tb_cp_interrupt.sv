// tb_cp_interrupt: random raises and acknowledges from both processors,
// checked against a reference model of the two pending flags.
module tb_cp_interrupt;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [1:0] raise = '0, ack = '0, pending;
  cp_interrupt dut (.clk, .rst_n, .raise, .ack, .pending);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] model = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1 check(pending == '0, "nothing pending after reset");
    for (int i = 0; i < 2000; i++) begin
      raise = 2'($urandom_range(0, 3) == 0 ? $urandom : 0);
      ack   = 2'($urandom);
      @(posedge clk);
      for (int j = 0; j < 2; j++)
        if (raise[1-j]) model[j] = 1'b1; else if (ack[j]) model[j] = 1'b0;
      #1 check(pending == model, $sformatf("pending %b want %b", pending, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
