// tb_mem_protect: random loads of the protection register from either
// processor and random accesses; a write into a module whose bit is 0 must be
// refused with a one-cycle interrupt, everything else passed. The expected
// register contents are tracked independently in the testbench.
module tb_mem_protect;
  import g21_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]           load_en = '0, chk_req = '0, chk_we = '0;
  logic [N_MODULES-1:0] load_val [2];
  logic [MOD_W-1:0]     chk_mod  [2];
  logic [1:0]           illegal, irq;
  logic [N_MODULES-1:0] unprot;

  mem_protect dut (.clk, .rst_n, .load_en, .load_val, .chk_req, .chk_mod, .chk_we, .illegal, .irq, .unprot);

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
    logic [N_MODULES-1:0] model = '0;
    logic [1:0] prev_ill = '0;
    bit want;
    load_val[0] = '0; load_val[1] = '0; chk_mod[0] = '0; chk_mod[1] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1 check(unprot == '0, "all modules protected after reset");
    for (int i = 0; i < 2000; i++) begin
      load_en     = 2'($urandom_range(0, 7) == 0 ? $urandom : 0);
      load_val[0] = N_MODULES'($urandom);
      load_val[1] = N_MODULES'($urandom);
      chk_req     = 2'($urandom);
      chk_we      = 2'($urandom);
      chk_mod[0]  = MOD_W'($urandom);
      chk_mod[1]  = MOD_W'($urandom);
      #1;
      for (int p = 0; p < 2; p++) begin
        want = chk_req[p] && chk_we[p] && !model[chk_mod[p]];
        check(illegal[p] == want, $sformatf("illegal[%0d] mod %0d we %0d reg %b", p, chk_mod[p], chk_we[p], model));
        check(irq[p] == (want && !prev_ill[p]), "interrupt pulses on the first refused cycle");
        prev_ill[p] = want;
      end
      @(posedge clk);
      if (load_en[0]) model = load_val[0];
      else if (load_en[1]) model = load_val[1];
      #1 check(unprot == model, "register contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
