// tb_core_module: self-checking test of one memory module.
//
// Writes random words to random addresses, reads them back and compares them
// with a reference copy kept in the testbench. For every access it measures,
// in ticks from the start edge, where the read lines, data available and
// finish cycle pulses fall (read lines 7..14, data available 12..13, finish
// 20..21, completion after tick 27) and checks that a start issued 24 ticks
// (6 us) after the previous one - the contiguous-access rate - is accepted.
module tb_core_module;
  import g21_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start = 1'b0, we = 1'b0;
  logic [ADDR_W-1:0] addr = '0;
  logic [DATA_W-1:0] wdata = '0;
  logic [DATA_W-1:0] rdata;
  logic              rvalid, dav, fin, idle, ready;

  core_module dut (.clk, .rst_n, .start, .addr, .we, .wdata, .rdata, .rvalid, .dav, .fin, .idle, .ready);

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] ref_mem [logic [ADDR_W-1:0]];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One access started at the current tick; returns the word on the read
  // lines at data available. If gap > 0, the next start follows gap ticks
  // after this one without waiting for completion.
  task automatic access(input bit w, input logic [ADDR_W-1:0] a, input logic [DATA_W-1:0] d,
                        output logic [DATA_W-1:0] got);
    int t_rv_first = -1, t_rv_last = -1, t_dav_first = -1, t_dav_last = -1;
    int t_fin_first = -1, t_fin_last = -1;
    got = '0;
    start <= 1'b1; we <= w; addr <= a; wdata <= d;
    for (int c = 0; c < 24; c++) begin
      @(posedge clk);
      if (c == 1) start <= 1'b0;
      // the user drives address and word for the first two microseconds
      if (c == 7) begin addr <= '0; wdata <= '0; we <= 1'b0; end
      #1;
      if (rvalid) begin if (t_rv_first < 0) t_rv_first = c + 1; t_rv_last = c + 1; end
      if (dav) begin
        if (t_dav_first < 0) begin t_dav_first = c + 1; got = rdata; end
        t_dav_last = c + 1;
      end
      if (fin) begin if (t_fin_first < 0) t_fin_first = c + 1; t_fin_last = c + 1; end
    end
    if (!w) begin
      check(t_rv_first == C_RD_FIRST && t_rv_last == C_RD_LAST, $sformatf("read lines %0d..%0d", t_rv_first, t_rv_last));
    end else begin
      check(t_rv_first == -1, "read lines idle on a write");
    end
    check(t_dav_first == C_DAV_FIRST && t_dav_last == C_DAV_LAST, $sformatf("data available %0d..%0d", t_dav_first, t_dav_last));
    check(t_fin_first == C_FIN_FIRST && t_fin_last == C_FIN_LAST, $sformatf("finish %0d..%0d", t_fin_first, t_fin_last));
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] got;
    logic [ADDR_W-1:0] a;
    logic [DATA_W-1:0] d;
    logic [ADDR_W-1:0] addrs [64];
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(idle, "idle after reset");
    // contiguous writes: each start 24 ticks (6 us) after the previous
    for (int i = 0; i < 64; i++) begin
      a = ADDR_W'($urandom);
      if (i == 0) a = '0;
      if (i == 1) a = '1;
      d = $urandom;
      addrs[i] = a;
      ref_mem[a] = d;
      access(1'b1, a, d, got);
    end
    // contiguous reads back
    for (int i = 0; i < 64; i++) begin
      access(1'b0, addrs[i], '0, got);
      check(got == ref_mem[addrs[i]], $sformatf("read %h: got %h want %h", addrs[i], got, ref_mem[addrs[i]]));
    end
    // let the last cycle complete: idle at tick 28 after the start
    repeat (3) @(posedge clk);
    #1 check(!idle, "still busy at tick 27");
    @(posedge clk); #1 check(idle, "idle after completion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
