// tb_proc_bus: random drives on the processor bus, checked against the OR
// of the drivers and the crossing of the request and bus-busy lines. Drives
// obey the bus rules (one processor at a time, one module on the read lines),
// so none of the bus assertions may fire.
module tb_proc_bus;
  import g21_pkg::*;
  localparam int NM = N_MODULES;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          qc_req [2], qc_busy [2], qc_promote [2], qc_demote [2], qc_we [2];
  logic [NM-1:0] qc_start [2];
  logic [ADDR_W-1:0] qc_addr [2];
  logic [DATA_W-1:0] qc_wdata [2];
  logic [NM-1:0] pt_fin, pt_dav, pt_echo, pt_rvalid;
  logic [DATA_W-1:0] pt_rdata [NM];
  logic          other_req [2], other_busy [2], promote_l, demote_l, we_l;
  logic [NM-1:0] start_hc, start_l, fin_l, dav_l;
  logic [ADDR_W-1:0] addr_l;
  logic [DATA_W-1:0] wdata_l, rd_l;

  proc_bus dut (.clk, .rst_n, .qc_req, .qc_busy, .qc_promote, .qc_demote, .qc_start, .qc_addr,
                .qc_we, .qc_wdata, .pt_fin, .pt_dav, .pt_echo, .pt_rvalid, .pt_rdata,
                .other_req, .other_busy, .promote_l, .demote_l, .start_hc, .start_l,
                .fin_l, .dav_l, .addr_l, .we_l, .wdata_l, .rd_l);

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
    int owner, reader, m;
    logic [DATA_W-1:0] rword;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 1000; i++) begin
      owner  = $urandom_range(0, 2);     // 2: nobody holds the bus
      reader = $urandom_range(0, NM);    // NM: no module reading
      m      = $urandom_range(0, NM - 1);
      rword  = $urandom;
      for (int p = 0; p < 2; p++) begin
        qc_req[p]     = 1'($urandom);
        qc_promote[p] = 1'($urandom);
        qc_demote[p]  = 1'($urandom);
        qc_busy[p]    = (owner == p);
        qc_start[p]   = (owner == p) ? NM'(1 << m) : '0;
        qc_addr[p]    = (owner == p) ? ADDR_W'($urandom) : '0;
        qc_we[p]      = (owner == p) ? 1'($urandom) : 1'b0;
        qc_wdata[p]   = (owner == p) ? DATA_W'($urandom) : '0;
      end
      pt_fin  = NM'($urandom);
      pt_dav  = NM'($urandom);
      pt_echo = NM'($urandom);
      for (int k = 0; k < NM; k++) begin
        pt_rvalid[k] = (k == reader);
        pt_rdata[k]  = (k == reader) ? rword : '0;
      end
      #1;
      check(other_req[0] == qc_req[1] && other_req[1] == qc_req[0], "request lines cross");
      check(other_busy[0] == qc_busy[1] && other_busy[1] == qc_busy[0], "bus busy crosses");
      check(promote_l == (qc_promote[0] | qc_promote[1]) && demote_l == (qc_demote[0] | qc_demote[1]), "priority lines");
      check(start_hc == (owner < 2 ? NM'(1 << m) : '0), "processor start lines");
      check(start_l == (start_hc | pt_echo), "status start lines include echoes");
      check(fin_l == pt_fin && dav_l == pt_dav, "module trio lines");
      check(addr_l == (owner < 2 ? qc_addr[owner] : '0), "address lines from the owner");
      check(wdata_l == (owner < 2 ? qc_wdata[owner] : '0) && we_l == (owner < 2 ? qc_we[owner] : 1'b0), "write lines from the owner");
      check(rd_l == (reader < NM ? rword : '0), "read lines from the reading module");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
