// tb_portal_qc: one portal with its module, driven from all three terminals.
//
// The high capacity (HC) side is driven as a processor would: it keeps a
// module status flag updated once per microsecond from starts, start echoes
// and finish cycles, and starts only on a free module, at 0.25 us into a
// microsecond. The slow terminals raise a request and drive address and word
// while granted. Checked:
//   - a lone slow access waits the 1 us window, is echoed to the bus, and
//     repeated slow accesses come every 7 us;
//   - an HC start inside the window takes the module (preemption) and the
//     slow request is then served as the sneak access;
//   - during an HC access a queued request holds back the finish cycle; the
//     bus sees the finish of the sneak instead, 7 us later;
//   - with nothing queued the HC finish passes at 5.5 .. 6 us;
//   - low demand masks continuous demand; under constant three-way demand HC
//     and low demand alternate and continuous demand is shut out;
//   - all data read back equals what was written.
module tb_portal_qc;
  import g21_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [1:0] ph;
  timebase u_tb (.clk, .rst_n, .ph);

  logic              hc_start = 0, hc_we = 0;
  logic [ADDR_W-1:0] hc_addr = '0;
  logic [DATA_W-1:0] hc_wdata = '0;
  logic              hc_fin, hc_dav, hc_rvalid, hc_echo;
  logic [DATA_W-1:0] hc_rdata;
  logic              ld_req = 0, ld_we = 0, cd_req = 0, cd_we = 0;
  logic [ADDR_W-1:0] ld_addr = '0, cd_addr = '0;
  logic [DATA_W-1:0] ld_wdata = '0, cd_wdata = '0;
  logic              ld_gnt, ld_dav, ld_fin, cd_gnt, cd_dav, cd_fin;
  logic [DATA_W-1:0] ld_rdata, cd_rdata;
  logic              c_start, c_we, c_rvalid, c_dav, c_fin, c_idle, c_ready;
  logic [ADDR_W-1:0] c_addr;
  logic [DATA_W-1:0] c_wdata, c_rdata;
  logic              ev_sneak, ev_window, ev_preempt;

  portal_qc dut (
    .clk, .rst_n, .ph,
    .hc_start, .hc_addr, .hc_we, .hc_wdata, .hc_fin, .hc_dav, .hc_rdata, .hc_rvalid, .hc_echo,
    .ld_req, .ld_gnt, .ld_addr, .ld_we, .ld_wdata, .ld_rdata, .ld_dav, .ld_fin,
    .cd_req, .cd_gnt, .cd_addr, .cd_we, .cd_wdata, .cd_rdata, .cd_dav, .cd_fin,
    .core_start(c_start), .core_addr(c_addr), .core_we(c_we), .core_wdata(c_wdata),
    .core_rdata(c_rdata), .core_rvalid(c_rvalid), .core_dav(c_dav), .core_fin(c_fin), .core_idle(c_idle), .core_ready(c_ready),
    .sneak_o(ev_sneak), .window_o(ev_window), .preempt_o(ev_preempt));

  core_module u_core (.clk, .rst_n, .start(c_start), .addr(c_addr), .we(c_we), .wdata(c_wdata),
                      .rdata(c_rdata), .rvalid(c_rvalid), .dav(c_dav), .fin(c_fin), .idle(c_idle), .ready(c_ready));

  int checks = 0, failures = 0, tk = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", tk, what); end
  endtask

  // processor-side view of the module status
  logic status = 0, st_seen = 0, fin_seen = 0;
  always @(posedge clk) begin
    tk <= tk + 1;
    if (ph == 2'd3) begin
      status   <= (st_seen || hc_start || hc_echo) ? 1'b1 : ((fin_seen || hc_fin) ? 1'b0 : status);
      st_seen  <= 1'b0;
      fin_seen <= 1'b0;
    end else begin
      st_seen  <= st_seen  || hc_start || hc_echo;
      fin_seen <= fin_seen || hc_fin;
    end
  end

  // event logs
  int n_sneak = 0, n_window = 0, n_preempt = 0, n_echo = 0;
  int hcfin_tick [$]; int ldg_tick [$]; int cdg_tick [$]; int hcs_tick [$];
  logic hc_fin_q = 0, ld_gnt_q = 0, cd_gnt_q = 0, hc_start_q = 0;
  always @(posedge clk) begin
    hc_fin_q <= hc_fin; ld_gnt_q <= ld_gnt; cd_gnt_q <= cd_gnt; hc_start_q <= hc_start;
    if (hc_fin && !hc_fin_q)     hcfin_tick.push_back(tk);
    if (ld_gnt && !ld_gnt_q)     ldg_tick.push_back(tk);
    if (cd_gnt && !cd_gnt_q)     cdg_tick.push_back(tk);
    if (hc_start && !hc_start_q) hcs_tick.push_back(tk);
    if (ev_sneak)   n_sneak++;
    if (ev_window)  n_window++;
    if (ev_preempt) n_preempt++;
    if (hc_echo)    n_echo++;
  end

  // HC access: wait for a boundary with the status free, then run the bus
  // sequence; return the read word and wait for the finish cycle.
  task automatic hc_access(input bit w, input int a, input logic [DATA_W-1:0] d, output logic [DATA_W-1:0] q);
    bit got = 0;
    // the status is read during the first quarter of a microsecond
    do @(posedge clk iff ph == 2'd0); while (status);
    hc_start <= 1'b1; hc_addr <= ADDR_W'(a); hc_we <= w;
    @(posedge clk); @(posedge clk);                   // ph1, ph2
    hc_start <= 1'b0;
    @(posedge clk);                                   // ph3
    hc_wdata <= w ? d : '0;
    repeat (4) @(posedge clk);                        // bus busy microsecond
    hc_addr <= '0; hc_we <= 1'b0; hc_wdata <= '0;
    q = '0;
    while (!hc_fin) begin
      @(posedge clk);
      if (hc_dav && !got) begin q = hc_rdata; got = 1; end
    end
    @(posedge clk);
  endtask

  task automatic ld_access(input bit w, input int a, input logic [DATA_W-1:0] d, output logic [DATA_W-1:0] q);
    ld_req <= 1'b1;
    @(posedge clk iff ld_gnt);
    ld_req <= 1'b0; ld_addr <= ADDR_W'(a); ld_we <= w; ld_wdata <= d;
    q = '0;
    while (!ld_fin) begin @(posedge clk); if (ld_dav) q = ld_rdata; end
    @(posedge clk iff !ld_gnt);
    ld_addr <= '0; ld_we <= 1'b0; ld_wdata <= '0;
  endtask

  task automatic cd_access(input bit w, input int a, input logic [DATA_W-1:0] d, output logic [DATA_W-1:0] q);
    cd_req <= 1'b1;
    @(posedge clk iff cd_gnt);
    cd_req <= 1'b0; cd_addr <= ADDR_W'(a); cd_we <= w; cd_wdata <= d;
    q = '0;
    while (!cd_fin) begin @(posedge clk); if (cd_dav) q = cd_rdata; end
    @(posedge clk iff !cd_gnt);
    cd_addr <= '0; cd_we <= 1'b0; cd_wdata <= '0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] q, q1, q2;
    int k, nh, nl, nc;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (9) @(posedge clk);

    // ---- lone slow accesses: window, echo, 7 us period ----
    ldg_tick.delete();
    for (int i = 0; i < 4; i++) ld_access(1'b1, 10 + i, 32'h1D00_0000 + i, q);
    check(n_window == 4 && n_echo == 4, $sformatf("4 window starts echoed (%0d, %0d)", n_window, n_echo));
    check(ldg_tick.size() == 4, "4 grants");
    for (int i = 1; i < ldg_tick.size(); i++)
      check(ldg_tick[i] - ldg_tick[i-1] == 28, $sformatf("slow cycle %0d ticks, want 28 (7 us)", ldg_tick[i] - ldg_tick[i-1]));
    for (int i = 0; i < 4; i++) begin
      cd_access(1'b0, 10 + i, '0, q);
      check(q == 32'h1D00_0000 + i, $sformatf("display reads exchange word: %h", q));
    end
    repeat (40) @(posedge clk);

    // ---- HC access with nothing queued: finish passes at 5.5 us ----
    hcfin_tick.delete(); hcs_tick.delete();
    hc_access(1'b1, 20, 32'hC0DE_0020, q);
    check(hcfin_tick.size() == 1 && hcfin_tick[0] - hcs_tick[0] == 21, "HC finish 21 ticks after start");
    repeat (40) @(posedge clk);
    hc_access(1'b0, 20, '0, q);
    check(q == 32'hC0DE_0020, $sformatf("HC reads its word: %h", q));
    repeat (40) @(posedge clk);

    // ---- HC access with a queued display request: finish held, sneak ----
    hcfin_tick.delete(); hcs_tick.delete(); cdg_tick.delete();
    k = n_sneak;
    fork
      hc_access(1'b0, 11, '0, q);
      begin repeat (12) @(posedge clk); cd_access(1'b0, 20, '0, q1); end
    join
    check(q == 32'h1D00_0001, "HC read during sneak test");
    check(q1 == 32'hC0DE_0020, "display sneak read");
    check(n_sneak == k + 1, "one sneak");
    // the sneak's start goes to the module at completion (tick 28); its grant
    // is seen from the next tick
    check(cdg_tick.size() == 1 && cdg_tick[0] - hcs_tick[0] == 29, $sformatf("sneak granted at HC completion (%0d)", cdg_tick[0] - hcs_tick[0]));
    check(hcfin_tick.size() == 1 && hcfin_tick[0] - hcs_tick[0] == 28 + 21, "bus sees the sneak's finish");
    repeat (40) @(posedge clk);

    // ---- HC start inside the window: preemption, then sneak ----
    k = n_preempt;
    fork
      begin @(posedge clk iff ph == 2'd2); ld_access(1'b1, 30, 32'h0000_0030, q1); end
      begin @(posedge clk iff ph == 2'd2); hc_access(1'b1, 31, 32'h0000_0031, q); end
    join
    check(n_preempt == k + 1, "HC took the module inside the window");
    repeat (40) @(posedge clk);
    hc_access(1'b0, 30, '0, q);  check(q == 32'h30, "preempted slow write landed");
    hc_access(1'b0, 31, '0, q);  check(q == 32'h31, "preempting HC write landed");
    repeat (40) @(posedge clk);

    // ---- both slow terminals queued behind an HC access: LD first ----
    ldg_tick.delete(); cdg_tick.delete();
    fork
      hc_access(1'b0, 0, '0, q);
      begin repeat (8) @(posedge clk); cd_access(1'b0, 0, '0, q1); end
      begin repeat (9) @(posedge clk); ld_access(1'b0, 0, '0, q2); end
    join
    check(ldg_tick.size() == 1 && cdg_tick.size() == 1 && ldg_tick[0] < cdg_tick[0], "low demand masks continuous demand");
    repeat (40) @(posedge clk);

    // ---- constant three-way demand: HC and LD alternate, CD shut out ----
    nh = 0; nl = 0; nc = 0;
    hcs_tick.delete(); ldg_tick.delete(); cdg_tick.delete();
    cd_req <= 1'b1;
    fork
      begin for (int i = 0; i < 8; i++) begin hc_access(1'b0, i, '0, q); nh++; end end
      begin repeat (2) @(posedge clk); for (int i = 0; i < 10; i++) begin ld_access(1'b0, i, '0, q1); nl++; end end
    join_any
    disable fork;
    repeat (2) @(posedge clk);
    check(nh == 8, "all HC accesses served under three-way demand");
    check(ldg_tick.size() >= 7, $sformatf("low demand served between HC accesses (%0d)", ldg_tick.size()));
    check(cdg_tick.size() == 0, "continuous demand excluded by low demand");
    for (int i = 1; i < hcs_tick.size(); i++)
      check(hcs_tick[i] - hcs_tick[i-1] >= 52 && hcs_tick[i] - hcs_tick[i-1] <= 60, $sformatf("HC every ~14 us under ties (%0d)", hcs_tick[i] - hcs_tick[i-1]));
    ld_req <= 1'b0; ld_addr <= '0; ld_we <= 1'b0;
    // released, the display is served
    @(posedge clk iff cd_gnt);
    cd_req <= 1'b0;
    @(posedge clk iff cd_fin);
    check(1'b1, "display served once the exchange stops");
    repeat (40) @(posedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
