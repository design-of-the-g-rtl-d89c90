// tb_bus_qc: two bus queue controls on one bus, against the timing charts.
//
// Processor 0 is master, processor 1 slave. The modules are modelled in the
// testbench by their line behaviour only: a start at tick T gives read lines
// at T+7..14, data available at T+12..13 and a finish cycle on the bus at
// T+21..22; the write word is taken at T+6. Scenarios, times in microseconds
// from a boundary t0 (4 ticks each):
//   basic access:   request 0..1, start 0.25..0.75, bus busy 1..2, module
//                   status busy 1..6;
//   second request at t0+2 or t0+1 for another module: its start at t0+2.25;
//   simultaneous requests for two modules: master first, slave at t0+2.25,
//                   a tie lost by the slave;
//   both processors hammering one module: starts every 6 us, master first,
//                   then strictly alternating; the slave promotes itself.
// Read data is compared with the words written earlier.
module tb_bus_qc;
  import g21_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [1:0] ph;
  timebase u_tb (.clk, .rst_n, .ph);

  localparam int NM = N_MODULES;

  logic              cpu_req   [2];
  logic [MOD_W-1:0]  cpu_mod   [2];
  logic [ADDR_W-1:0] cpu_addr  [2];
  logic              cpu_we    [2];
  logic [DATA_W-1:0] cpu_wdata [2];
  logic [DATA_W-1:0] cpu_rdata [2];
  logic              cpu_done  [2];
  logic              breq [2], bbusy [2], prom [2], dem [2];
  logic [NM-1:0]     st [2];
  logic [ADDR_W-1:0] ad [2];
  logic              wl [2];
  logic [DATA_W-1:0] wd [2];
  logic [NM-1:0]     mbusy [2];
  logic              prio [2], ev_tie [2], ev_wb [2], ev_idle [2], ev_prom [2];

  logic [NM-1:0]     start_l, fin_l, dav_l;
  logic [DATA_W-1:0] rd_l;
  logic [ADDR_W-1:0] addr_l;
  logic              we_l;
  logic [DATA_W-1:0] wdata_l;
  assign start_l = st[0] | st[1];
  assign addr_l  = ad[0] | ad[1];
  assign we_l    = wl[0] | wl[1];
  assign wdata_l = wd[0] | wd[1];

  for (genvar p = 0; p < 2; p++) begin : g_qc
    bus_qc dut (
      .clk, .rst_n, .ph, .is_master(p == 0),
      .cpu_req(cpu_req[p]), .cpu_mod(cpu_mod[p]), .cpu_addr(cpu_addr[p]), .cpu_we(cpu_we[p]),
      .cpu_wdata(cpu_wdata[p]), .cpu_rdata(cpu_rdata[p]), .cpu_done(cpu_done[p]),
      .bus_req(breq[p]), .bus_busy(bbusy[p]), .other_req(breq[1-p]), .other_busy(bbusy[1-p]),
      .promote_o(prom[p]), .demote_o(dem[p]), .promote_i(prom[0] | prom[1]), .demote_i(dem[0] | dem[1]),
      .start_o(st[p]), .start_l, .fin_l, .dav_l, .addr_o(ad[p]), .we_o(wl[p]), .wdata_o(wd[p]),
      .rd_l, .mod_busy_o(mbusy[p]), .prio_o(prio[p]), .tie_lost_o(ev_tie[p]),
      .wait_busy_o(ev_wb[p]), .idle_o(ev_idle[p]), .promote_self_o(ev_prom[p]));
  end

  // ---- module line model ----
  int                tk = 0;
  int                mcnt [NM];
  logic [ADDR_W-1:0] maddr [NM];
  logic              mwe [NM];
  logic [DATA_W-1:0] mword [NM];
  logic [DATA_W-1:0] store [int];
  logic [NM-1:0]     start_q;
  always @(posedge clk) begin
    tk <= tk + 1;
    start_q <= start_l;
    for (int m = 0; m < NM; m++) begin
      if (start_l[m] && !start_q[m]) mcnt[m] <= 1;
      else if (mcnt[m] > 0 && mcnt[m] < 28) mcnt[m] <= mcnt[m] + 1;
      else mcnt[m] <= 0;
      if (mcnt[m] == 3) begin
        maddr[m] <= addr_l; mwe[m] <= we_l;
        mword[m] <= store.exists(m * 8192 + int'(addr_l)) ? store[m * 8192 + int'(addr_l)] : 32'hDEAD_0000;
      end
      if (mcnt[m] == 6 && mwe[m]) store[m * 8192 + int'(maddr[m])] = wdata_l;
    end
  end
  always_comb begin
    rd_l = '0;
    for (int m = 0; m < NM; m++) begin
      dav_l[m] = mcnt[m] inside {[12:13]};
      fin_l[m] = mcnt[m] inside {[21:22]};
      if (mcnt[m] inside {[7:14]} && !mwe[m]) rd_l |= mword[m];
    end
  end

  // ---- checking ----
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", tk, what); end
  endtask

  // start log: tick of each start edge and who issued it
  int s_tick [$]; int s_who [$]; int s_mod [$];
  logic [NM-1:0] st_q [2];
  always @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      st_q[p] <= st[p];
      for (int m = 0; m < NM; m++)
        if (st[p][m] && !st_q[p][m]) begin s_tick.push_back(tk); s_who.push_back(p); s_mod.push_back(m); end
    end
  end
  int n_tie [2], n_prom [2], n_idle [2], n_wb [2];
  always @(posedge clk) for (int p = 0; p < 2; p++) begin
    if (ev_tie[p])  n_tie[p]++;
    if (ev_prom[p]) n_prom[p]++;
    if (ev_idle[p]) n_idle[p]++;
    if (ev_wb[p])   n_wb[p]++;
  end

  // wait for the edge that begins a microsecond (ph becomes 0)
  task automatic to_boundary();
    @(posedge clk iff ph == 2'd3);
  endtask

  task automatic access(input int p, input int m, input int a, input bit w, input logic [DATA_W-1:0] d,
                        output logic [DATA_W-1:0] q);
    cpu_req[p] <= 1'b1; cpu_mod[p] <= MOD_W'(m); cpu_addr[p] <= ADDR_W'(a); cpu_we[p] <= w; cpu_wdata[p] <= d;
    @(posedge clk iff cpu_done[p]);
    q = cpu_rdata[p];
    cpu_req[p] <= 1'b0;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] q, q1;
    int t0, n;
    for (int p = 0; p < 2; p++) begin
      cpu_req[p] = 1'b0; cpu_mod[p] = '0; cpu_addr[p] = '0; cpu_we[p] = 1'b0; cpu_wdata[p] = '0;
    end
    for (int m = 0; m < NM; m++) mcnt[m] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (8) @(posedge clk);
    check(prio[0] && !prio[1], "priority starts with the master");

    // ---- basic access (write, then read back): Figure 4 timing ----
    to_boundary(); t0 = tk + 1;
    fork
      access(0, 2, 100, 1'b1, 32'hCAFE_0001, q);
      begin
        @(posedge clk); check(breq[0] && !bbusy[0], "request during 0..0.25");
        @(posedge clk); check(st[0][2], "start at 0.25");
        @(posedge clk); check(st[0][2], "start at 0.5");
        @(posedge clk); check(!st[0][2] && breq[0], "start over by 0.75, request held");
        @(posedge clk); check(!breq[0] && bbusy[0], "bus busy 1..2");
        check(mbusy[0][2] && mbusy[1][2], "module status busy at 1");
        repeat (3) @(posedge clk); check(bbusy[0], "bus busy until 2");
        @(posedge clk); check(!bbusy[0], "bus free at 2");
        repeat (15) @(posedge clk); check(mbusy[0][2], "module busy at 5.75");
        @(posedge clk); check(!mbusy[0][2] && !mbusy[1][2], "module free at 6");
      end
    join
    repeat (30) @(posedge clk);
    to_boundary();
    access(1, 2, 100, 1'b0, '0, q);
    check(q == 32'hCAFE_0001, $sformatf("slave reads the master's word: %h", q));
    repeat (30) @(posedge clk);

    // ---- second request at t0+2 for another module: Figure 5(a) ----
    s_tick.delete(); s_who.delete(); s_mod.delete();
    to_boundary(); t0 = tk + 1;
    fork
      access(0, 1, 5, 1'b1, 32'h1111_0005, q);
      begin repeat (8) @(posedge clk); access(1, 3, 6, 1'b1, 32'h3333_0006, q1); end
    join
    check(s_tick.size() == 2 && s_tick[0] == t0 + 1 && s_who[0] == 0 && s_tick[1] == t0 + 9 && s_who[1] == 1,
          "5(a): starts at 0.25 (master) and 2.25 (slave)");
    repeat (40) @(posedge clk);

    // ---- second request at t0+1, during bus busy: Figure 5(b) ----
    s_tick.delete(); s_who.delete(); s_mod.delete();
    to_boundary(); t0 = tk + 1;
    fork
      access(0, 4, 7, 1'b0, '0, q);
      begin repeat (4) @(posedge clk); access(1, 5, 8, 1'b0, '0, q1); end
    join
    check(s_tick.size() == 2 && s_tick[0] == t0 + 1 && s_tick[1] == t0 + 9 && s_who[1] == 1,
          "5(b): slave start at 2.25");
    check(n_wb[1] > 0, "slave waited on bus busy");
    repeat (40) @(posedge clk);

    // ---- simultaneous requests, two modules: Figure 5(c) ----
    s_tick.delete(); s_who.delete(); s_mod.delete();
    n_tie[1] = 0;
    to_boundary(); t0 = tk + 1;
    fork
      access(0, 1, 5, 1'b0, '0, q);
      access(1, 3, 6, 1'b0, '0, q1);
    join
    check(s_tick.size() == 2 && s_who[0] == 0 && s_tick[0] == t0 + 1 && s_who[1] == 1 && s_tick[1] == t0 + 9,
          "5(c): master first, slave at 2.25");
    check(n_tie[1] == 1, "slave lost one tie");
    check(q == 32'h1111_0005 && q1 == 32'h3333_0006, $sformatf("5(c) read data %h %h", q, q1));
    check(prio[0] && !prio[1], "no promotion without a busy module");
    repeat (40) @(posedge clk);

    // ---- both processors hammer one module: Figure 6 ----
    s_tick.delete(); s_who.delete(); s_mod.delete();
    n_prom[1] = 0;
    to_boundary(); t0 = tk + 1;
    n = 12;
    fork
      for (int i = 0; i < n; i++) access(0, 6, 100 + i, 1'b1, 32'hA000_0000 + i, q);
      for (int i = 0; i < n; i++) access(1, 6, 200 + i, 1'b1, 32'hB000_0000 + i, q1);
    join
    check(s_tick.size() == 2 * n, $sformatf("all %0d accesses started", 2 * n));
    check(s_who[0] == 0 && s_tick[0] == t0 + 1, "master wins the first tie");
    for (int i = 1; i < s_tick.size(); i++) begin
      check(s_tick[i] - s_tick[i-1] == 24, $sformatf("start %0d after 6 us (got %0d ticks)", i, s_tick[i] - s_tick[i-1]));
      check(s_who[i] != s_who[i-1], $sformatf("start %0d alternates", i));
    end
    check(n_prom[1] >= n - 1, $sformatf("slave promoted itself %0d times", n_prom[1]));
    repeat (40) @(posedge clk);
    // read back the hammered words
    for (int i = 0; i < n; i += 5) begin
      access(0, 6, 200 + i, 1'b0, '0, q);
      check(q == 32'hB000_0000 + i, "hammered word from the slave");
      access(1, 6, 100 + i, 1'b0, '0, q);
      check(q == 32'hA000_0000 + i, "hammered word from the master");
    end

    // ---- a single processor streaming one module: 6 us per access ----
    s_tick.delete(); s_who.delete(); s_mod.delete();
    for (int i = 0; i < 4; i++) access(1, 0, i, 1'b1, i, q);
    for (int i = 1; i < 4; i++) check(s_tick[i] - s_tick[i-1] == 24, "contiguous accesses every 6 us");
    check(n_prom[0] == 0, "master never promotes itself");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
