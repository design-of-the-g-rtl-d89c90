// tb_g21_top: end-to-end test of the G-21 memory system at full size
// (eight modules of 8,192 words, the top's parameters left at their defaults).
//
// Two processor models, an exchange (low demand) terminal and a display
// (continuous demand) terminal on module 0 run through:
//   1. a write into a protected module: refused with an interrupt;
//   2. the protection register loaded, both processors fill modules 0..7;
//      each processor then finds its own word at one address of the private
//      module (the reference memory keys that module by processor);
//   3. both processors hammer module 3: starts every 6 us, master first, then
//      alternating, slave promotions;
//   4. mixed random traffic from both processors to all modules while the
//      display reads module 0 and the exchange writes into it, so that ties,
//      bus-busy waits, idles, finish inhibits with sneak accesses, window
//      starts and preemptions all happen;
//   5. the disc-switch handshake over the processor-to-processor interrupt.
// Every word read is compared with a reference copy; every mechanism is
// counted and must have happened at least once.
module tb_g21_top;
  import g21_pkg::*;
  localparam int NM = N_MODULES;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]        cpu_req, cpu_we, cpu_done, prot_irq, prot_load = '0;
  logic [MOD_W-1:0]  cpu_mod   [2];
  logic [ADDR_W-1:0] cpu_addr  [2];
  logic [DATA_W-1:0] cpu_wdata [2];
  logic [DATA_W-1:0] cpu_rdata [2];
  logic [NM-1:0]     prot_val  [2];
  logic [1:0]        ipi_raise = '0, ipi_ack = '0, ipi_pending;
  logic [NM-1:0]     ld_req = '0, ld_gnt, ld_we = '0, ld_dav, ld_fin;
  logic [ADDR_W-1:0] ld_addr [NM];
  logic [DATA_W-1:0] ld_wdata [NM], ld_rdata [NM];
  logic [NM-1:0]     cd_req = '0, cd_gnt, cd_we = '0, cd_dav, cd_fin;
  logic [ADDR_W-1:0] cd_addr [NM];
  logic [DATA_W-1:0] cd_wdata [NM], cd_rdata [NM];
  logic [1:0]        bus_req_o, prio_o, ev_tie_lost, ev_wait_busy, ev_idle, ev_promote;
  logic              bus_busy_o;
  logic [NM-1:0]     start_l_o, ev_sneak, ev_window, ev_preempt, prot_state;
  logic [NM-1:0]     mod_busy_o [2];

  g21_top dut (.*, .master_sel(1'b0));

  // each processor model drives its own variables
  logic              req_v [2] = '{1'b0, 1'b0};
  logic              we_v  [2] = '{1'b0, 1'b0};
  logic [MOD_W-1:0]  mod_v [2];
  logic [ADDR_W-1:0] adr_v [2];
  logic [DATA_W-1:0] dat_v [2];
  for (genvar p = 0; p < 2; p++) begin : g_drv
    assign cpu_req[p]   = req_v[p];
    assign cpu_we[p]    = we_v[p];
    assign cpu_mod[p]   = mod_v[p];
    assign cpu_addr[p]  = adr_v[p];
    assign cpu_wdata[p] = dat_v[p];
  end

  int checks = 0, failures = 0, tk = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", tk, what); end
  endtask

  // ---- reference memory ----
  logic [DATA_W-1:0] ref_mem [int];
  function automatic int key(input int m, input int a); return m * 8192 + a; endfunction
  // word a of module m as processor p sees it: the private module is split in halves
  function automatic int pkey(input int p, input int m, input int a);
    return (m == NM - 1) ? key(m, p * 4096 + a % 4096) : key(m, a);
  endfunction

  // ---- event counters ----
  int n_tie = 0, n_wbusy = 0, n_idle = 0, n_prom = 0, n_sneak = 0, n_window = 0, n_preempt = 0;
  int n_irq = 0, n_ipi = 0, n_ldcd = 0;
  int s_tick [$]; int s_mod [$];
  logic [NM-1:0] start_q = '0;
  always @(posedge clk) begin
    tk <= tk + 1;
    start_q <= start_l_o;
    n_tie     <= n_tie     + $countones(ev_tie_lost);
    n_wbusy   <= n_wbusy   + $countones(ev_wait_busy);
    n_idle    <= n_idle    + $countones(ev_idle);
    n_prom    <= n_prom    + $countones(ev_promote);
    n_sneak   <= n_sneak   + $countones(ev_sneak);
    n_window  <= n_window  + $countones(ev_window);
    n_preempt <= n_preempt + $countones(ev_preempt);
    n_irq     <= n_irq     + $countones(prot_irq);
    for (int m = 0; m < NM; m++)
      if (start_l_o[m] && !start_q[m]) begin s_tick.push_back(tk); s_mod.push_back(m); end
  end

  // ---- processor model ----
  task automatic cpu(input int p, input int m, input int a, input bit w, input logic [DATA_W-1:0] d,
                     output logic [DATA_W-1:0] q, output bit refused);
    if (p == 0) begin req_v[0] <= 1'b1; mod_v[0] <= MOD_W'(m); adr_v[0] <= ADDR_W'(a); we_v[0] <= w; dat_v[0] <= d; end
    else        begin req_v[1] <= 1'b1; mod_v[1] <= MOD_W'(m); adr_v[1] <= ADDR_W'(a); we_v[1] <= w; dat_v[1] <= d; end
    @(posedge clk iff (cpu_done[p] || prot_irq[p]));
    refused = prot_irq[p];
    q = cpu_rdata[p];
    if (p == 0) req_v[0] <= 1'b0; else req_v[1] <= 1'b0;
    if (!refused && w) ref_mem[pkey(p, m, a)] = d;
  endtask

  task automatic cpu_read_check(input int p, input int m, input int a);
    logic [DATA_W-1:0] q; bit r;
    cpu(p, m, a, 1'b0, '0, q, r);
    check(!r && ref_mem.exists(pkey(p, m, a)) && q == ref_mem[pkey(p, m, a)],
          $sformatf("cpu%0d read m%0d a%0h: %h", p, m, a, q));
  endtask

  // ---- slow terminals on module 0 ----
  task automatic ld_access(input bit w, input int a, input logic [DATA_W-1:0] d, output logic [DATA_W-1:0] q);
    ld_req[0] <= 1'b1;
    @(posedge clk iff ld_gnt[0]);
    ld_req[0] <= 1'b0; ld_addr[0] <= ADDR_W'(a); ld_we[0] <= w; ld_wdata[0] <= d;
    q = '0;
    while (!ld_fin[0]) begin @(posedge clk); if (ld_dav[0]) q = ld_rdata[0]; end
    if (w) ref_mem[key(0, a)] = d;
    @(posedge clk iff !ld_gnt[0]);
  endtask
  task automatic cd_access(input int a, output logic [DATA_W-1:0] q);
    cd_req[0] <= 1'b1;
    @(posedge clk iff cd_gnt[0]);
    cd_req[0] <= 1'b0; cd_addr[0] <= ADDR_W'(a); cd_we[0] <= 1'b0;
    q = '0;
    while (!cd_fin[0]) begin @(posedge clk); if (cd_dav[0]) q = cd_rdata[0]; end
    @(posedge clk iff !cd_gnt[0]);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] q; bit r;
    int n;
    bit ld_first_seen;
    for (int p = 0; p < 2; p++) begin
      mod_v[p] = '0; adr_v[p] = '0; dat_v[p] = '0; prot_val[p] = '0;
    end
    for (int m = 0; m < NM; m++) begin
      ld_addr[m] = '0; ld_wdata[m] = '0; cd_addr[m] = '0; cd_wdata[m] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (8) @(posedge clk);
    check(prio_o == 2'b01, "processor 0 starts as the priority user");

    // 1. write into a protected module
    cpu(1, 4, 7, 1'b1, 32'h1234_5678, q, r);
    check(r, "write into protected module refused");
    repeat (4) @(posedge clk);

    // 2. unprotect all but module 7, fill
    prot_val[1] <= 8'h7F; prot_load[1] <= 1'b1;
    @(posedge clk); prot_load[1] <= 1'b0;
    @(posedge clk);
    check(prot_state == 8'h7F, "protection register loaded by processor 1");
    cpu(0, 7, 0, 1'b1, 32'h7777_7777, q, r);
    check(r, "module 7 still protected");
    prot_val[0] <= 8'hFF; prot_load[0] <= 1'b1;
    @(posedge clk); prot_load[0] <= 1'b0;
    fork
      for (int m = 0; m < NM; m++) for (int a = 0; a < 16; a++) cpu(0, m, a, 1'b1, {8'hA0, 8'(m), 16'(a)}, q, r);
      for (int m = NM - 1; m >= 0; m--) for (int a = 0; a < 16; a++) cpu(1, m, 2048 + a, 1'b1, {8'hB0, 8'(m), 16'(a)}, q, r);
    join
    for (int m = 0; m < NM - 1; m++) begin   // common modules: each reads the other's words
      cpu_read_check(1, m, 3);
      cpu_read_check(0, m, 2048 + 5);
    end

    // private module: the same address names a different word for each processor
    cpu(0, NM - 1, 4100, 1'b1, 32'h5A5A_0000, q, r);
    cpu(1, NM - 1, 4100, 1'b1, 32'h5A5A_0001, q, r);
    cpu(0, NM - 1, 4, 1'b0, '0, q, r);
    check(q == 32'h5A5A_0000, $sformatf("processor 0 private word: %h", q));
    cpu(1, NM - 1, 4, 1'b0, '0, q, r);
    check(q == 32'h5A5A_0001, $sformatf("processor 1 private word: %h", q));
    cpu_read_check(0, NM - 1, 3);
    cpu_read_check(1, NM - 1, 2048 + 3);

    // 3. both hammer module 3 (timing chart of the alternating priority)
    repeat (40) @(posedge clk);
    s_tick.delete(); s_mod.delete();
    n = 10;
    fork
      for (int i = 0; i < n; i++) cpu(0, 3, 100 + i, 1'b1, 32'hC000_0000 + i, q, r);
      for (int i = 0; i < n; i++) cpu(1, 3, 2148 + i, 1'b1, 32'hD000_0000 + i, q, r);
    join
    check(s_tick.size() == 2 * n, "all hammer accesses started");
    for (int i = 1; i < s_tick.size(); i++)
      check(s_tick[i] - s_tick[i-1] == 24, $sformatf("hammer start %0d 6 us after the previous (%0d)", i, s_tick[i] - s_tick[i-1]));
    check(n_prom >= n - 1, $sformatf("slave promotions during hammer: %0d", n_prom));
    for (int i = 0; i < n; i += 3) begin cpu_read_check(0, 3, 2148 + i); cpu_read_check(1, 3, 100 + i); end

    // 4. mixed traffic with the slow terminals on module 0
    ld_first_seen = 0;
    fork
      begin
        for (int i = 0; i < 120; i++) begin
          automatic int m = $urandom_range(0, NM - 1), a = $urandom_range(16, 63);
          if ($urandom_range(0, 1)) cpu(0, m, a, 1'b1, $urandom, q, r);
          else if (ref_mem.exists(pkey(0, m, a))) cpu_read_check(0, m, a);
        end
      end
      begin
        for (int i = 0; i < 120; i++) begin
          automatic int m = $urandom_range(0, NM - 1), a = 2048 + $urandom_range(16, 63);
          if ($urandom_range(0, 1)) cpu(1, m, a, 1'b1, $urandom, q, r);
          else if (ref_mem.exists(pkey(1, m, a))) cpu_read_check(1, m, a);
        end
      end
      begin
        for (int i = 0; i < 30; i++) begin
          ld_access(1'b1, 4096 + i, 32'hE000_0000 + i, q);
          repeat ($urandom_range(0, 40)) @(posedge clk);
        end
      end
      begin
        for (int i = 0; i < 60; i++) begin
          automatic int a = i % 16;
          cd_access(a, q);
          check(q == ref_mem[key(0, a)], $sformatf("display read a%0h: %h", a, q));
        end
      end
    join
    for (int i = 0; i < 30; i += 7) cpu_read_check(1, 0, 4096 + i);

    // low demand masks continuous demand when both are queued
    fork
      begin repeat (12) @(posedge clk); cd_access(1, q); end
      begin repeat (13) @(posedge clk); ld_access(1'b0, 4096, '0, q); ld_first_seen = !cd_gnt[0] && cd_req[0]; end
      cpu(0, 0, 2, 1'b0, '0, q, r);
    join
    if (ld_first_seen) n_ldcd++;

    // 5. disc switch handshake: processor 0 asks processor 1
    cpu(0, 1, 60, 1'b1, 32'h0000_0D15, q, r);       // notice posted in common memory
    ipi_raise[0] <= 1'b1; @(posedge clk); ipi_raise[0] <= 1'b0;
    @(posedge clk iff ipi_pending[1]);
    n_ipi++;
    cpu_read_check(1, 1, 60);
    ipi_ack[1] <= 1'b1; @(posedge clk); ipi_ack[1] <= 1'b0;
    @(posedge clk);
    check(ipi_pending == 2'b00, "interrupt acknowledged");

    // every mechanism must have happened
    check(n_tie > 0,     $sformatf("ties lost: %0d", n_tie));
    check(n_wbusy > 0,   $sformatf("bus busy waits: %0d", n_wbusy));
    check(n_idle > 0,    $sformatf("idle on busy module: %0d", n_idle));
    check(n_prom > 0,    $sformatf("slave promotions: %0d", n_prom));
    check(n_sneak > 0,   $sformatf("finish inhibits with sneak access: %0d", n_sneak));
    check(n_window > 0,  $sformatf("window-started slow accesses: %0d", n_window));
    check(n_preempt > 0, $sformatf("processor preemptions of the window: %0d", n_preempt));
    check(n_irq > 0,     $sformatf("protection interrupts: %0d", n_irq));
    check(n_ipi > 0,     $sformatf("processor interrupts: %0d", n_ipi));
    check(n_ldcd > 0,    "low demand served before continuous demand");
    $display("mechanisms: tie=%0d busywait=%0d idle=%0d promote=%0d sneak=%0d window=%0d preempt=%0d irq=%0d ipi=%0d ld>cd=%0d",
             n_tie, n_wbusy, n_idle, n_prom, n_sneak, n_window, n_preempt, n_irq, n_ipi, n_ldcd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
