// g21_top: the G-21 memory configuration.
//
// Two processors share eight memory modules. The processors reach every
// module over one processor bus, arbitrated by a bus queue control inside each
// processor (bus_qc); each module additionally has a three-terminal portal
// (portal_qc) whose two slow terminals serve a display controller (continuous
// demand) and a general exchange controller (low demand). The design is thus a
// bus system for the processors combined with a small portal system at every
// module. A shared protection register (mem_protect) refuses writes into
// protected modules, and a processor-to-processor interrupt (cp_interrupt)
// supports the software locking of shared peripherals.
//
// Ports: everything outside the memory control is a port. Processor i presents
// an access on cpu_req[i] (module, 13-bit word address, write flag, word) and
// holds it until cpu_done[i]; a refused write raises prot_irq[i] instead, and
// the processor must then withdraw it. master_sel picks which processor the
// manual switch makes master (0: processor 0). The slow terminals of every
// module are brought out as ld_* and cd_*; tie their requests low where a
// module has no such facility. The ev_* outputs pulse on the arbitration
// events, for observation.
// Private memory: module PRIV_MOD holds 4K words private to each processor.
// For an access by processor i to that module the top address bit is replaced
// by i, so each processor sees only its own half (addresses 0..4095, repeated
// in its upper half). That the module is split this way is the document's;
// choosing the half by the top address bit is this design's.
// Timing: one clock of four ticks per microsecond (a 4 MHz clock for the
// document's 1 MHz processor timing). Module and bus timing are given in
// g21_pkg.
module g21_top
  import g21_pkg::*;
#(
  parameter int unsigned NM = N_MODULES
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          master_sel,
  // processors
  input  logic [1:0]    cpu_req,
  input  logic [MOD_W-1:0]  cpu_mod   [2],
  input  logic [ADDR_W-1:0] cpu_addr  [2],
  input  logic [1:0]    cpu_we,
  input  logic [DATA_W-1:0] cpu_wdata [2],
  output logic [DATA_W-1:0] cpu_rdata [2],
  output logic [1:0]    cpu_done,
  output logic [1:0]    prot_irq,
  input  logic [1:0]    prot_load,
  input  logic [NM-1:0] prot_val  [2],
  input  logic [1:0]    ipi_raise,
  input  logic [1:0]    ipi_ack,
  output logic [1:0]    ipi_pending,
  // low demand terminals (general exchange), one per module
  input  logic [NM-1:0]     ld_req,
  output logic [NM-1:0]     ld_gnt,
  input  logic [ADDR_W-1:0] ld_addr  [NM],
  input  logic [NM-1:0]     ld_we,
  input  logic [DATA_W-1:0] ld_wdata [NM],
  output logic [DATA_W-1:0] ld_rdata [NM],
  output logic [NM-1:0]     ld_dav,
  output logic [NM-1:0]     ld_fin,
  // continuous demand terminals (display), one per module
  input  logic [NM-1:0]     cd_req,
  output logic [NM-1:0]     cd_gnt,
  input  logic [ADDR_W-1:0] cd_addr  [NM],
  input  logic [NM-1:0]     cd_we,
  input  logic [DATA_W-1:0] cd_wdata [NM],
  output logic [DATA_W-1:0] cd_rdata [NM],
  output logic [NM-1:0]     cd_dav,
  output logic [NM-1:0]     cd_fin,
  // observation
  output logic [1:0]    bus_req_o,
  output logic          bus_busy_o,
  output logic [NM-1:0] start_l_o,
  output logic [1:0]    prio_o,
  output logic [NM-1:0] mod_busy_o [2],
  output logic [NM-1:0] prot_state,
  output logic [1:0]    ev_tie_lost,
  output logic [1:0]    ev_wait_busy,
  output logic [1:0]    ev_idle,
  output logic [1:0]    ev_promote,
  output logic [NM-1:0] ev_sneak,
  output logic [NM-1:0] ev_window,
  output logic [NM-1:0] ev_preempt
);

  logic [1:0] ph;
  timebase #(.TICKS(TICKS_PER_US)) u_tb (.clk, .rst_n, .ph);

  // ---- protection and interrupt ----
  logic [1:0]    illegal;
  mem_protect #(.NM(NM), .MW(MOD_W)) u_prot (
    .clk, .rst_n, .load_en(prot_load), .load_val(prot_val),
    .chk_req(cpu_req), .chk_mod(cpu_mod), .chk_we(cpu_we),
    .illegal, .irq(prot_irq), .unprot(prot_state));

  cp_interrupt u_ipi (.clk, .rst_n, .raise(ipi_raise), .ack(ipi_ack), .pending(ipi_pending));

  // ---- bus ----
  logic          qc_req [2], qc_busy [2], qc_promote [2], qc_demote [2];
  logic [NM-1:0] qc_start [2];
  logic [ADDR_W-1:0] qc_addr [2];
  logic          qc_we [2];
  logic [DATA_W-1:0] qc_wdata [2];
  logic          other_req [2], other_busy [2];
  logic          promote_l, demote_l;
  logic [NM-1:0] start_hc, start_l, fin_l, dav_l;
  logic [ADDR_W-1:0] addr_l;
  logic          we_l;
  logic [DATA_W-1:0] wdata_l, rd_l;
  logic [NM-1:0] pt_fin, pt_dav, pt_echo, pt_rvalid;
  logic [DATA_W-1:0] pt_rdata [NM];

  proc_bus #(.NM(NM)) u_bus (
    .clk, .rst_n,
    .qc_req, .qc_busy, .qc_promote, .qc_demote, .qc_start, .qc_addr, .qc_we, .qc_wdata,
    .pt_fin, .pt_dav, .pt_echo, .pt_rvalid, .pt_rdata,
    .other_req, .other_busy, .promote_l, .demote_l,
    .start_hc, .start_l, .fin_l, .dav_l, .addr_l, .we_l, .wdata_l, .rd_l);

  // ---- the two processors' bus queue controls ----
  logic [ADDR_W-1:0] qc_addr_in [2];
  for (genvar p = 0; p < 2; p++) begin : g_qc
    assign qc_addr_in[p] = (cpu_mod[p] == MOD_W'(PRIV_MOD)) ?
                           {1'(p), cpu_addr[p][ADDR_W-2:0]} : cpu_addr[p];
    bus_qc #(.NM(NM)) u_qc (
      .clk, .rst_n, .ph,
      .is_master      (master_sel == 1'(p)),
      .cpu_req        (cpu_req[p] && !illegal[p]),
      .cpu_mod        (cpu_mod[p]),
      .cpu_addr       (qc_addr_in[p]),
      .cpu_we         (cpu_we[p]),
      .cpu_wdata      (cpu_wdata[p]),
      .cpu_rdata      (cpu_rdata[p]),
      .cpu_done       (cpu_done[p]),
      .bus_req        (qc_req[p]),
      .bus_busy       (qc_busy[p]),
      .other_req      (other_req[p]),
      .other_busy     (other_busy[p]),
      .promote_o      (qc_promote[p]),
      .demote_o       (qc_demote[p]),
      .promote_i      (promote_l),
      .demote_i       (demote_l),
      .start_o        (qc_start[p]),
      .start_l        (start_l),
      .fin_l          (fin_l),
      .dav_l          (dav_l),
      .addr_o         (qc_addr[p]),
      .we_o           (qc_we[p]),
      .wdata_o        (qc_wdata[p]),
      .rd_l           (rd_l),
      .mod_busy_o     (mod_busy_o[p]),
      .prio_o         (prio_o[p]),
      .tie_lost_o     (ev_tie_lost[p]),
      .wait_busy_o    (ev_wait_busy[p]),
      .idle_o         (ev_idle[p]),
      .promote_self_o (ev_promote[p]));
    assign bus_req_o[p] = qc_req[p];
  end

  assign bus_busy_o = qc_busy[0] | qc_busy[1];
  assign start_l_o  = start_l;

  // ---- memory modules, each behind its portal ----
  for (genvar m = 0; m < NM; m++) begin : g_mod
    logic              c_start, c_we, c_rvalid, c_dav, c_fin, c_idle, c_ready;
    logic [ADDR_W-1:0] c_addr;
    logic [DATA_W-1:0] c_wdata, c_rdata;

    portal_qc u_portal (
      .clk, .rst_n, .ph,
      .hc_start (start_hc[m]), .hc_addr(addr_l), .hc_we(we_l), .hc_wdata(wdata_l),
      .hc_fin   (pt_fin[m]),   .hc_dav(pt_dav[m]), .hc_rdata(pt_rdata[m]),
      .hc_rvalid(pt_rvalid[m]), .hc_echo(pt_echo[m]),
      .ld_req   (ld_req[m]),   .ld_gnt(ld_gnt[m]), .ld_addr(ld_addr[m]), .ld_we(ld_we[m]),
      .ld_wdata (ld_wdata[m]), .ld_rdata(ld_rdata[m]), .ld_dav(ld_dav[m]), .ld_fin(ld_fin[m]),
      .cd_req   (cd_req[m]),   .cd_gnt(cd_gnt[m]), .cd_addr(cd_addr[m]), .cd_we(cd_we[m]),
      .cd_wdata (cd_wdata[m]), .cd_rdata(cd_rdata[m]), .cd_dav(cd_dav[m]), .cd_fin(cd_fin[m]),
      .core_start(c_start), .core_addr(c_addr), .core_we(c_we), .core_wdata(c_wdata),
      .core_rdata(c_rdata), .core_rvalid(c_rvalid), .core_dav(c_dav), .core_fin(c_fin),
      .core_idle (c_idle), .core_ready(c_ready),
      .sneak_o  (ev_sneak[m]), .window_o(ev_window[m]), .preempt_o(ev_preempt[m]));

    core_module u_core (
      .clk, .rst_n, .start(c_start), .addr(c_addr), .we(c_we), .wdata(c_wdata),
      .rdata(c_rdata), .rvalid(c_rvalid), .dav(c_dav), .fin(c_fin), .idle(c_idle), .ready(c_ready));

  end

endmodule
