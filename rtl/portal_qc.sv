// portal_qc: the three-terminal portal queue control of one memory module.
//
// A module is shared by three terminals of unequal grade of service:
//   high capacity (HC)      the processor bus, served on demand;
//   low demand (LD)         the general exchange, must be served within a
//                           bounded time;
//   continuous demand (CD)  the display regeneration, lowest grade.
// An HC start is always passed straight to the module. While the HC terminal
// is engaged in an access (the priority flip-flop is set), a non-empty queue
// of slow requests holds back the module's finish cycle from the bus; when the
// module completes, the portal slips one slow access in (LD before CD) and the
// finish cycle of that access is what the bus finally sees. So under constant
// demand the processors and the slow terminals alternate, one "sneak" per HC
// access, and LD can shut out CD, as the document states.
//
// When the module is idle and no HC access is under way, a slow request waits
// through one processor microsecond. An HC start inside that microsecond takes
// the module and the slow request stays queued; otherwise the portal starts the
// module on the last quarter and also pulses hc_echo, which is OR-ed onto the
// module's start line so the processors' status flip-flops mark the module
// busy until the slow access's finish cycle. This extra microsecond makes a
// slow-terminal cycle 7 us long, the figure the document gives.
//
// Slow terminals: xx_req is a level held until xx_gnt; xx_gnt stays high until
// the access's finish cycle, and while it is high the terminal drives
// xx_addr, xx_we and xx_wdata. Read data comes back on xx_rdata with xx_dav,
// xx_fin marks the finish cycle. A terminal raises its next request only after
// its grant has fallen. The window may open once the module's finish cycle is
// over (core_ready), so back-to-back slow accesses start every 7 us.
// HC side: hc_fin is the module's finish cycle delayed by one tick (so the
// inhibit decision, taken on its first tick, never cuts a pulse). The
// echo start and the one-tick finish delay are this design's choices; the
// queue flip-flops, priority flip-flop, inhibit, single sneak, LD-over-CD order
// and the 7 us slow cycle are the document's.
module portal_qc
  import g21_pkg::*;
#(
  parameter int unsigned AW = ADDR_W,
  parameter int unsigned DW = DATA_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    ph,
  // high capacity terminal (processor bus lines of this module)
  input  logic          hc_start,
  input  logic [AW-1:0] hc_addr,
  input  logic          hc_we,
  input  logic [DW-1:0] hc_wdata,
  output logic          hc_fin,
  output logic          hc_dav,
  output logic [DW-1:0] hc_rdata,
  output logic          hc_rvalid,
  output logic          hc_echo,
  // low demand terminal
  input  logic          ld_req,
  output logic          ld_gnt,
  input  logic [AW-1:0] ld_addr,
  input  logic          ld_we,
  input  logic [DW-1:0] ld_wdata,
  output logic [DW-1:0] ld_rdata,
  output logic          ld_dav,
  output logic          ld_fin,
  // continuous demand terminal
  input  logic          cd_req,
  output logic          cd_gnt,
  input  logic [AW-1:0] cd_addr,
  input  logic          cd_we,
  input  logic [DW-1:0] cd_wdata,
  output logic [DW-1:0] cd_rdata,
  output logic          cd_dav,
  output logic          cd_fin,
  // core module port
  output logic          core_start,
  output logic [AW-1:0] core_addr,
  output logic          core_we,
  output logic [DW-1:0] core_wdata,
  input  logic [DW-1:0] core_rdata,
  input  logic          core_rvalid,
  input  logic          core_dav,
  input  logic          core_fin,
  input  logic          core_idle,
  input  logic          core_ready,
  // observation
  output logic          sneak_o,      // pulse: a slow access slipped in after an HC access
  output logic          window_o,     // pulse: a slow access started after the 1 us window
  output logic          preempt_o     // pulse: an HC start took the module inside the window
);

  portal_owner_e owner_q;
  logic          q_ld, q_cd;          // the two queue flip-flops
  logic          prio_q;              // HC terminal engaged in an access
  logic          inhibit_q;           // finish cycle held back from the bus
  logic          win_q;               // detection window running
  logic          slow_done_q;         // slow access past its finish cycle
  logic          hc_start_q, core_fin_q, fin_d;
  logic          hc_rise, fin_rise;
  logic          queued;
  logic          slow_go;
  portal_owner_e slow_sel;

  assign hc_rise  = hc_start && !hc_start_q;
  assign fin_rise = core_fin && !core_fin_q;
  // a request seen while its own access is granted is not a new one
  logic ld_rq, cd_rq;
  assign ld_rq    = ld_req && !ld_gnt;
  assign cd_rq    = cd_req && !cd_gnt;
  assign queued   = q_ld || q_cd || ld_rq || cd_rq;
  assign slow_sel = (q_ld || ld_rq) ? OWN_LD : OWN_CD;

  // Launch of a slow access: the sneak after an inhibited finish, or the end
  // of an undisturbed detection window.
  logic sneak_go, window_go;
  assign sneak_go  = inhibit_q && core_idle && !hc_rise;
  assign window_go = win_q && (ph == 2'd3) && !hc_rise && core_ready && !inhibit_q;
  assign slow_go   = sneak_go || window_go;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      owner_q    <= OWN_NONE;
      q_ld       <= 1'b0;
      q_cd       <= 1'b0;
      prio_q     <= 1'b0;
      inhibit_q  <= 1'b0;
      win_q      <= 1'b0;
      slow_done_q <= 1'b0;
      hc_start_q <= 1'b0;
      core_fin_q <= 1'b0;
      fin_d      <= 1'b0;
    end else begin
      hc_start_q <= hc_start;
      core_fin_q <= core_fin;
      fin_d      <= core_fin;

      // queue flip-flops follow the requests until granted
      if (ld_rq) q_ld <= 1'b1;
      if (cd_rq) q_cd <= 1'b1;

      if (hc_rise) begin
        // always serviced, regardless of the queue
        owner_q <= OWN_HC;
        prio_q  <= 1'b1;
        win_q   <= 1'b0;
      end else if (slow_go) begin
        owner_q   <= slow_sel;
        prio_q    <= 1'b0;                 // HC demoted for this access
        inhibit_q <= 1'b0;
        win_q     <= 1'b0;
        slow_done_q <= 1'b0;
        if (slow_sel == OWN_LD) q_ld <= 1'b0;
        else                    q_cd <= 1'b0;
      end else begin
        if (fin_rise && owner_q == OWN_HC && queued) inhibit_q <= 1'b1;
        if (fin_rise && (owner_q == OWN_LD || owner_q == OWN_CD)) slow_done_q <= 1'b1;
        // window opens at a microsecond boundary on an idle, unclaimed module
        if (!win_q && ph == 2'd0 && core_ready && !prio_q && !inhibit_q &&
            queued)
          win_q <= 1'b1;
        // HC access over with nothing queued: the module is free again
        if (core_idle && owner_q == OWN_HC && !inhibit_q) prio_q <= 1'b0;
        // slow access over
        if (core_idle && (owner_q == OWN_LD || owner_q == OWN_CD)) owner_q <= OWN_NONE;
      end
    end
  end

  // core port: HC lines on an HC start and during an HC access, else the
  // granted slow terminal
  logic sel_hc;
  assign sel_hc     = hc_rise || owner_q == OWN_HC;
  assign core_start = hc_start || slow_go;
  always_comb begin
    if (sel_hc) begin
      core_addr = hc_addr;  core_we = hc_we;  core_wdata = hc_wdata;
    end else if (owner_q == OWN_LD) begin
      core_addr = ld_addr;  core_we = ld_we;  core_wdata = ld_wdata;
    end else begin
      core_addr = cd_addr;  core_we = cd_we;  core_wdata = cd_wdata;
    end
  end

  assign hc_echo  = window_go;
  assign hc_fin   = fin_d && !inhibit_q;
  assign hc_dav   = core_dav && owner_q == OWN_HC;
  assign hc_rvalid = owner_q == OWN_HC && core_rvalid;
  assign hc_rdata  = hc_rvalid ? core_rdata : '0;

  assign ld_gnt   = owner_q == OWN_LD && !slow_done_q;
  assign ld_dav   = core_dav && owner_q == OWN_LD;
  assign ld_fin   = core_fin && owner_q == OWN_LD;
  assign ld_rdata = (owner_q == OWN_LD && core_rvalid) ? core_rdata : '0;
  assign cd_gnt   = owner_q == OWN_CD && !slow_done_q;
  assign cd_dav   = core_dav && owner_q == OWN_CD;
  assign cd_fin   = core_fin && owner_q == OWN_CD;
  assign cd_rdata = (owner_q == OWN_CD && core_rvalid) ? core_rdata : '0;

  assign sneak_o   = sneak_go;
  assign window_o  = window_go;
  assign preempt_o = hc_rise && win_q;

  // An HC start may only arrive when the module can take it: idle, or past
  // the finish cycle of the access under way.
  a_hc_when_free: assert property (@(posedge clk) disable iff (!rst_n)
                                   hc_rise |-> core_ready)
    else $error("portal_qc: processor start during a slow-terminal access");

endmodule
