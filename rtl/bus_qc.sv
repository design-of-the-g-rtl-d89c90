// bus_qc: the bus queue control of one G-21 processor.
//
// Each of the two processors holds one of these. It turns a memory access of
// its processor into a request for the shared processor bus, and holds the
// nine status flip-flops: eight module-busy flags, kept up to date by watching
// every module's start and finish cycle lines, and the priority flip-flop.
//
// Sequence of one access, in microseconds from the boundary where it is taken:
//   0 .. 1   bus request up; start pulse on the module's line at 0.25 .. 0.75;
//            address and read/write driven
//   1 .. 2   bus busy up; address, read/write and write word driven
//   then     bus free; a read finishes at the module's data available pulse,
//            a write at the end of the bus busy microsecond.
// At every microsecond boundary a pending access is judged, in this order:
//   the other processor's bus busy is up        -> wait, keep own request up;
//   the addressed module's status is busy       -> idle, request down;
//   the other processor requests and has priority (a tie lost) -> wait;
//   otherwise                                   -> take the bus.
// Priority: it starts with the master (manual switch is_master). A slave that
// waited on the master and then finds the module busy promotes itself and
// pulses demote_o, which demotes the master; as soon as the slave takes the
// bus it demotes itself again and pulses promote_o. So the master wins the
// first of a run of ties and every second one after that, and two processors
// hammering one module alternate at the full module rate.
//
// Everything above is the document's except: the exact quarter-microsecond
// ticks (read from the timing charts), the order of the tests at a boundary,
// and the condition under which the slave promotes itself, which the document
// states twice in slightly different words (see the block's notes).
// Lines this processor does not drive are driven zero so the bus can OR them.
module bus_qc
  import g21_pkg::*;
#(
  parameter int unsigned NM = N_MODULES,
  parameter int unsigned MW = MOD_W,
  parameter int unsigned AW = ADDR_W,
  parameter int unsigned DW = DATA_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    ph,
  input  logic          is_master,
  // processor side
  input  logic          cpu_req,
  input  logic [MW-1:0] cpu_mod,
  input  logic [AW-1:0] cpu_addr,
  input  logic          cpu_we,
  input  logic [DW-1:0] cpu_wdata,
  output logic [DW-1:0] cpu_rdata,
  output logic          cpu_done,
  // bus control lines
  output logic          bus_req,
  output logic          bus_busy,
  input  logic          other_req,
  input  logic          other_busy,
  output logic          promote_o,
  output logic          demote_o,
  input  logic          promote_i,
  input  logic          demote_i,
  // module control lines
  output logic [NM-1:0] start_o,
  input  logic [NM-1:0] start_l,
  input  logic [NM-1:0] fin_l,
  input  logic [NM-1:0] dav_l,
  output logic [AW-1:0] addr_o,
  output logic          we_o,
  output logic [DW-1:0] wdata_o,
  input  logic [DW-1:0] rd_l,
  // observation
  output logic [NM-1:0] mod_busy_o,
  output logic          prio_o,
  output logic          tie_lost_o,    // pulse: held back by the other's priority
  output logic          wait_busy_o,   // pulse: held back by bus busy
  output logic          idle_o,        // pulse: addressed module found busy
  output logic          promote_self_o // pulse: slave promoted itself
);

  qc_state_e     state_q;
  logic          waiting_q;     // request held while waiting for the bus
  logic          lost_q;        // waited on the other processor in this access
  logic          prio_q;
  logic [NM-1:0] mod_busy_q, start_seen_q, fin_seen_q;
  logic [MW-1:0] mod_q;
  logic [AW-1:0] addr_q;
  logic          we_q;
  logic [DW-1:0] wdata_q;
  logic [DW-1:0] rdata_q;
  logic          dav_q;

  // ---- status flip-flops, updated at the end of every microsecond ----
  logic [NM-1:0] start_any, fin_any;
  assign start_any = start_seen_q | start_l;
  assign fin_any   = fin_seen_q   | fin_l;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mod_busy_q   <= '0;
      start_seen_q <= '0;
      fin_seen_q   <= '0;
    end else if (ph == 2'd3) begin
      for (int i = 0; i < int'(NM); i++)
        mod_busy_q[i] <= start_any[i] ? 1'b1 : (fin_any[i] ? 1'b0 : mod_busy_q[i]);
      start_seen_q <= '0;
      fin_seen_q   <= '0;
    end else begin
      start_seen_q <= start_any;
      fin_seen_q   <= fin_any;
    end
  end

  // ---- decision at a microsecond boundary ----
  logic          judge;          // a pending access is judged this tick
  logic [MW-1:0] jmod;
  logic          jmod_busy;
  assign judge     = (ph == 2'd0) &&
                     ((state_q == QS_FREE && cpu_req) || state_q == QS_PEND);
  assign jmod      = (state_q == QS_FREE) ? cpu_mod : mod_q;
  assign jmod_busy = mod_busy_q[jmod];

  typedef enum logic [1:0] {D_WAIT_BUSY, D_IDLE, D_TIE_LOST, D_TAKE} decision_e;
  decision_e dec;
  always_comb begin
    if (other_busy && (waiting_q || !jmod_busy)) dec = D_WAIT_BUSY;
    else if (jmod_busy)                          dec = D_IDLE;
    else if (other_req && !prio_q)               dec = D_TIE_LOST;
    else                                         dec = D_TAKE;
  end

  // request line: raised at the boundary when the module looks free or while
  // waiting on bus busy; held through the microsecond while waiting or owning
  always_comb begin
    unique case (state_q)
      QS_OWN:  bus_req = 1'b1;
      QS_FREE: bus_req = judge && !jmod_busy;
      QS_PEND: bus_req = (ph == 2'd0) ? ((waiting_q && other_busy) || !jmod_busy)
                                      : waiting_q;
      default: bus_req = 1'b0;
    endcase
  end

  // The priority flip-flop takes the switch setting once, after reset.
  logic rst_seen_q;
  always_ff @(posedge clk) begin
    if (!rst_n) rst_seen_q <= 1'b0;
    else        rst_seen_q <= 1'b1;
  end

  logic slave_promotes;
  assign slave_promotes = judge && dec == D_IDLE && !is_master && lost_q && !prio_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= QS_FREE;
      waiting_q <= 1'b0;
      lost_q    <= 1'b0;
      prio_q    <= 1'b0;
      mod_q     <= '0;
      addr_q    <= '0;
      we_q      <= 1'b0;
      wdata_q   <= '0;
      rdata_q   <= '0;
      dav_q     <= 1'b0;
    end else begin
      dav_q <= dav_l[mod_q];
      // priority flip-flop
      if (!rst_seen_q)                         prio_q <= is_master;
      else if (is_master && demote_i)          prio_q <= 1'b0;
      else if (is_master && promote_i)         prio_q <= 1'b1;
      else if (slave_promotes)                 prio_q <= 1'b1;
      else if (!is_master && judge && dec == D_TAKE) prio_q <= 1'b0;

      unique case (state_q)
        QS_FREE, QS_PEND: begin
          if (state_q == QS_FREE && cpu_req) begin
            mod_q   <= cpu_mod;
            addr_q  <= cpu_addr;
            we_q    <= cpu_we;
            wdata_q <= cpu_wdata;
          end
          if (judge) begin
            unique case (dec)
              D_WAIT_BUSY: begin state_q <= QS_PEND; waiting_q <= 1'b1; lost_q <= 1'b1; end
              D_IDLE:      begin state_q <= QS_PEND; waiting_q <= 1'b0; end
              D_TIE_LOST:  begin state_q <= QS_PEND; waiting_q <= 1'b1; lost_q <= 1'b1; end
              D_TAKE:      begin state_q <= QS_OWN;  waiting_q <= 1'b0; lost_q <= 1'b0; end
            endcase
          end else if (state_q == QS_FREE && cpu_req) begin
            state_q <= QS_PEND;
          end
        end
        QS_OWN:  if (ph == 2'd3) state_q <= QS_HOLD;
        QS_HOLD: if (ph == 2'd3) state_q <= we_q ? QS_FREE : QS_READ;
        QS_READ: if (dav_l[mod_q] && !dav_q) begin
                   rdata_q <= rd_l;
                   state_q <= QS_FREE;
                 end
        default: state_q <= QS_FREE;
      endcase
    end
  end

  // ---- line drives ----
  logic driving;
  assign driving  = state_q == QS_OWN || state_q == QS_HOLD;
  assign bus_busy = state_q == QS_HOLD;
  always_comb begin
    start_o = '0;
    if (state_q == QS_OWN && (ph == 2'd1 || ph == 2'd2)) start_o[mod_q] = 1'b1;
  end
  assign addr_o   = driving ? addr_q : '0;
  assign we_o     = driving ? we_q   : 1'b0;
  assign wdata_o  = (state_q == QS_HOLD && we_q) ? wdata_q : '0;

  assign promote_o = !is_master && judge && dec == D_TAKE;
  assign demote_o  = slave_promotes;

  assign cpu_rdata = (state_q == QS_READ) ? rd_l : rdata_q;
  assign cpu_done  = (state_q == QS_HOLD && ph == 2'd3 && we_q) ||
                     (state_q == QS_READ && dav_l[mod_q] && !dav_q);

  assign mod_busy_o     = mod_busy_q;
  assign prio_o         = prio_q;
  assign tie_lost_o     = judge && dec == D_TIE_LOST;
  assign wait_busy_o    = judge && dec == D_WAIT_BUSY;
  assign idle_o         = judge && dec == D_IDLE;
  assign promote_self_o = slave_promotes;

  // The processor must hold its request steady until the access is done.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
                               (state_q inside {QS_PEND, QS_OWN, QS_HOLD, QS_READ}) |-> cpu_req)
    else $error("bus_qc: processor dropped its request before completion");

endmodule
