// proc_bus: the G-21 processor bus.
//
// One set of lines shared by both processors and all modules:
//   common to all:    13 address, 1 read/write, 32 write and 32 read lines;
//   one trio per module: start, data available, finish cycle;
//   bus control:      two bus request lines (each driven by one processor and
//                     watched by the other), one bus busy line driven by
//                     either, and the promotion and demotion lines.
// Every driver puts zero on a line it does not use, so each line is the OR of
// its drivers, the way a wired bus behaves. The module start lines reach the
// portals only from the processors; the status flip-flops in the processors
// see in addition the start echo a portal sends when it begins a slow-terminal
// access on its own. Assertions check the bus rules: only one processor holds
// the bus at a time and only one module drives the read lines at a time.
// The line set is the document's; the OR model of the line drivers is this
// design's.
module proc_bus
  import g21_pkg::*;
#(
  parameter int unsigned NM = N_MODULES,
  parameter int unsigned AW = ADDR_W,
  parameter int unsigned DW = DATA_W
) (
  input  logic          clk,
  input  logic          rst_n,
  // drives of the two bus queue controls
  input  logic          qc_req     [2],
  input  logic          qc_busy    [2],
  input  logic          qc_promote [2],
  input  logic          qc_demote  [2],
  input  logic [NM-1:0] qc_start   [2],
  input  logic [AW-1:0] qc_addr    [2],
  input  logic          qc_we      [2],
  input  logic [DW-1:0] qc_wdata   [2],
  // drives of the module portals
  input  logic [NM-1:0] pt_fin,
  input  logic [NM-1:0] pt_dav,
  input  logic [NM-1:0] pt_echo,
  input  logic [NM-1:0] pt_rvalid,
  input  logic [DW-1:0] pt_rdata   [NM],
  // lines as received
  output logic          other_req  [2],
  output logic          other_busy [2],
  output logic          promote_l,
  output logic          demote_l,
  output logic [NM-1:0] start_hc,      // processor starts, to the portals
  output logic [NM-1:0] start_l,       // start lines seen by the status flip-flops
  output logic [NM-1:0] fin_l,
  output logic [NM-1:0] dav_l,
  output logic [AW-1:0] addr_l,
  output logic          we_l,
  output logic [DW-1:0] wdata_l,
  output logic [DW-1:0] rd_l
);

  assign other_req[0]  = qc_req[1];
  assign other_req[1]  = qc_req[0];
  assign other_busy[0] = qc_busy[1];
  assign other_busy[1] = qc_busy[0];
  assign promote_l     = qc_promote[0] | qc_promote[1];
  assign demote_l      = qc_demote[0]  | qc_demote[1];
  assign start_hc      = qc_start[0] | qc_start[1];
  assign start_l       = start_hc | pt_echo;
  assign fin_l         = pt_fin;
  assign dav_l         = pt_dav;
  assign addr_l        = qc_addr[0]  | qc_addr[1];
  assign we_l          = qc_we[0]    | qc_we[1];
  assign wdata_l       = qc_wdata[0] | qc_wdata[1];

  always_comb begin
    rd_l = '0;
    for (int i = 0; i < int'(NM); i++) rd_l |= pt_rdata[i];
  end

  a_one_busy: assert property (@(posedge clk) disable iff (!rst_n)
                               !(qc_busy[0] && qc_busy[1]))
    else $error("proc_bus: both processors hold bus busy");
  a_one_start: assert property (@(posedge clk) disable iff (!rst_n)
                                (qc_start[0] & qc_start[1]) == '0 &&
                                !(qc_start[0] != '0 && qc_start[1] != '0))
    else $error("proc_bus: both processors start modules at once");
  a_one_reader: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0(pt_rvalid))
    else $error("proc_bus: two modules drive the read lines");

endmodule
