// core_module: one G-21 memory module, 8,192 words of 32 bits.
//
// The module is an asynchronous core bank with its own read/restore
// sequencing. A rising edge on start begins a cycle; the module then runs a
// fixed schedule counted in quarter microseconds (see g21_pkg): at internal
// start (1 us) it latches the address and the read/write control and reads the
// word; on a write it samples the write lines at 1.75 us; on a read it drives
// the read lines from 2 to 4 us and pulses data available at 3.25 us. The
// finish cycle pulse comes 1.5 us before the 7 us completion. Once the finish
// cycle has ended the module accepts the next start, so a string of contiguous
// accesses runs every 6 us: the 1 us start-to-internal-start delay of the new
// access overlaps the last microsecond of the old one.
//
// Interface: start, addr, we, wdata in; rdata (zero when the read lines are not
// driven, so drives can be OR-ed onto a shared bus), rvalid, dav, fin, idle
// out. The word count, widths and pulse order follow the document; the core
// itself is a register array and the destructive read/restore is not modelled
// bit by bit. The exact tick of each pulse is this design's reading of the
// timing chart. Reset clears the sequencing, not the stored words.
module core_module
  import g21_pkg::*;
#(
  parameter int unsigned WORDS_P = WORDS,
  parameter int unsigned AW      = ADDR_W,
  parameter int unsigned DW      = DATA_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  output logic          rvalid,
  output logic          dav,
  output logic          fin,
  output logic          idle,
  output logic          ready
);

  logic [DW-1:0] mem [WORDS_P];

  logic          start_q;
  logic          active;
  logic [4:0]    cnt;
  logic [AW-1:0] addr_q;
  logic          we_q;
  logic [DW-1:0] word_q;
  logic          start_rise;
  logic          accept;

  assign start_rise = start && !start_q;
  assign accept     = !active || (cnt >= 5'(C_ACCEPT));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      start_q <= 1'b0;
      active  <= 1'b0;
      cnt     <= '0;
      addr_q  <= '0;
      we_q    <= 1'b0;
      word_q  <= '0;
    end else begin
      start_q <= start;
      if (start_rise && accept) begin
        active <= 1'b1;
        cnt    <= 5'd1;
      end else if (active) begin
        if (cnt == 5'(C_LAST)) begin
          active <= 1'b0;
          cnt    <= '0;
        end else begin
          cnt <= cnt + 5'd1;
        end
      end
      if (active && cnt == 5'(C_INT_START)) begin
        addr_q <= addr;
        we_q   <= we;
        word_q <= mem[addr];
      end
    end
  end

  // The word store has no reset: a core keeps its contents.
  always_ff @(posedge clk) begin
    if (active && cnt == 5'(C_WDATA) && we_q) mem[addr_q] <= wdata;
  end

  assign rvalid = active && !we_q && cnt >= 5'(C_RD_FIRST)  && cnt <= 5'(C_RD_LAST);
  assign rdata  = rvalid ? word_q : '0;
  assign dav    = active && cnt >= 5'(C_DAV_FIRST) && cnt <= 5'(C_DAV_LAST);
  assign fin    = active && cnt >= 5'(C_FIN_FIRST) && cnt <= 5'(C_FIN_LAST);
  assign idle   = !active;
  assign ready  = accept;

  // A start may only arrive while the module is idle or after its finish cycle.
  a_start_legal: assert property (@(posedge clk) disable iff (!rst_n)
                                  start_rise |-> accept)
    else $error("core_module: start before finish cycle");

endmodule
