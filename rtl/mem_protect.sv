// mem_protect: module write protection shared by both processors.
//
// Protection is kept per 8K module: a module is either fully writable or fully
// protected. One flip-flop register, reachable by both processors, holds a bit
// per module (1 = unprotected); either processor may load it. Each processor's
// access is checked before it reaches the bus: a write into a protected module
// is refused (illegal is raised and the access is not passed on) and turned
// into a one-cycle interrupt to that processor. Reads are never refused.
// The per-module granularity, the shared loadable register, write-only
// protection and the interrupt are the document's; the bit sense, reset to all
// protected, processor 0 winning a simultaneous load and the pulse form of the
// interrupt are this design's choices.
module mem_protect
  import g21_pkg::*;
#(
  parameter int unsigned NM = N_MODULES,
  parameter int unsigned MW = MOD_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    load_en,
  input  logic [NM-1:0] load_val [2],
  input  logic [1:0]    chk_req,
  input  logic [MW-1:0] chk_mod  [2],
  input  logic [1:0]    chk_we,
  output logic [1:0]    illegal,
  output logic [1:0]    irq,
  output logic [NM-1:0] unprot
);

  logic [NM-1:0] unprot_q;
  logic [1:0]    illegal_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      unprot_q  <= '0;
      illegal_q <= '0;
    end else begin
      if (load_en[0])      unprot_q <= load_val[0];
      else if (load_en[1]) unprot_q <= load_val[1];
      illegal_q <= illegal;
    end
  end

  always_comb begin
    for (int i = 0; i < 2; i++)
      illegal[i] = chk_req[i] && chk_we[i] && !unprot_q[chk_mod[i]];
  end

  assign irq    = illegal & ~illegal_q;
  assign unprot = unprot_q;

endmodule
