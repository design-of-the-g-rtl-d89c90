// timebase: microsecond phase counter.
//
// Counts the four ticks of each processor microsecond (ph = 0..3) from reset.
// All queue controls and portals share one phase so that their microsecond
// boundaries line up, as the processor-bus timing charts show them. A shared
// phase is this design's choice; the document gives only the 1 MHz rate.
module timebase #(
  parameter int unsigned TICKS = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  output logic [$clog2(TICKS)-1:0]   ph
);
  always_ff @(posedge clk) begin
    if (!rst_n)                  ph <= '0;
    else if (ph == TICKS[$clog2(TICKS)-1:0] - 1'b1) ph <= '0;
    else                         ph <= ph + 1'b1;
  end
endmodule
