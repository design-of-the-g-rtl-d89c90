// cp_interrupt: processor-to-processor interrupt.
//
// Either processor can interrupt the other, for example to ask for a shared
// peripheral such as the disc. raise[i] from processor i sets the interrupt
// pending at the other processor; pending[j] stays up until processor j
// acknowledges with ack[j]. A raise and an acknowledge in the same cycle leave
// the interrupt pending. The existence and use of the interrupt are the
// document's; this flip-flop form is this design's, the document gives no
// detail.
module cp_interrupt (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] raise,
  input  logic [1:0] ack,
  output logic [1:0] pending
);
  always_ff @(posedge clk) begin
    if (!rst_n) pending <= '0;
    else begin
      for (int j = 0; j < 2; j++) begin
        if (raise[1-j])  pending[j] <= 1'b1;
        else if (ack[j]) pending[j] <= 1'b0;
      end
    end
  end
endmodule
