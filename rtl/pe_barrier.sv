// pe_barrier: the %BAR synchronization barrier across the PE array.
//
// Each PE holds arrive[i] high while a BAR instruction waits in its execute
// stage. A PE that takes no part (done[i]: halted, or already waiting for
// the next tile because it has no more iterations in this one) counts as
// arrived, so it never blocks the others. When every PE has arrived and at least one is
// actually waiting, release goes high in the same cycle, and all waiting PEs
// leave the barrier on the next clock edge. episodes counts completed
// barriers. The level/combinational-release handshake is an own choice; the
// design names the barrier but not its signalling.
module pe_barrier #(
  parameter int unsigned NPE = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NPE-1:0] arrive,
  input  logic [NPE-1:0] done,
  output logic           release_o,
  output logic [31:0]    episodes
);
  assign release_o = (&(arrive | done)) && (|arrive);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         episodes <= '0;
    else if (release_o) episodes <= episodes + 32'd1;
  end
endmodule
