// ins_buffer: the instruction buffer shared by all PEs.
//
// 256 entries of 32-bit instructions (1 KB), as in the design. The host loads
// the compute kernel through the write port before starting DASX; every PE
// then fetches from it through its own combinational read port (address in,
// instruction out in the same cycle). One read port per PE is an own choice:
// the design only says the front end is shared and that its bandwidth limits
// the number of PEs.
module ins_buffer
  import dasx_pkg::*;
#(
  parameter int unsigned ENTRIES = IBUF_ENTRIES,
  parameter int unsigned NPORTS  = 8
) (
  input  logic                               clk,
  input  logic                               we,
  input  logic [$clog2(ENTRIES)-1:0]         waddr,
  input  logic [31:0]                        wdata,
  input  logic [NPORTS-1:0][$clog2(ENTRIES)-1:0] raddr,
  output logic [NPORTS-1:0][31:0]            rdata
);
  logic [31:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) rdata[p] = mem[raddr[p]];
  end
endmodule
