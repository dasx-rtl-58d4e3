// dram_model: behavioural main memory for simulation (not synthesizable).
//
// Stands in for the off-chip DDR memory behind the LLC. Line-granular,
// sparse (associative array), every unwritten line reads as zero. Reads are
// answered LATENCY cycles after acceptance, one response per cycle, in order;
// writes are applied when accepted. The request port is always ready. Tasks
// poke32/peek32 give the testbench direct access to memory contents, and
// max_outstanding records the largest number of reads in flight at once,
// which shows how much memory-level parallelism the design extracted.
module dram_model
  import dasx_pkg::*;
#(
  parameter int unsigned LATENCY = 100
) (
  input  logic      clk,
  input  logic      req_valid,
  output logic      req_ready,
  input  dram_req_t req,
  output logic      rsp_valid,
  output dram_rsp_t rsp
);
  line_t mem [laddr_t];
  typedef struct { longint due; laddr_t a; } pend_t;
  pend_t  q[$];
  longint now = 0;
  int     max_outstanding = 0;
  int     reads = 0;
  int     writes = 0;

  assign req_ready = 1'b1;

  function automatic line_t get(laddr_t a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  function automatic void poke32(input logic [31:0] addr, input logic [31:0] v);
    line_t l;
    l = get(addr[31:6]);
    l[addr[5:2]*32 +: 32] = v;
    mem[addr[31:6]] = l;
  endfunction

  function automatic void poke8(input logic [31:0] addr, input logic [7:0] v);
    line_t l;
    l = get(addr[31:6]);
    l[addr[5:0]*8 +: 8] = v;
    mem[addr[31:6]] = l;
  endfunction

  function automatic logic [31:0] peek32(input logic [31:0] addr);
    line_t l;
    l = get(addr[31:6]);
    return l[addr[5:2]*32 +: 32];
  endfunction

  initial begin
    rsp_valid = 1'b0;
    rsp       = '0;
  end

  always @(posedge clk) begin
    now++;
    rsp_valid <= 1'b0;
    if (q.size() > 0 && q[0].due <= now) begin
      rsp_valid <= 1'b1;
      rsp       <= '{laddr: q[0].a, rdata: get(q[0].a)};
      void'(q.pop_front());
    end
    if (req_valid) begin
      if (req.we) begin
        mem[req.laddr] = req.wdata;
        writes++;
      end else begin
        q.push_back('{due: now + longint'(LATENCY), a: req.laddr});
        reads++;
      end
    end
    if (q.size() > max_outstanding) max_outstanding = q.size();
  end
endmodule
