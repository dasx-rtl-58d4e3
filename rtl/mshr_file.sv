// mshr_file: miss status handling registers for LLC refills.
//
// Each entry remembers one outstanding DRAM read: the line address and the
// LLC way reserved for it. The LLC allocates an entry when it starts a refill
// (alloc_*, accepted only while free_cnt > 0, entry taken on the clock edge)
// and looks the returning line up by address (rsp_*, combinational match,
// entry freed on the same clock edge). The number of entries bounds how many
// misses the Collectors can keep in flight, i.e. the memory-level parallelism.
// The design studies 8 to 64 entries and uses 8 (one per PE) as its reference
// point; the default follows that. Entry layout and the first-free allocation
// are own choices.
module mshr_file
  import dasx_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned WAY_W  = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             alloc_valid,
  input  laddr_t           alloc_laddr,
  input  logic [WAY_W-1:0] alloc_way,
  input  logic             rsp_valid,
  input  laddr_t           rsp_laddr,
  output logic             rsp_hit,
  output logic [WAY_W-1:0] rsp_way,
  output logic [$clog2(N+1)-1:0] free_cnt
);
  logic [N-1:0]     busy;
  laddr_t           addr [N];
  logic [WAY_W-1:0] way  [N];

  logic [$clog2(N)-1:0] free_idx, hit_idx;
  logic                 any_free;

  always_comb begin
    any_free = 1'b0;
    free_idx = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (!busy[i]) begin any_free = 1'b1; free_idx = ($clog2(N))'(i); end
    end
    rsp_hit = 1'b0;
    hit_idx = '0;
    for (int i = 0; i < N; i++) begin
      if (busy[i] && addr[i] == rsp_laddr) begin rsp_hit = rsp_valid; hit_idx = ($clog2(N))'(i); end
    end
    rsp_way  = way[hit_idx];
    free_cnt = '0;
    for (int i = 0; i < N; i++) free_cnt += ($clog2(N+1))'(!busy[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
    end else begin
      if (rsp_hit) busy[hit_idx] <= 1'b0;
      if (alloc_valid && any_free) busy[free_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (alloc_valid && any_free) begin
      addr[free_idx] <= alloc_laddr;
      way[free_idx]  <= alloc_way;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) alloc_valid |-> any_free)
    else $error("mshr_file: allocation while full");
endmodule
