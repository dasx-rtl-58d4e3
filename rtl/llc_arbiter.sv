// llc_arbiter: shares the single LLC request port among several requesters.
//
// Requesters present valid/req and hold them until ready. A round-robin
// pointer picks one valid requester per cycle (the one after the last winner),
// stamps its index into req.src and forwards it; ready goes back to the
// winner only when the LLC accepts. LLC responses carry src back, and
// rsp_valid is raised only for the requester that matches. The design shows
// the Collectors sharing the LLC but not how; round-robin is an own choice.
module llc_arbiter
  import dasx_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic     [N-1:0]    in_valid,
  output logic     [N-1:0]    in_ready,
  input  llc_req_t [N-1:0]    in_req,
  output logic     [N-1:0]    in_rsp_valid,
  output llc_rsp_t            in_rsp,
  output logic                out_valid,
  input  logic                out_ready,
  output llc_req_t            out_req,
  input  logic                out_rsp_valid,
  input  llc_rsp_t            out_rsp
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] last, win;
  logic          any;

  always_comb begin
    any = 1'b0;
    win = '0;
    for (int k = N; k >= 1; k--) begin
      int unsigned i;
      i = (int'(last) + k) % N;
      if (in_valid[i]) begin any = 1'b1; win = IW'(i); end
    end
    out_valid   = any;
    out_req     = in_req[win];
    out_req.src = src_t'(win);
    in_ready    = '0;
    if (any) in_ready[win] = out_ready;
    in_rsp      = out_rsp;
    for (int i = 0; i < N; i++) in_rsp_valid[i] = out_rsp_valid && out_rsp.src == src_t'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      last <= IW'(N - 1);
    else if (any && out_ready)       last <= win;
  end
endmodule
