// hash_collector: the hash-table (HASH) Collector, lookups only.
//
// The table is a contiguous bucket array of 2^log2_buckets buckets, 32 bytes
// each: key[127:0] in bytes 0-15, value[31:0] (a 4-byte blob or a pointer to
// a data-slab entry) in bytes 16-19; a bucket whose key is zero is empty.
// Insertions are done by software. A lookup starts at bucket
//   h = (k[31:0] ^ k[63:32] ^ k[95:64] ^ k[127:96]) mod 2^log2_buckets
// and walks the bucket array (linear probing), comparing the 128-bit key in
// hardware, until it finds the key (found = 1, value), meets an empty bucket
// or has probed every bucket (found = 0).
//
// NCTX lookups run at once, each with at most one LLC READ in flight, so the
// misses of different keys overlap. The LLC answers in order, so a small
// queue remembers which context each outstanding read belongs to; a NACKed
// read (line still being refilled) is simply reissued. Queries enter through
// q_valid/q_ready; results leave through r_valid/r_ready, in completion
// order, carrying their key.
//
// From the design: lookups only, 128-bit keys, key/value bucket array,
// several keys searched together, in-hardware key compare. Own choices: the
// bucket size, empty marker, hash function, linear probing and NCTX.
module hash_collector
  import dasx_pkg::*;
#(
  parameter int unsigned NCTX = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  hash_desc_t        desc,
  // queries
  input  logic              q_valid,
  output logic              q_ready,
  input  logic [HKEY_W-1:0] q_key,
  // results
  output logic              r_valid,
  input  logic              r_ready,
  output logic [HKEY_W-1:0] r_key,
  output logic              r_found,
  output logic [31:0]       r_value,
  output logic [31:0]       r_probes,
  // LLC
  output logic              req_valid,
  input  logic              req_ready,
  output llc_req_t          req,
  input  logic              rsp_valid,
  input  llc_rsp_t          rsp
);
  localparam int unsigned CW = (NCTX > 1) ? $clog2(NCTX) : 1;
  typedef enum logic [1:0] {C_FREE, C_ISSUE, C_WAIT, C_DONE} cstate_e;

  cstate_e           st    [NCTX];
  logic [HKEY_W-1:0] key   [NCTX];
  logic [31:0]       idx   [NCTX];
  logic [31:0]       probes[NCTX];
  logic              found [NCTX];
  logic [31:0]       value [NCTX];

  // in-order tracking of outstanding reads
  logic [CW-1:0]     ord [NCTX];
  logic [CW:0]       ord_cnt;
  logic [CW-1:0]     ord_rd, ord_wr;

  logic [31:0] mask;
  assign mask = (32'd1 << desc.log2_buckets) - 32'd1;

  function automatic logic [31:0] hash_fn(input logic [HKEY_W-1:0] k);
    return k[31:0] ^ k[63:32] ^ k[95:64] ^ k[127:96];
  endfunction

  // pick contexts
  logic [CW-1:0] free_c, iss_c, done_c;
  logic          any_free, any_iss, any_done;
  always_comb begin
    any_free = 1'b0; any_iss = 1'b0; any_done = 1'b0;
    free_c = '0; iss_c = '0; done_c = '0;
    for (int i = NCTX - 1; i >= 0; i--) begin
      if (st[i] == C_FREE)  begin any_free = 1'b1; free_c = CW'(i); end
      if (st[i] == C_ISSUE) begin any_iss  = 1'b1; iss_c  = CW'(i); end
      if (st[i] == C_DONE)  begin any_done = 1'b1; done_c = CW'(i); end
    end
  end

  logic [ADDR_W-1:0] baddr;
  assign baddr     = desc.base + (idx[iss_c] << 5);
  assign q_ready   = any_free;
  assign req_valid = any_iss && (ord_cnt < (CW+1)'(NCTX));
  assign req       = '{op: LLC_READ, laddr: baddr[ADDR_W-1:LOFF_W], wdata: '0, wmask: '0, src: '0};

  assign r_valid  = any_done;
  assign r_key    = key[done_c];
  assign r_found  = found[done_c];
  assign r_value  = value[done_c];
  assign r_probes = probes[done_c];

  // response decode
  logic [CW-1:0]     rc;
  logic [255:0]      bucket;
  logic [HKEY_W-1:0] bkey;
  logic [31:0]       bval;
  assign rc     = ord[ord_rd];
  assign bucket = idx[rc][0] ? rsp.data[511:256] : rsp.data[255:0];
  assign bkey   = bucket[127:0];
  assign bval   = bucket[159:128];

  logic issue, take, retire;
  assign issue  = req_valid && req_ready;
  assign take   = q_valid && q_ready;
  assign retire = r_valid && r_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCTX; i++) begin
        st[i] <= C_FREE; key[i] <= '0; idx[i] <= '0; probes[i] <= '0;
        found[i] <= 1'b0; value[i] <= '0; ord[i] <= '0;
      end
      ord_cnt <= '0; ord_rd <= '0; ord_wr <= '0;
    end else begin
      if (take) begin
        st[free_c]     <= C_ISSUE;
        key[free_c]    <= q_key;
        idx[free_c]    <= hash_fn(q_key) & mask;
        probes[free_c] <= '0;
      end
      if (issue) begin
        st[iss_c]   <= C_WAIT;
        ord[ord_wr] <= iss_c;
        ord_wr      <= CW'((int'(ord_wr) + 1) % NCTX);
      end
      if (rsp_valid) begin
        ord_rd <= CW'((int'(ord_rd) + 1) % NCTX);
        if (!rsp.ack) begin
          st[rc] <= C_ISSUE;
        end else if (bkey == key[rc]) begin
          st[rc] <= C_DONE; found[rc] <= 1'b1; value[rc] <= bval;
          probes[rc] <= probes[rc] + 1'b1;
        end else if (bkey == '0 || probes[rc] == mask) begin
          st[rc] <= C_DONE; found[rc] <= 1'b0; value[rc] <= '0;
          probes[rc] <= probes[rc] + 1'b1;
        end else begin
          st[rc] <= C_ISSUE;
          idx[rc] <= (idx[rc] + 1'b1) & mask;
          probes[rc] <= probes[rc] + 1'b1;
        end
      end
      if (retire) st[done_c] <= C_FREE;
      ord_cnt <= ord_cnt + (CW+1)'(issue) - (CW+1)'(rsp_valid);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> ord_cnt != 0)
    else $error("hash_collector: unexpected LLC response");
endmodule
