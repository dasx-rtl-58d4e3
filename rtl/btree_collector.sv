// btree_collector: the BTree Collector, searches only.
//
// A node is a vector of BT_ORDER value entries of 16 bytes: key[63:0] in
// bytes 0-7, data payload[31:0] in bytes 8-11 and the sub-tree pointer in
// bytes 12-15 (0: no sub-tree). Keys ascend within a node; unused entries and
// the last entry hold key = all ones, whose sub-tree pointer leads to the keys
// above all others. A node is 128-byte aligned and spans two LLC lines.
//
// For each level the Collector reads both lines of the node in parallel
// (two LLC READs back to back, NACKed ones reissued), then does the range
// check of all entries at once: the first entry with search key <= entry key
// is chosen; an equal key ends the search with its payload (found = 1), a null
// sub-tree pointer ends it with found = 0, otherwise the search descends to
// the sub-tree. Levels are followed one after the other (pointer chasing).
// One query at a time: q_valid/q_ready in, r_valid/r_ready out with the level
// count. Keys equal to all ones cannot be searched.
//
// From the design: 64-bit keys, root pointer and node description in the
// descriptor, nodes as vectors of value entries {key, payload, sub-tree
// pointer}, parallel range check per level, order 5, no insertions. Own
// choices: the byte layout, sentinel and alignment.
module btree_collector
  import dasx_pkg::*;
#(
  parameter int unsigned ORDER = BT_ORDER
) (
  input  logic              clk,
  input  logic              rst_n,
  input  btree_desc_t       desc,
  input  logic              q_valid,
  output logic              q_ready,
  input  logic [BKEY_W-1:0] q_key,
  output logic              r_valid,
  input  logic              r_ready,
  output logic              r_found,
  output logic [31:0]       r_payload,
  output logic [7:0]        r_levels,
  // LLC
  output logic              req_valid,
  input  logic              req_ready,
  output llc_req_t          req,
  input  logic              rsp_valid,
  input  llc_rsp_t          rsp
);
  typedef enum logic [1:0] {B_IDLE, B_FETCH, B_CHECK, B_DONE} bstate_e;
  bstate_e st;

  logic [BKEY_W-1:0] key;
  logic [ADDR_W-1:0] node;
  line_t             ln [2];
  logic [1:0]        need;       // lines still to be (re)issued
  logic              ord [2];    // line of each in-flight read, in issue order
  logic              ord_wr, ord_rd;
  logic [1:0]        inflight;

  // issue the lowest needed line
  logic              sel;
  assign sel       = need[0] ? 1'b0 : 1'b1;
  assign req_valid = (st == B_FETCH) && (need != 0);
  assign req       = '{op: LLC_READ, laddr: node[ADDR_W-1:LOFF_W] | LADDR_W'(sel),
                       wdata: '0, wmask: '0, src: '0};
  assign q_ready   = (st == B_IDLE);
  assign r_valid   = (st == B_DONE);

  // parallel range check
  logic [2*LINE_BITS-1:0] nbytes;
  logic [ORDER-1:0]       le, eq;
  logic [BKEY_W-1:0]      ekey  [ORDER];
  logic [31:0]            epay  [ORDER];
  logic [31:0]            echild[ORDER];
  int unsigned            pick;
  logic                   any;
  always_comb begin
    nbytes = {ln[1], ln[0]};
    for (int i = 0; i < ORDER; i++) begin
      ekey[i]   = nbytes[i*128 +: 64];
      epay[i]   = nbytes[i*128 + 64 +: 32];
      echild[i] = nbytes[i*128 + 96 +: 32];
      le[i]     = key <= ekey[i];
      eq[i]     = key == ekey[i];
    end
    pick = ORDER - 1;
    any  = 1'b0;
    for (int i = ORDER - 1; i >= 0; i--) if (le[i]) begin pick = i; any = 1'b1; end
  end

  logic issue, which;
  assign issue = req_valid && req_ready;
  assign which = ord[ord_rd];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= B_IDLE; key <= '0; node <= '0; need <= '0;
      ord[0] <= 1'b0; ord[1] <= 1'b0; ord_wr <= 1'b0; ord_rd <= 1'b0; inflight <= '0;
      ln[0] <= '0; ln[1] <= '0;
      r_found <= 1'b0; r_payload <= '0; r_levels <= '0;
    end else begin
      begin
        logic [1:0] nd;
        nd = need;
        if (issue) begin
          nd[sel]     = 1'b0;
          ord[ord_wr] <= sel;
          ord_wr      <= ~ord_wr;
        end
        if (rsp_valid) begin
          ord_rd <= ~ord_rd;
          if (rsp.ack) ln[which] <= rsp.data;
          else         nd[which] = 1'b1;      // refill in flight: ask again
        end
        need     <= nd;
        inflight <= inflight + 2'(issue) - 2'(rsp_valid);
      end
      unique case (st)
        B_IDLE: if (q_valid) begin
          key <= q_key; node <= desc.root; need <= 2'b11; r_levels <= '0;
          st <= B_FETCH;
        end
        B_FETCH: if (need == 2'b00 && inflight == 2'd0) st <= B_CHECK;
        B_CHECK: begin
          r_levels <= r_levels + 1'b1;
          if (any && eq[pick]) begin
            r_found <= 1'b1; r_payload <= epay[pick]; st <= B_DONE;
          end else if (echild[pick] == 32'h0) begin
            r_found <= 1'b0; r_payload <= '0; st <= B_DONE;
          end else begin
            node <= echild[pick]; need <= 2'b11; st <= B_FETCH;
          end
        end
        B_DONE: if (r_ready) st <= B_IDLE;
        default: st <= B_IDLE;
      endcase
    end
  end
endmodule
