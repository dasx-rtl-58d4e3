// llc: shared last-level cache with Collector line locking (Ref#).
//
// A SETS x WAYS set-associative, write-back, write-allocate cache of 64-byte
// lines; the defaults give the 4 MB, 16-way LLC of the design. Every line
// carries a 6-bit reference counter, Ref#. A Collector LOCKs a line once for
// each group of objects a tile needs from it (allocating and refilling the
// line if absent) and UNLOCKs it as that tile retires. A line whose Ref# is
// non-zero, or whose refill is still in flight, is never chosen for
// replacement. A LOCK that would leave a set with no unlocked way is refused
// (NACK), so at least one way per set stays available to other requesters.
//
// Request port (valid/ready, one request per cycle, llc_req_t):
//   READ   hit -> ACK with the line; miss -> refill started, NACK (retry)
//   WRITE  byte-masked write into a resident, filled line -> ACK
//   LOCK   Ref#++ (allocating + refilling on a miss) -> ACK; NACK if the set
//          has no lockable way, no MSHR or Ref# would overflow
//   UNLOCK Ref#-- -> ACK
// Every request gets exactly one response, LATENCY cycles after acceptance,
// in order, tagged with the requester's src. The requester retries a NACK.
//
// Refills go to DRAM through an MSHR file; dirty victims are written back.
// DRAM read responses may return in any order and take priority over requests
// (req_ready is low in a cycle that carries one). After reset the tag store
// is cleared one set per cycle (SETS cycles) before req_ready rises.
//
// From the design: 4 MB, 16 ways, average 20-cycle access, 6-bit Ref# per
// line, the one-unlocked-way rule and Ref#-based locking. Own choices: the
// fixed latency for all responses, NACK/retry, LOCK counting per Obj-Store
// tag rather than per object, rotating victim choice. The NUCA tiles, ring
// and MESI directory of the host system are not modelled.
module llc
  import dasx_pkg::*;
#(
  parameter int unsigned SETS    = 4096,
  parameter int unsigned WAYS    = 16,
  parameter int unsigned LATENCY = 20,
  parameter int unsigned NMSHR   = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  // requests
  input  logic      req_valid,
  output logic      req_ready,
  input  llc_req_t  req,
  output logic      rsp_valid,
  output llc_rsp_t  rsp,
  // DRAM
  output logic      dram_req_valid,
  input  logic      dram_req_ready,
  output dram_req_t dram_req,
  input  logic      dram_rsp_valid,
  input  dram_rsp_t dram_rsp,
  // statistics
  output logic [31:0] stat_hits,
  output logic [31:0] stat_misses,
  output logic [31:0] stat_lock_nacks,
  output logic [31:0] stat_writebacks,
  output logic        init_done
);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned TAG_W = LADDR_W - SET_W;
  localparam int unsigned REF_W = 6;

  typedef struct packed {
    logic             valid;
    logic             dirty;
    logic             pending;   // refill in flight
    logic [REF_W-1:0] refcnt;
    logic [TAG_W-1:0] tag;
  } meta_t;

  typedef meta_t [WAYS-1:0] set_meta_t;

  set_meta_t meta [SETS];
  line_t     data [SETS*WAYS];

  // ---------------------------------------------------------------- init sweep
  logic [SET_W:0] init_cnt;
  assign init_done = init_cnt[SET_W];

  // ---------------------------------------------------------------- DRAM request queue
  localparam int unsigned QD = 4;
  dram_req_t              dq [QD];
  logic [$clog2(QD)-1:0]  dq_rd, dq_wr;
  logic [$clog2(QD):0]    dq_cnt;
  logic                   dq_push_rd, dq_push_wb, dq_pop;
  dram_req_t              dq_rd_item, dq_wb_item;

  assign dram_req_valid = dq_cnt != 0;
  assign dram_req       = dq[dq_rd];
  assign dq_pop         = dram_req_valid && dram_req_ready;

  // ---------------------------------------------------------------- MSHRs
  logic                    mshr_alloc, mshr_hit;
  logic [WAY_W-1:0]        mshr_way;
  logic [$clog2(NMSHR+1)-1:0] mshr_free;

  // ---------------------------------------------------------------- lookup
  logic [SET_W-1:0] r_set;
  logic [TAG_W-1:0] r_tag;
  set_meta_t        r_meta, r_meta_n;
  logic             r_hit;
  logic [WAY_W-1:0] r_way, v_way;
  logic             v_found;
  logic [WAY_W:0]   n_locked;
  logic [WAY_W-1:0] rr;          // rotating victim start
  logic             can_alloc;
  logic             accept;
  logic             ack;
  line_t            rdata;
  line_t            merged;
  logic             do_write, do_alloc;

  assign r_set   = req.laddr[SET_W-1:0];
  assign r_tag   = req.laddr[LADDR_W-1:SET_W];
  assign r_meta  = meta[r_set];
  assign req_ready = init_done && !dram_rsp_valid;
  assign accept  = req_valid && req_ready;

  always_comb begin
    r_hit    = 1'b0;
    r_way    = '0;
    n_locked = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (r_meta[w].valid && r_meta[w].tag == r_tag) begin r_hit = 1'b1; r_way = WAY_W'(w); end
      if (r_meta[w].valid && (r_meta[w].refcnt != 0 || r_meta[w].pending)) n_locked += 1'b1;
    end
    // victim: first replaceable way at or after rr
    v_found = 1'b0;
    v_way   = '0;
    for (int k = WAYS - 1; k >= 0; k--) begin
      logic [WAY_W-1:0] w;
      w = rr + WAY_W'(k);
      if (!r_meta[w].valid || (r_meta[w].refcnt == 0 && !r_meta[w].pending)) begin
        v_found = 1'b1; v_way = w;
      end
    end
    can_alloc = v_found && (mshr_free != 0) && (dq_cnt <= ($clog2(QD)+1)'(QD - 2));

    rdata    = data[{r_set, r_way}];
    merged   = rdata;
    for (int b = 0; b < LINE_BYTES; b++)
      if (req.wmask[b]) merged[b*8 +: 8] = req.wdata[b*8 +: 8];

    r_meta_n   = r_meta;
    ack        = 1'b0;
    do_write   = 1'b0;
    do_alloc   = 1'b0;
    dq_rd_item = '{we: 1'b0, laddr: req.laddr, wdata: '0};
    dq_wb_item = '{we: 1'b1, laddr: {r_meta[v_way].tag, r_set}, wdata: data[{r_set, v_way}]};
    dq_push_wb = 1'b0;

    if (accept) begin
      unique case (req.op)
        LLC_READ: begin
          if (r_hit) ack = !r_meta[r_way].pending;
          else       do_alloc = can_alloc;
        end
        LLC_WRITE: begin
          if (r_hit && !r_meta[r_way].pending) begin
            ack = 1'b1; do_write = 1'b1;
            r_meta_n[r_way].dirty = 1'b1;
          end
        end
        LLC_LOCK: begin
          if (r_hit) begin
            if (r_meta[r_way].refcnt != '1 &&
                (r_meta[r_way].refcnt != 0 || r_meta[r_way].pending || n_locked < (WAY_W+1)'(WAYS - 1))) begin
              ack = 1'b1;
              r_meta_n[r_way].refcnt = r_meta[r_way].refcnt + 1'b1;
            end
          end else if (can_alloc && n_locked < (WAY_W+1)'(WAYS - 1)) begin
            ack = 1'b1; do_alloc = 1'b1;
          end
        end
        LLC_UNLOCK: begin
          ack = 1'b1;
          if (r_hit && r_meta[r_way].refcnt != 0)
            r_meta_n[r_way].refcnt = r_meta[r_way].refcnt - 1'b1;
        end
        default: ;
      endcase
      if (do_alloc) begin
        dq_push_wb = r_meta[v_way].valid && r_meta[v_way].dirty;
        r_meta_n[v_way] = '{valid: 1'b1, dirty: 1'b0, pending: 1'b1,
                            refcnt: (req.op == LLC_LOCK) ? REF_W'(1) : REF_W'(0), tag: r_tag};
      end
    end
  end

  assign mshr_alloc = do_alloc;
  assign dq_push_rd = do_alloc;

  mshr_file #(.N(NMSHR), .WAY_W(WAY_W)) u_mshr (
    .clk, .rst_n,
    .alloc_valid(mshr_alloc), .alloc_laddr(req.laddr), .alloc_way(v_way),
    .rsp_valid(dram_rsp_valid), .rsp_laddr(dram_rsp.laddr),
    .rsp_hit(mshr_hit), .rsp_way(mshr_way), .free_cnt(mshr_free)
  );

  // ---------------------------------------------------------------- state
  logic [SET_W-1:0] f_set;
  assign f_set = dram_rsp.laddr[SET_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_cnt <= '0;
      rr       <= '0;
      dq_rd    <= '0;
      dq_wr    <= '0;
      dq_cnt   <= '0;
      stat_hits <= '0; stat_misses <= '0; stat_lock_nacks <= '0; stat_writebacks <= '0;
    end else begin
      if (!init_done) init_cnt <= init_cnt + 1'b1;
      if (accept) rr <= rr + 1'b1;
      // queue
      begin
        logic [$clog2(QD)-1:0] wp;
        logic [$clog2(QD):0]   c;
        wp = dq_wr;
        c  = dq_cnt;
        if (dq_pop) begin dq_rd <= dq_rd + 1'b1; c = c - 1'b1; end
        if (dq_push_wb) begin wp = wp + 1'b1; c = c + 1'b1; end
        if (dq_push_rd) begin wp = wp + 1'b1; c = c + 1'b1; end
        dq_wr  <= wp;
        dq_cnt <= c;
      end
      if (accept && req.op != LLC_UNLOCK) begin
        if (r_hit)   stat_hits   <= stat_hits + 1'b1;
        if (do_alloc) stat_misses <= stat_misses + 1'b1;
      end
      if (accept && req.op == LLC_LOCK && !ack) stat_lock_nacks <= stat_lock_nacks + 1'b1;
      if (dq_push_wb) stat_writebacks <= stat_writebacks + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!init_done) begin
      meta[init_cnt[SET_W-1:0]] <= '0;
    end else begin
      if (accept) meta[r_set] <= r_meta_n;
      if (dram_rsp_valid && mshr_hit) begin
        meta[f_set][mshr_way].pending <= 1'b0;
        data[{f_set, mshr_way}]       <= dram_rsp.rdata;
      end
    end
    if (do_write) data[{r_set, r_way}] <= merged;
    if (dq_push_wb) dq[dq_wr] <= dq_wb_item;
    if (dq_push_rd) dq[dq_wr + ($clog2(QD))'(dq_push_wb)] <= dq_rd_item;
  end

  // ---------------------------------------------------------------- response pipe
  logic     pv [LATENCY];
  llc_rsp_t pd [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) pv[i] <= 1'b0;
    end else begin
      pv[0] <= accept;
      for (int i = 1; i < LATENCY; i++) pv[i] <= pv[i-1];
    end
  end

  always_ff @(posedge clk) begin
    pd[0] <= '{src: req.src, ack: ack, data: rdata};
    for (int i = 1; i < LATENCY; i++) pd[i] <= pd[i-1];
  end

  assign rsp_valid = pv[LATENCY-1];
  assign rsp       = pd[LATENCY-1];

  assert property (@(posedge clk) disable iff (!rst_n)
                   accept && req.op == LLC_WRITE |-> ack)
    else $error("llc: WRITE to a line that is not resident");
  assert property (@(posedge clk) disable iff (!rst_n)
                   dram_rsp_valid |-> mshr_hit)
    else $error("llc: DRAM response without MSHR");
endmodule
