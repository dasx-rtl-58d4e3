// collector_group: a group of vector Collectors running in lock-step.
//
// The group drives one iterative loop of trip_count iterations over up to
// NCOLL vectors (one VEC descriptor each). It cuts the loop into tiles, sized
// so that every object a tile needs fits in the Obj-Store's NTAGS tags, and
// runs two engines:
//
//  * Prefetcher: for each tile in turn, sizes it (the largest T whose blocks
//    fit, searched downwards from 8*NTAGS for the first tile and from the
//    previous tile's size + 8 after that), then LOCKs in the LLC every line
//    the tile needs, in iteration order (block 0 of every vector, then block
//    1, ...), one request per cycle. Blocks whose LOCK was refused (set full
//    of locked lines, no free MSHR) are locked in a further pass once all
//    responses of the pass are back. The LLC refills missing lines from DRAM
//    in the background, so many misses are in flight at once. Finished tiles
//    are queued (RUNAHEAD deep), so the prefetcher runs that many tiles ahead
//    of the PEs.
//  * Refill engine: takes the oldest queued tile, READs each block from the
//    LLC into an Obj-Store tag with its backpointer, pulses tile_go to
//    release the PEs, waits until all PEs wait at the tile barrier
//    (pe_wait_all), WRITEs every dirty tag back to its LLC line, UNLOCKs the
//    tile's lines, clears the Obj-Store and moves on. READs, WRITEs and
//    UNLOCKs are issued one per cycle; a NACKed READ (line still arriving
//    from DRAM) makes the engine drop the younger READ responses and replay
//    from the refused block. After the last tile it raises loop_done (held
//    until the next start).
//
// Tiles are locked strictly one after another, so the oldest tile never waits
// for space held by a younger one; that is what makes the group deadlock-free
// (the design's rule that space for iteration i is allocated before any for
// i+1, applied per tile, the unit in which the PEs consume data). Only one
// constraint remains: the lines one tile needs from a single LLC set must fit
// in the set's lockable ways.
// From the design: the group, iteration-order allocation, tiling to the
// Obj-Store, run-ahead with locked lines, write-back and unlock at tile end.
// Own choices: block-granular locking (one Ref# per Obj-Store tag), the tile
// sizing search, pass-based LOCK retry, replay of READs after a NACK,
// RUNAHEAD = 2, and the two LLC ports (src ids set by the arbiter).
// Timing: tile_go is a one-cycle pulse; tile_start/tile_end are stable from
// tile_go until the next tile; loop_done is a level.
module collector_group
  import dasx_pkg::*;
#(
  parameter int unsigned NTAGS    = 32,
  parameter int unsigned RUNAHEAD = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // control
  input  logic                    start,
  input  vec_desc_t [NCOLL-1:0]   desc,
  input  key_t                    trip_count,
  output logic                    busy,
  // PE array
  output logic                    tile_go,
  output key_t                    tile_start,
  output key_t                    tile_end,
  output logic                    loop_done,
  input  logic                    pe_wait_all,
  // Obj-Store
  output logic                    os_fill_valid,
  output logic [$clog2(NTAGS)-1:0] os_fill_idx,
  output coll_id_t                os_fill_coll,
  output key_t                    os_fill_kbase,
  output logic [SECTORS-1:0]      os_fill_svalid,
  output logic [ADDR_W-1:0]       os_fill_bp,
  output logic [2:0]              os_fill_esize,
  output logic [SECTORS-1:0][31:0] os_fill_data,
  output logic [$clog2(NTAGS)-1:0] os_rd_idx,
  input  logic                    os_rd_valid,
  input  logic                    os_rd_dirty,
  input  logic [SECTORS-1:0]      os_rd_svalid,
  input  logic [ADDR_W-1:0]       os_rd_bp,
  input  logic [2:0]              os_rd_esize,
  input  logic [SECTORS-1:0][31:0] os_rd_data,
  output logic                    os_clear,
  // LLC port of the prefetcher
  output logic                    pf_req_valid,
  input  logic                    pf_req_ready,
  output llc_req_t                pf_req,
  input  logic                    pf_rsp_valid,
  input  llc_rsp_t                pf_rsp,
  // LLC port of the refill engine
  output logic                    rf_req_valid,
  input  logic                    rf_req_ready,
  output llc_req_t                rf_req,
  input  logic                    rf_rsp_valid,
  input  llc_rsp_t                rf_rsp,
  // statistics
  output logic [31:0]             stat_tiles,
  output logic [31:0]             stat_lock_retries,
  output logic [31:0]             stat_fill_retries,
  output logic [31:0]             stat_writebacks,
  output logic [31:0]             stat_pe_stall_cycles
);
  localparam int unsigned TI_W = $clog2(NTAGS);
  localparam key_t MAXT = key_t'(NTAGS * SECTORS);

  // ---------------------------------------------------------------- tile queue
  key_t                 q_start [RUNAHEAD];
  key_t                 q_len   [RUNAHEAD];
  logic [$clog2(RUNAHEAD+1)-1:0] q_cnt;
  logic [$clog2(RUNAHEAD)-1:0]   q_rd, q_wr;
  logic                 q_push, q_pop;

  // ---------------------------------------------------------------- AGUs
  key_t   pf_start, pf_len, pf_b, rf_start, rf_len, rf_b;
  coll_id_t pf_c, rf_c;
  key_t   [NCOLL-1:0] pf_nblk, rf_nblk;
  laddr_t [NCOLL-1:0] pf_laddr, rf_laddr;
  key_t   [NCOLL-1:0] rf_kbase;
  logic   [NCOLL-1:0][SECTORS-1:0] rf_svalid;
  logic   [NCOLL-1:0][ADDR_W-1:0]  rf_addr;
  logic   [NCOLL-1:0][LOFF_W-1:0]  rf_loff;

  for (genvar c = 0; c < NCOLL; c++) begin : g_agu
    key_t               u_kb;
    logic [SECTORS-1:0] u_sv;
    logic [ADDR_W-1:0]  u_ad;
    logic [LOFF_W-1:0]  u_lo;
    vec_agu u_pf (.desc(desc[c]), .tile_start(pf_start), .tile_len(pf_len), .blk(pf_b),
                  .nblk(pf_nblk[c]), .kbase(u_kb), .svalid(u_sv), .addr(u_ad),
                  .laddr(pf_laddr[c]), .loff(u_lo));
    vec_agu u_rf (.desc(desc[c]), .tile_start(rf_start), .tile_len(rf_len), .blk(rf_b),
                  .nblk(rf_nblk[c]), .kbase(rf_kbase[c]), .svalid(rf_svalid[c]),
                  .addr(rf_addr[c]), .laddr(rf_laddr[c]), .loff(rf_loff[c]));
  end

  key_t pf_sum, pf_max, rf_max;
  always_comb begin
    pf_sum = '0; pf_max = '0; rf_max = '0;
    for (int c = 0; c < NCOLL; c++) begin
      pf_sum += pf_nblk[c];
      if (pf_nblk[c] > pf_max) pf_max = pf_nblk[c];
      if (rf_nblk[c] > rf_max) rf_max = rf_nblk[c];
    end
  end

  // ---------------------------------------------------------------- prefetcher
  typedef enum logic [2:0] {PF_IDLE, PF_SIZE, PF_LOCK, PF_PUSH} pf_state_e;
  pf_state_e pf_st;
  logic      pf_item;
  key_t      pf_remain, pf_last;
  logic [NTAGS-1:0] pf_done;   // blocks of this tile already locked
  logic [TI_W:0]    pf_k;      // index of the current block within the tile
  logic             pf_fail;   // a LOCK of this pass was refused
  logic             pf_issue;
  // tile-block index of each LOCK in flight, oldest first (LLC answers in order)
  logic [TI_W-1:0]  pk_q [32];
  logic [4:0]       pk_rd, pk_wr;
  logic [5:0]       pk_cnt;

  assign pf_item   = pf_b < pf_nblk[pf_c];
  assign pf_remain = trip_count - pf_start;
  assign q_push    = (pf_st == PF_PUSH) && (q_cnt < ($clog2(RUNAHEAD+1))'(RUNAHEAD));

  assign pf_req_valid = (pf_st == PF_LOCK) && (pf_b < pf_max) && pf_item &&
                        !pf_done[pf_k[TI_W-1:0]] && pk_cnt < 6'd32;
  assign pf_issue     = pf_req_valid && pf_req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pk_rd <= '0; pk_wr <= '0; pk_cnt <= '0;
    end else begin
      if (pf_issue)    pk_wr <= pk_wr + 1'b1;
      if (pf_rsp_valid) pk_rd <= pk_rd + 1'b1;
      pk_cnt <= pk_cnt + 6'(pf_issue) - 6'(pf_rsp_valid);
    end
  end

  always_ff @(posedge clk) begin
    if (pf_issue) pk_q[pk_wr] <= pf_k[TI_W-1:0];
  end
  assign pf_req       = '{op: LLC_LOCK, laddr: pf_laddr[pf_c], wdata: '0, wmask: '0, src: '0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pf_st <= PF_IDLE; pf_start <= '0; pf_len <= '0; pf_b <= '0; pf_c <= '0;
      pf_last <= '0; pf_done <= '0; pf_k <= '0; pf_fail <= 1'b0;
      stat_lock_retries <= '0;
    end else begin
      unique case (pf_st)
        PF_IDLE: if (start && trip_count != 0) begin
          pf_start <= '0;
          pf_len   <= (trip_count < MAXT) ? trip_count : MAXT;
          pf_st    <= PF_SIZE;
        end
        PF_SIZE: begin
          if (pf_sum <= key_t'(NTAGS) || pf_len == key_t'(1)) begin
            pf_b <= '0; pf_c <= '0; pf_k <= '0; pf_done <= '0; pf_fail <= 1'b0;
            pf_last <= pf_len;
            pf_st <= PF_LOCK;
          end else begin
            pf_len <= pf_len - key_t'(1);
          end
        end
        // One pass issues a LOCK per block not yet locked, one per cycle, in
        // iteration order; refused blocks are tried again in the next pass.
        PF_LOCK: begin
          if (pf_rsp_valid) begin
            if (pf_rsp.ack) pf_done[pk_q[pk_rd]] <= 1'b1;
            else begin
              pf_fail <= 1'b1;
              stat_lock_retries <= stat_lock_retries + 1'b1;
            end
          end
          if (pf_b >= pf_max) begin
            if (pk_cnt == 0) begin
              if (pf_fail) begin
                pf_b <= '0; pf_c <= '0; pf_k <= '0; pf_fail <= 1'b0;
              end else pf_st <= PF_PUSH;
            end
          end else if (!pf_item) begin
            pf_c <= pf_c + 1'b1;
            if (pf_c == coll_id_t'(NCOLL - 1)) pf_b <= pf_b + key_t'(1);
          end else if (pf_done[pf_k[TI_W-1:0]] || pf_issue) begin
            pf_c <= pf_c + 1'b1;
            if (pf_c == coll_id_t'(NCOLL - 1)) pf_b <= pf_b + key_t'(1);
            pf_k <= pf_k + 1'b1;
          end
        end
        PF_PUSH: if (q_push) begin
          pf_start <= pf_start + pf_len;
          if (pf_remain == pf_len) pf_st <= PF_IDLE;
          else begin
            // search down from one block above the last tile's size
            pf_len <= (pf_remain - pf_len < pf_last + key_t'(SECTORS)) ? pf_remain - pf_len
                                                                     : pf_last + key_t'(SECTORS);
            pf_st  <= PF_SIZE;
          end
        end
        default: pf_st <= PF_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- refill engine
  typedef enum logic [3:0] {RF_IDLE, RF_WAITQ, RF_LOAD, RF_GO, RF_RUN,
                            RF_WB, RF_UNLOCK, RF_RETIRE, RF_DONE} rf_state_e;
  rf_state_e       rf_st;
  logic            rf_item;
  logic [TI_W:0]   tag_cnt;   // tags filled in this tile
  logic [TI_W:0]   wb_idx;
  logic [7:0]      rf_out;    // WRITE/UNLOCK requests awaiting their response
  logic            rf_issue, rf_retn;

  assign rf_item = rf_b < rf_nblk[rf_c];

  // READs of the Obj-Store load still in flight, oldest first. The LLC
  // answers in order, so the head always belongs to the next response. After
  // a NACK the later responses are dropped and issue restarts at the refused
  // block once all are back (replay), which keeps tags filled in order.
  localparam int unsigned LQ = 32;   // above the LLC's latency, so never the limit
  typedef struct packed {
    key_t               b;
    coll_id_t           c;
    logic [TI_W-1:0]    k;        // Obj-Store tag it fills
    key_t               kbase;
    logic [SECTORS-1:0] svalid;
    logic [ADDR_W-1:0]  addr;
  } ld_item_t;
  ld_item_t                lq [LQ];
  ld_item_t                lq_head;
  logic [$clog2(LQ)-1:0]   lq_rd, lq_wr;
  logic [$clog2(LQ):0]     lq_cnt;
  logic                    lq_push, lq_pop, ld_squash;
  logic [TI_W:0]           k_iss;    // tag index of the next READ issued
  key_t                    rb_b;
  coll_id_t                rb_c;
  logic [TI_W-1:0]         rb_k;

  assign lq_head = lq[lq_rd];
  assign lq_push = (rf_st == RF_LOAD) && rf_req_valid && rf_req_ready;
  assign lq_pop  = (rf_st == RF_LOAD) && rf_rsp_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lq_rd <= '0; lq_wr <= '0; lq_cnt <= '0;
    end else begin
      if (lq_push) lq_wr <= lq_wr + 1'b1;
      if (lq_pop)  lq_rd <= lq_rd + 1'b1;
      lq_cnt <= lq_cnt + ($clog2(LQ)+1)'(lq_push) - ($clog2(LQ)+1)'(lq_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (lq_push)
      lq[lq_wr] <= '{b: rf_b, c: rf_c, k: k_iss[TI_W-1:0], kbase: rf_kbase[rf_c],
                     svalid: rf_svalid[rf_c], addr: rf_addr[rf_c]};
  end
  assign q_pop   = (rf_st == RF_RETIRE);

  // extraction of one block from an LLC line
  line_t rsp_line;
  assign rsp_line = rf_rsp.data;
  always_comb begin
    for (int s = 0; s < SECTORS; s++) begin
      int unsigned boff;
      boff = int'(lq_head.addr[LOFF_W-1:0]) + s * int'(desc[lq_head.c].elem_bytes);
      os_fill_data[s] = '0;
      if (lq_head.svalid[s]) begin
        unique case (desc[lq_head.c].elem_bytes)
          3'd1:    os_fill_data[s] = {24'h0, rsp_line[(boff%LINE_BYTES)*8 +: 8]};
          3'd2:    os_fill_data[s] = {16'h0, rsp_line[(boff%LINE_BYTES)*8 +: 16]};
          default: os_fill_data[s] = rsp_line[(boff%LINE_BYTES)*8 +: 32];
        endcase
      end
    end
  end
  assign os_fill_valid  = lq_pop && rf_rsp.ack && !ld_squash;
  assign os_fill_idx    = lq_head.k;
  assign os_fill_coll   = lq_head.c;
  assign os_fill_kbase  = lq_head.kbase;
  assign os_fill_svalid = lq_head.svalid;
  assign os_fill_bp     = lq_head.addr;
  assign os_fill_esize  = desc[lq_head.c].elem_bytes;
  assign os_rd_idx      = wb_idx[TI_W-1:0];
  assign os_clear       = (rf_st == RF_RETIRE);

  // write-back line built from one dirty tag
  line_t  wb_data;
  bmask_t wb_mask;
  always_comb begin
    wb_data = '0;
    wb_mask = '0;
    for (int s = 0; s < SECTORS; s++) begin
      int unsigned boff;
      boff = int'(os_rd_bp[LOFF_W-1:0]) + s * int'(os_rd_esize);
      if (os_rd_svalid[s]) begin
        unique case (os_rd_esize)
          3'd1: begin
            wb_data[(boff%LINE_BYTES)*8 +: 8]  = os_rd_data[s][7:0];
            wb_mask[boff%LINE_BYTES +: 1]      = 1'b1;
          end
          3'd2: begin
            wb_data[(boff%LINE_BYTES)*8 +: 16] = os_rd_data[s][15:0];
            wb_mask[boff%LINE_BYTES +: 2]      = 2'b11;
          end
          default: begin
            wb_data[(boff%LINE_BYTES)*8 +: 32] = os_rd_data[s];
            wb_mask[boff%LINE_BYTES +: 4]      = 4'hf;
          end
        endcase
      end
    end
  end

  always_comb begin
    rf_req_valid = 1'b0;
    rf_req       = '{op: LLC_READ, laddr: rf_laddr[rf_c], wdata: '0, wmask: '0, src: '0};
    unique case (rf_st)
      RF_LOAD:   rf_req_valid = (rf_b < rf_max) && rf_item && !ld_squash &&
                                 lq_cnt < ($clog2(LQ)+1)'(LQ);
      RF_WB: begin
        rf_req_valid = (wb_idx != tag_cnt) && os_rd_valid && os_rd_dirty;
        rf_req = '{op: LLC_WRITE, laddr: os_rd_bp[ADDR_W-1:LOFF_W], wdata: wb_data,
                   wmask: wb_mask, src: '0};
      end
      RF_UNLOCK: begin
        rf_req_valid = (rf_b < rf_max) && rf_item;
        rf_req.op    = LLC_UNLOCK;
      end
      default: ;
    endcase
  end

  assign tile_go    = (rf_st == RF_GO);
  assign tile_start = rf_start;
  assign tile_end   = rf_start + rf_len;
  assign loop_done  = (rf_st == RF_DONE);
  assign busy       = (rf_st != RF_IDLE) && (rf_st != RF_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rf_st <= RF_IDLE; rf_start <= '0; rf_len <= '0; rf_b <= '0; rf_c <= '0;
      tag_cnt <= '0; wb_idx <= '0; k_iss <= '0; ld_squash <= 1'b0;
      rb_b <= '0; rb_c <= '0; rb_k <= '0;
      stat_tiles <= '0; stat_fill_retries <= '0; stat_writebacks <= '0;
      stat_pe_stall_cycles <= '0;
    end else begin
      unique case (rf_st)
        RF_IDLE, RF_DONE: if (start && trip_count != 0) rf_st <= RF_WAITQ;
        RF_WAITQ: begin
          stat_pe_stall_cycles <= stat_pe_stall_cycles + 1'b1;
          if (q_cnt != 0) begin
            rf_start <= q_start[q_rd];
            rf_len   <= q_len[q_rd];
            rf_b <= '0; rf_c <= '0; tag_cnt <= '0; k_iss <= '0;
            rf_st <= RF_LOAD;
          end
        end
        // READs are issued one per cycle; a NACK (line still arriving from
        // DRAM) drops the younger responses and replays from that block.
        RF_LOAD: begin
          stat_pe_stall_cycles <= stat_pe_stall_cycles + 1'b1;
          if (lq_pop && !ld_squash && !rf_rsp.ack) begin
            ld_squash <= 1'b1;
            rb_b <= lq_head.b; rb_c <= lq_head.c; rb_k <= lq_head.k;
            stat_fill_retries <= stat_fill_retries + 1'b1;
          end
          if (ld_squash) begin
            if (lq_cnt == 0) begin
              rf_b <= rb_b; rf_c <= rb_c; k_iss <= {1'b0, rb_k}; ld_squash <= 1'b0;
            end
          end else if (rf_b >= rf_max) begin
            if (lq_cnt == 0) begin tag_cnt <= k_iss; rf_st <= RF_GO; end
          end else if (!rf_item || lq_push) begin
            rf_c <= rf_c + 1'b1;
            if (rf_c == coll_id_t'(NCOLL - 1)) rf_b <= rf_b + key_t'(1);
            if (rf_item) k_iss <= k_iss + 1'b1;
          end
        end
        RF_GO:  rf_st <= RF_RUN;
        RF_RUN: if (pe_wait_all) begin wb_idx <= '0; rf_st <= RF_WB; end
        // WRITEs and UNLOCKs are always accepted by the LLC, so they are
        // issued back to back; a phase ends when all its responses are back.
        RF_WB: begin
          if (wb_idx == tag_cnt) begin
            if (rf_out == 0 && !rf_retn) begin rf_b <= '0; rf_c <= '0; rf_st <= RF_UNLOCK; end
          end else if (!(os_rd_valid && os_rd_dirty)) wb_idx <= wb_idx + 1'b1;
          else if (rf_req_ready) begin
            wb_idx <= wb_idx + 1'b1;
            stat_writebacks <= stat_writebacks + 1'b1;
          end
        end
        RF_UNLOCK: begin
          if (rf_b >= rf_max) begin
            if (rf_out == 0 && !rf_retn) rf_st <= RF_RETIRE;
          end else if (!rf_item || rf_req_ready) begin
            rf_c <= rf_c + 1'b1;
            if (rf_c == coll_id_t'(NCOLL - 1)) rf_b <= rf_b + key_t'(1);
          end
        end
        RF_RETIRE: begin
          stat_tiles <= stat_tiles + 1'b1;
          rf_st <= (rf_start + rf_len == trip_count) ? RF_DONE : RF_WAITQ;
        end
        default: rf_st <= RF_IDLE;
      endcase
    end
  end

  assign rf_issue = rf_req_valid && rf_req_ready && (rf_st == RF_WB || rf_st == RF_UNLOCK);
  assign rf_retn  = rf_rsp_valid && (rf_st == RF_WB || rf_st == RF_UNLOCK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rf_out <= '0;
    else        rf_out <= rf_out + 8'(rf_issue) - 8'(rf_retn);
  end

  // ---------------------------------------------------------------- queue state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_cnt <= '0; q_rd <= '0; q_wr <= '0;
    end else begin
      if (q_push) q_wr <= ($clog2(RUNAHEAD))'((int'(q_wr) + 1) % RUNAHEAD);
      if (q_pop)  q_rd <= ($clog2(RUNAHEAD))'((int'(q_rd) + 1) % RUNAHEAD);
      q_cnt <= q_cnt + ($clog2(RUNAHEAD+1))'(q_push) - ($clog2(RUNAHEAD+1))'(q_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (q_push) begin
      q_start[q_wr] <= pf_start;
      q_len[q_wr]   <= pf_len;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   rf_retn |-> rf_rsp.ack)
    else $error("collector_group: write-back or unlock refused by the LLC");
endmodule
