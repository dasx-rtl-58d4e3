// dasx_top: the DASX accelerator next to the shared last-level cache.
//
// NPE processing elements run the compute kernel of an iterative loop out of
// a shared instruction buffer and touch data only through key-based LD/ST to
// the shared Obj-Store. A vector Collector group runs ahead of them: it tiles
// the loop to the Obj-Store, locks the tiles' lines in the LLC (which refills
// them from DRAM through its MSHRs), loads each tile into the Obj-Store,
// releases the PEs, and writes back and unlocks when all PEs wait at the tile
// barrier (a PE waiting there, or halted, also counts as arrived at a BAR
// barrier). A hash-table Collector and a BTree Collector serve lookups straight
// from the LLC without the PEs. The host reaches the LLC through its own port
// (this is how it reads results and stands for the host cores' traffic).
//
// LLC requesters, in arbiter order: 0 group prefetcher, 1 group refill
// engine, 2 hash Collector, 3 BTree Collector, 4 host.
//
// Host use of the vector path: load the kernel (ib_*), set vec_desc and
// trip_count, pulse vec_start, wait for vec_done (loop finished and every PE
// halted). vec_desc and trip_count must stay stable while the loop runs.
//
// Defaults follow the design's main configuration: 8 PEs, 256-entry
// instruction buffer, 1 KB Obj-Store with 32 tags, 4 MB 16-way LLC with
// 20-cycle access, 8 MSHRs. The FPU, the DTLB (physical addresses are used)
// and the host cores are not part of this RTL; DRAM is outside.
module dasx_top
  import dasx_pkg::*;
#(
  parameter int unsigned NPE         = 8,
  parameter int unsigned NTAGS       = 32,
  parameter int unsigned LLC_SETS    = 4096,
  parameter int unsigned LLC_WAYS    = 16,
  parameter int unsigned LLC_LATENCY = 20,
  parameter int unsigned NMSHR       = 8,
  parameter int unsigned HASH_CTX    = 4,
  parameter int unsigned RUNAHEAD    = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // kernel load
  input  logic                  ib_we,
  input  logic [PC_W-1:0]       ib_waddr,
  input  logic [31:0]           ib_wdata,
  // vector loop control
  input  vec_desc_t [NCOLL-1:0] vec_desc,
  input  key_t                  trip_count,
  input  logic                  vec_start,
  output logic                  vec_busy,
  output logic                  vec_done,
  // hash lookups
  input  hash_desc_t            hash_desc,
  input  logic                  hq_valid,
  output logic                  hq_ready,
  input  logic [HKEY_W-1:0]     hq_key,
  output logic                  hr_valid,
  input  logic                  hr_ready,
  output logic [HKEY_W-1:0]     hr_key,
  output logic                  hr_found,
  output logic [31:0]           hr_value,
  // BTree searches
  input  btree_desc_t           bt_desc,
  input  logic                  bq_valid,
  output logic                  bq_ready,
  input  logic [BKEY_W-1:0]     bq_key,
  output logic                  br_valid,
  input  logic                  br_ready,
  output logic                  br_found,
  output logic [31:0]           br_payload,
  output logic [7:0]            br_levels,
  // host port into the LLC
  input  logic                  host_req_valid,
  output logic                  host_req_ready,
  input  llc_req_t              host_req,
  output logic                  host_rsp_valid,
  output llc_rsp_t              host_rsp,
  // DRAM
  output logic                  dram_req_valid,
  input  logic                  dram_req_ready,
  output dram_req_t             dram_req,
  input  logic                  dram_rsp_valid,
  input  dram_rsp_t             dram_rsp,
  // statistics
  output logic [31:0]           stat_tiles,
  output logic [31:0]           stat_lock_retries,
  output logic [31:0]           stat_fill_retries,
  output logic [31:0]           stat_os_writebacks,
  output logic [31:0]           stat_pe_stall_cycles,
  output logic [31:0]           stat_barriers,
  output logic [31:0]           stat_llc_hits,
  output logic [31:0]           stat_llc_misses,
  output logic [31:0]           stat_llc_lock_nacks,
  output logic [31:0]           stat_llc_writebacks,
  output logic [NPE-1:0][31:0]  stat_pe_retired,
  output logic                  llc_ready
);
  localparam int unsigned NREQ = 5;

  // ---------------------------------------------------------------- PE array
  logic [NPE-1:0][PC_W-1:0] ib_raddr;
  logic [NPE-1:0][31:0]     ib_rdata;
  logic [NPE-1:0]           os_req, os_we, os_miss;
  coll_id_t [NPE-1:0]       os_coll;
  key_t [NPE-1:0]           os_key;
  logic [NPE-1:0][31:0]     os_wdata, os_rdata;
  logic [NPE-1:0]           pe_wait, pe_halted, pe_bar;
  logic                     bar_release;
  logic                     tile_go, loop_done;
  key_t                     tile_start, tile_end;

  ins_buffer #(.ENTRIES(IBUF_ENTRIES), .NPORTS(NPE)) u_ibuf (
    .clk, .we(ib_we), .waddr(ib_waddr), .wdata(ib_wdata), .raddr(ib_raddr), .rdata(ib_rdata)
  );

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    pe #(.NPE(NPE), .PE_ID(p)) u_pe (
      .clk, .rst_n,
      .ib_pc(ib_raddr[p]), .ib_instr(ib_rdata[p]),
      .os_req(os_req[p]), .os_we(os_we[p]), .os_coll(os_coll[p]), .os_key(os_key[p]),
      .os_wdata(os_wdata[p]), .os_rdata(os_rdata[p]),
      .tile_go, .tile_start, .tile_end, .loop_done, .wait_tile(pe_wait[p]),
      .bar_arrive(pe_bar[p]), .bar_release,
      .halted(pe_halted[p]), .retired(stat_pe_retired[p])
    );
  end

  pe_barrier #(.NPE(NPE)) u_bar (
    .clk, .rst_n, .arrive(pe_bar), .done(pe_wait), .release_o(bar_release),
    .episodes(stat_barriers)
  );

  // ---------------------------------------------------------------- Obj-Store
  logic                     fill_valid, os_clear;
  logic [$clog2(NTAGS)-1:0] fill_idx, rd_idx;
  coll_id_t                 fill_coll;
  key_t                     fill_kbase;
  logic [SECTORS-1:0]       fill_svalid, rd_svalid;
  logic [ADDR_W-1:0]        fill_bp, rd_bp;
  logic [2:0]               fill_esize, rd_esize;
  logic [SECTORS-1:0][31:0] fill_data, rd_data;
  logic                     rd_valid, rd_dirty;

  obj_store #(.NPORTS(NPE), .NTAGS(NTAGS)) u_os (
    .clk, .rst_n,
    .pe_req(os_req), .pe_we(os_we), .pe_coll(os_coll), .pe_key(os_key),
    .pe_wdata(os_wdata), .pe_rdata(os_rdata), .pe_miss(os_miss),
    .fill_valid, .fill_idx, .fill_coll, .fill_kbase, .fill_svalid, .fill_bp,
    .fill_esize, .fill_data,
    .rd_idx, .rd_valid, .rd_dirty, .rd_svalid, .rd_bp, .rd_esize, .rd_data,
    .clear_all(os_clear)
  );

  // ---------------------------------------------------------------- LLC requesters
  logic     [NREQ-1:0] a_valid, a_ready, a_rsp_valid;
  llc_req_t [NREQ-1:0] a_req;
  llc_rsp_t            a_rsp;

  collector_group #(.NTAGS(NTAGS), .RUNAHEAD(RUNAHEAD)) u_group (
    .clk, .rst_n,
    .start(vec_start), .desc(vec_desc), .trip_count, .busy(vec_busy),
    .tile_go, .tile_start, .tile_end, .loop_done, .pe_wait_all(&pe_wait),
    .os_fill_valid(fill_valid), .os_fill_idx(fill_idx), .os_fill_coll(fill_coll),
    .os_fill_kbase(fill_kbase), .os_fill_svalid(fill_svalid), .os_fill_bp(fill_bp),
    .os_fill_esize(fill_esize), .os_fill_data(fill_data),
    .os_rd_idx(rd_idx), .os_rd_valid(rd_valid), .os_rd_dirty(rd_dirty),
    .os_rd_svalid(rd_svalid), .os_rd_bp(rd_bp), .os_rd_esize(rd_esize), .os_rd_data(rd_data),
    .os_clear,
    .pf_req_valid(a_valid[0]), .pf_req_ready(a_ready[0]), .pf_req(a_req[0]),
    .pf_rsp_valid(a_rsp_valid[0]), .pf_rsp(a_rsp),
    .rf_req_valid(a_valid[1]), .rf_req_ready(a_ready[1]), .rf_req(a_req[1]),
    .rf_rsp_valid(a_rsp_valid[1]), .rf_rsp(a_rsp),
    .stat_tiles, .stat_lock_retries, .stat_fill_retries,
    .stat_writebacks(stat_os_writebacks), .stat_pe_stall_cycles
  );

  assign vec_done = loop_done && (&pe_halted);

  logic [31:0] hr_probes_unused;
  hash_collector #(.NCTX(HASH_CTX)) u_hash (
    .clk, .rst_n, .desc(hash_desc),
    .q_valid(hq_valid), .q_ready(hq_ready), .q_key(hq_key),
    .r_valid(hr_valid), .r_ready(hr_ready), .r_key(hr_key), .r_found(hr_found),
    .r_value(hr_value), .r_probes(hr_probes_unused),
    .req_valid(a_valid[2]), .req_ready(a_ready[2]), .req(a_req[2]),
    .rsp_valid(a_rsp_valid[2]), .rsp(a_rsp)
  );

  btree_collector #(.ORDER(BT_ORDER)) u_btree (
    .clk, .rst_n, .desc(bt_desc),
    .q_valid(bq_valid), .q_ready(bq_ready), .q_key(bq_key),
    .r_valid(br_valid), .r_ready(br_ready), .r_found(br_found), .r_payload(br_payload),
    .r_levels(br_levels),
    .req_valid(a_valid[3]), .req_ready(a_ready[3]), .req(a_req[3]),
    .rsp_valid(a_rsp_valid[3]), .rsp(a_rsp)
  );

  assign a_valid[4]     = host_req_valid;
  assign a_req[4]       = host_req;
  assign host_req_ready = a_ready[4];
  assign host_rsp_valid = a_rsp_valid[4];
  assign host_rsp       = a_rsp;

  // ---------------------------------------------------------------- LLC
  logic     l_valid, l_ready, l_rsp_valid;
  llc_req_t l_req;
  llc_rsp_t l_rsp;

  llc_arbiter #(.N(NREQ)) u_arb (
    .clk, .rst_n,
    .in_valid(a_valid), .in_ready(a_ready), .in_req(a_req),
    .in_rsp_valid(a_rsp_valid), .in_rsp(a_rsp),
    .out_valid(l_valid), .out_ready(l_ready), .out_req(l_req),
    .out_rsp_valid(l_rsp_valid), .out_rsp(l_rsp)
  );

  llc #(.SETS(LLC_SETS), .WAYS(LLC_WAYS), .LATENCY(LLC_LATENCY), .NMSHR(NMSHR)) u_llc (
    .clk, .rst_n,
    .req_valid(l_valid), .req_ready(l_ready), .req(l_req),
    .rsp_valid(l_rsp_valid), .rsp(l_rsp),
    .dram_req_valid, .dram_req_ready, .dram_req, .dram_rsp_valid, .dram_rsp,
    .stat_hits(stat_llc_hits), .stat_misses(stat_llc_misses),
    .stat_lock_nacks(stat_llc_lock_nacks), .stat_writebacks(stat_llc_writebacks),
    .init_done(llc_ready)
  );
endmodule
