// obj_store: the Obj-Store, the PEs' shared object cache.
//
// A fully-associative decoupled sector cache: NTAGS tags, each naming one
// Collector id and a run of SECTORS adjacent keys (key base aligned to
// SECTORS), with a 4-byte data sector per key and a valid bit per sector, so a
// tag holds between 1 and 8 objects. 32 tags x 8 sectors x 4 bytes = 1 KB, as
// in the design. Each tag also keeps the LLC backpointer (byte address of the
// first key's data) and element size, used by the Collector to write dirty
// objects back, and a dirty bit.
//
// PEs look objects up by (Collector id, key), never by address. There is one
// lookup port per PE (an own choice; the design only says the Obj-Store is
// shared), with a combinational read: data is valid in the same cycle as the
// request. A write lands on the clock edge and sets the tag's dirty bit. A
// lookup that finds nothing raises miss; the Collector guarantees this never
// happens, which the assertion checks. If two ports write the same sector in
// the same cycle, the higher-numbered port wins.
//
// The Collector side fills one tag per cycle (fill_*), reads any tag
// combinationally by index (rd_*) to write dirty data back, and invalidates
// all tags in one cycle (clear_all) at the end of a tile.
module obj_store
  import dasx_pkg::*;
#(
  parameter int unsigned NPORTS = 8,
  parameter int unsigned NTAGS  = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // PE ports
  input  logic [NPORTS-1:0]          pe_req,
  input  logic [NPORTS-1:0]          pe_we,
  input  coll_id_t [NPORTS-1:0]      pe_coll,
  input  key_t [NPORTS-1:0]          pe_key,
  input  logic [NPORTS-1:0][31:0]    pe_wdata,
  output logic [NPORTS-1:0][31:0]    pe_rdata,
  output logic [NPORTS-1:0]          pe_miss,
  // Collector fill port
  input  logic                       fill_valid,
  input  logic [$clog2(NTAGS)-1:0]   fill_idx,
  input  coll_id_t                   fill_coll,
  input  key_t                       fill_kbase,
  input  logic [SECTORS-1:0]         fill_svalid,
  input  logic [ADDR_W-1:0]          fill_bp,
  input  logic [2:0]                 fill_esize,
  input  logic [SECTORS-1:0][31:0]   fill_data,
  // Collector read-back port
  input  logic [$clog2(NTAGS)-1:0]   rd_idx,
  output logic                       rd_valid,
  output logic                       rd_dirty,
  output logic [SECTORS-1:0]         rd_svalid,
  output logic [ADDR_W-1:0]          rd_bp,
  output logic [2:0]                 rd_esize,
  output logic [SECTORS-1:0][31:0]   rd_data,
  input  logic                       clear_all
);
  localparam int unsigned TI_W = $clog2(NTAGS);

  typedef struct packed {
    logic               valid;
    logic               dirty;
    coll_id_t           coll;
    logic [KEY_W-4:0]   kblk;    // key[31:3]
    logic [SECTORS-1:0] svalid;
    logic [ADDR_W-1:0]  bp;
    logic [2:0]         esize;
  } tag_t;

  tag_t                      tags [NTAGS];
  logic [SECTORS-1:0][31:0]  data [NTAGS];

  // ---------------------------------------------------------------- lookup
  logic [NPORTS-1:0]            hit;
  logic [NPORTS-1:0][TI_W-1:0]  hit_idx;

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      hit[p]      = 1'b0;
      hit_idx[p]  = '0;
      for (int t = 0; t < NTAGS; t++) begin
        if (tags[t].valid && tags[t].coll == pe_coll[p] &&
            tags[t].kblk == pe_key[p][KEY_W-1:3] && tags[t].svalid[pe_key[p][2:0]]) begin
          hit[p]     = 1'b1;
          hit_idx[p] = TI_W'(t);
        end
      end
      pe_rdata[p] = hit[p] ? data[hit_idx[p]][pe_key[p][2:0]] : 32'h0;
      pe_miss[p]  = pe_req[p] && !hit[p];
    end
  end

  // ---------------------------------------------------------------- read-back
  always_comb begin
    rd_valid  = tags[rd_idx].valid;
    rd_dirty  = tags[rd_idx].dirty;
    rd_svalid = tags[rd_idx].svalid;
    rd_bp     = tags[rd_idx].bp;
    rd_esize  = tags[rd_idx].esize;
    rd_data   = data[rd_idx];
  end

  // ---------------------------------------------------------------- update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTAGS; t++) tags[t] <= '0;
    end else begin
      if (clear_all) begin
        for (int t = 0; t < NTAGS; t++) tags[t].valid <= 1'b0;
      end
      if (fill_valid) begin
        tags[fill_idx] <= '{valid: 1'b1, dirty: 1'b0, coll: fill_coll,
                            kblk: fill_kbase[KEY_W-1:3], svalid: fill_svalid,
                            bp: fill_bp, esize: fill_esize};
      end
      for (int p = 0; p < NPORTS; p++) begin
        if (pe_req[p] && pe_we[p] && hit[p]) tags[hit_idx[p]].dirty <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fill_valid) data[fill_idx] <= fill_data;
    for (int p = 0; p < NPORTS; p++) begin
      if (pe_req[p] && pe_we[p] && hit[p]) data[hit_idx[p]][pe_key[p][2:0]] <= pe_wdata[p];
    end
  end

  // The Collector must have staged every object a PE touches.
  for (genvar p = 0; p < NPORTS; p++) begin : g_miss_chk
    assert property (@(posedge clk) disable iff (!rst_n) !pe_miss[p])
      else $error("obj_store: port %0d missed coll=%0d key=%0d", p, pe_coll[p], pe_key[p]);
  end
endmodule
