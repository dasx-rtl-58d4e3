// vec_agu: address generation of the vector (VEC) Collector.
//
// Given a VEC descriptor <LD/ST, base, element size, length, Keys/Iter
// offsets> and a tile of iterations [tile_start, tile_start+tile_len), it
// works out which keys the tile touches, [lo, hi] = [tile_start + min offset,
// tile_start + tile_len - 1 + max offset] clipped to the vector, and splits
// that range into Obj-Store blocks of 8 adjacent keys (one Obj-Store tag
// each). For block number blk of the tile it returns the key base, which of
// its 8 keys lie in the range, the byte address of the first key,
//   addr = base + kbase * elem_bytes,
// and the LLC line holding it. nblk is the number of blocks (tags) the tile
// needs from this vector, used to size tiles to the Obj-Store.
//
// Purely combinational. The mapping key -> address follows the design's VEC
// descriptor; blocks of 8 keys, element sizes of 1, 2 or 4 bytes (one 4-byte
// sector per key) and a base aligned to 32 bytes (so a block never crosses an
// LLC line) are own choices/restrictions. The design quotes a 3-cycle
// address-generation latency; here it is folded into the LLC access.
module vec_agu
  import dasx_pkg::*;
(
  input  vec_desc_t          desc,
  input  key_t               tile_start,
  input  key_t               tile_len,
  input  key_t               blk,
  output key_t               nblk,
  output key_t               kbase,
  output logic [SECTORS-1:0] svalid,
  output logic [ADDR_W-1:0]  addr,
  output laddr_t             laddr,
  output logic [LOFF_W-1:0]  loff
);
  logic signed [8:0]  omin, omax;
  logic signed [33:0] lo_s, hi_s, last_s;
  key_t               lo, hi;
  logic               empty;

  always_comb begin
    omin = 9'sd127;
    omax = -9'sd128;
    for (int i = 0; i < MAX_OFFS; i++) begin
      if (4'(i) < desc.n_offs) begin
        if ($signed({desc.offs[i][7], desc.offs[i]}) < omin) omin = $signed({desc.offs[i][7], desc.offs[i]});
        if ($signed({desc.offs[i][7], desc.offs[i]}) > omax) omax = $signed({desc.offs[i][7], desc.offs[i]});
      end
    end
    if (desc.n_offs == 0) begin omin = '0; omax = '0; end
    last_s = $signed({2'b00, desc.length}) - 34'sd1;
    lo_s   = $signed({2'b00, tile_start}) + 34'(omin);
    hi_s   = $signed({2'b00, tile_start}) + $signed({2'b00, tile_len}) - 34'sd1 + 34'(omax);
    if (lo_s < 0)      lo_s = '0;
    if (hi_s > last_s) hi_s = last_s;
    empty = !desc.valid || tile_len == 0 || desc.length == 0 || hi_s < lo_s;
    lo    = key_t'(lo_s);
    hi    = key_t'(hi_s);
    nblk  = empty ? '0 : (hi >> 3) - (lo >> 3) + key_t'(1);
    kbase = ((lo >> 3) + blk) << 3;
    for (int s = 0; s < SECTORS; s++) begin
      key_t k;
      k = kbase + key_t'(s);
      svalid[s] = !empty && k >= lo && k <= hi;
    end
    addr  = desc.base + ADDR_W'(kbase) * ADDR_W'(desc.elem_bytes);
    laddr = addr[ADDR_W-1:LOFF_W];
    loff  = addr[LOFF_W-1:0];
  end
endmodule
