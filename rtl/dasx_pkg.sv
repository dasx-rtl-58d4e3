// dasx_pkg: types and constants shared by the DASX accelerator.
//
// DASX (Data Structure Accelerator) splits an iterative loop over software data
// structures into a compute part, run on an array of small in-order PEs, and a
// data-collection part, run by data-structure specific refill engines
// (Collectors) sitting next to the last-level cache (LLC). This package holds
// the descriptor formats of the Collectors, the LLC request/response bundle,
// the main-memory bundle and the PE instruction encoding.
//
// From the design: 4-byte Obj-Store sectors, 8 sectors per Obj-Store line,
// 32 Obj-Store tags, up to 8 vectors per Collector group, 128-bit hash keys,
// 64-bit BTree keys, 6-bit Ref# per LLC line.
// Own choices: 64-byte LLC lines, 32-bit physical byte addresses, the bit-level
// layout of every descriptor and the whole PE instruction encoding.
package dasx_pkg;

  // ---------------------------------------------------------------- memory
  localparam int unsigned ADDR_W     = 32;              // physical byte address
  localparam int unsigned LINE_BYTES = 64;              // LLC line size
  localparam int unsigned LINE_BITS  = LINE_BYTES * 8;
  localparam int unsigned LOFF_W     = $clog2(LINE_BYTES);
  localparam int unsigned LADDR_W    = ADDR_W - LOFF_W; // line address

  typedef logic [LADDR_W-1:0]    laddr_t;
  typedef logic [LINE_BITS-1:0]  line_t;
  typedef logic [LINE_BYTES-1:0] bmask_t;

  // ---------------------------------------------------------------- Obj-Store
  localparam int unsigned SECTOR_BYTES = 4;
  localparam int unsigned SECTORS      = 8;   // sectors (keys) per tag
  localparam int unsigned COLL_W       = 3;   // Collector id width
  localparam int unsigned NCOLL        = 8;   // vectors per Collector group
  localparam int unsigned KEY_W        = 32;  // vector key (element index)

  typedef logic [COLL_W-1:0] coll_id_t;
  typedef logic [KEY_W-1:0]  key_t;

  // ---------------------------------------------------------------- VEC descriptor
  // <LD/ST, base address, element size, length, Keys/Iter offsets>
  localparam int unsigned MAX_OFFS = 8;
  typedef struct packed {
    logic                          valid;      // Collector takes part in the group
    logic                          is_store;   // ST: fetched for write (written back)
    logic [ADDR_W-1:0]             base;       // address of element 0
    logic [2:0]                    elem_bytes; // 1, 2 or 4
    logic [KEY_W-1:0]              length;     // number of elements
    logic [3:0]                    n_offs;     // 1..8 keys per iteration
    logic [MAX_OFFS-1:0][7:0]      offs;       // signed offsets relative to cursor
  } vec_desc_t;

  // ---------------------------------------------------------------- LLC port
  typedef enum logic [1:0] {
    LLC_READ   = 2'd0,   // return the line; miss -> refill started, NACK
    LLC_WRITE  = 2'd1,   // byte-masked write into a resident line
    LLC_LOCK   = 2'd2,   // allocate if needed and increment Ref#
    LLC_UNLOCK = 2'd3    // decrement Ref#
  } llc_op_e;

  localparam int unsigned SRC_W = 3;
  typedef logic [SRC_W-1:0] src_t;

  typedef struct packed {
    llc_op_e op;
    laddr_t  laddr;
    line_t   wdata;
    bmask_t  wmask;
    src_t    src;
  } llc_req_t;

  typedef struct packed {
    src_t  src;
    logic  ack;      // 1: done; 0: NACK, retry later
    line_t data;
  } llc_rsp_t;

  // ---------------------------------------------------------------- DRAM port
  typedef struct packed {
    logic   we;
    laddr_t laddr;
    line_t  wdata;
  } dram_req_t;

  typedef struct packed {
    laddr_t laddr;
    line_t  rdata;
  } dram_rsp_t;

  // ---------------------------------------------------------------- PE ISA
  // 32-bit instructions. R: op[31:26] rd[25:21] rs1[20:16] rs2[15:11]
  // I: op rd rs1 imm[15:0]. B: op rs1[25:21] rs2[20:16] imm[15:0] (PC relative).
  // LD: op rd rs1 coll[15:13] koff[12:0]   -> rd = ObjStore[coll][rs1+koff]
  // ST: op rs2[25:21] rs1 coll koff        -> ObjStore[coll][rs1+koff] = rs2
  typedef enum logic [5:0] {
    OP_NOP  = 6'd0,  OP_ADD  = 6'd1,  OP_SUB  = 6'd2,  OP_AND  = 6'd3,
    OP_OR   = 6'd4,  OP_XOR  = 6'd5,  OP_SLL  = 6'd6,  OP_SRL  = 6'd7,
    OP_SLT  = 6'd8,  OP_MUL  = 6'd9,  OP_ADDI = 6'd10, OP_LUI  = 6'd11,
    OP_BEQ  = 6'd12, OP_BNE  = 6'd13, OP_BLT  = 6'd14, OP_LD   = 6'd15,
    OP_ST   = 6'd16, OP_CUR  = 6'd17, OP_NEXT = 6'd18, OP_BAR  = 6'd19,
    OP_HALT = 6'd20
  } opcode_e;

  localparam int unsigned IBUF_ENTRIES = 256;
  localparam int unsigned PC_W = $clog2(IBUF_ENTRIES);

  // ---------------------------------------------------------------- hash / BTree
  localparam int unsigned HKEY_W = 128;
  localparam int unsigned BKEY_W = 64;

  // Hash-table descriptor: bucket array of 32-byte buckets
  // {key[127:0], value[31:0], 12 bytes unused}; a bucket whose key is 0 is empty.
  typedef struct packed {
    logic [ADDR_W-1:0] base;       // bucket array, 64-byte aligned
    logic [4:0]        log2_buckets;
  } hash_desc_t;

  // BTree descriptor: root pointer; a node is BT_ORDER 16-byte entries
  // {key[63:0], payload[31:0], child[31:0]}, 128-byte aligned, keys ascending,
  // unused entries and the last entry hold key = all ones.
  localparam int unsigned BT_ORDER = 5;
  typedef struct packed {
    logic [ADDR_W-1:0] root;
  } btree_desc_t;

  // ---------------------------------------------------------------- helpers
  function automatic logic [31:0] sext8(input logic [7:0] v);
    return {{24{v[7]}}, v};
  endfunction

endpackage
