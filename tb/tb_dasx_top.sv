// tb_dasx_top: end-to-end run of the DASX accelerator.
//
// The kernel below runs on all 8 PEs over four vectors (A, B with Keys/Iter
// {0,+1}, C written, D 8-bit):
//   C[i] = A[i]*B[i] + B[i+1] + 2*D[i] + (B[i] < A[i] ? 0 : 7)
// with a BAR in every iteration. While the loop runs, the hash Collector
// looks up present, absent and colliding 128-bit keys and the BTree
// Collector searches a 3-level tree, all sharing one LLC. After the loop the
// host reads C through its LLC port. The loop is then started a second time
// with a trip count below the PE count and kernel constant.
//
// The LLC is shrunk (4 sets x 8 ways) so that locked lines crowd the sets and
// lines get evicted. Every mechanism is counted and must occur: several tiles,
// LOCK retries on full sets, refill retries on lines still arriving, PEs
// stalled waiting for a tile, dirty Obj-Store write-back, dirty LLC
// eviction to DRAM, BAR barriers, a PE with no iteration in a tile, hash hit /
// miss / collision chain, multi-level BTree search, a second loop.
module tb_dasx_top;
  import dasx_pkg::*;
  import dasx_asm_pkg::*;
  localparam int NPE = 8;
  localparam logic [31:0] BA = 32'h0001_0000, BB = 32'h0001_1000, BC = 32'h0001_2000,
                          BD = 32'h0001_3000, HB = 32'h0004_0000, BT = 32'h0005_0000;
  localparam int MAXN = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ib_we;
  logic [7:0] ib_waddr;
  logic [31:0] ib_wdata;
  vec_desc_t [NCOLL-1:0] vec_desc;
  key_t trip_count;
  logic vec_start, vec_busy, vec_done;
  hash_desc_t hash_desc;
  logic hq_valid, hq_ready, hr_valid, hr_ready, hr_found;
  logic [127:0] hq_key, hr_key;
  logic [31:0] hr_value;
  btree_desc_t bt_desc;
  logic bq_valid, bq_ready, br_valid, br_ready, br_found;
  logic [63:0] bq_key;
  logic [31:0] br_payload;
  logic [7:0] br_levels;
  logic host_req_valid, host_req_ready, host_rsp_valid;
  llc_req_t host_req;
  llc_rsp_t host_rsp;
  logic dram_req_valid, dram_req_ready, dram_rsp_valid;
  dram_req_t dram_req;
  dram_rsp_t dram_rsp;
  logic [31:0] stat_tiles, stat_lock_retries, stat_fill_retries, stat_os_writebacks,
               stat_pe_stall_cycles, stat_barriers, stat_llc_hits, stat_llc_misses,
               stat_llc_lock_nacks, stat_llc_writebacks;
  logic [NPE-1:0][31:0] stat_pe_retired;
  logic llc_ready;

  dasx_top #(.LLC_SETS(4), .LLC_WAYS(8)) dut (.*);

  dram_model #(.LATENCY(1000)) u_dram (.clk, .req_valid(dram_req_valid && rst_n),
    .req_ready(dram_req_ready), .req(dram_req), .rsp_valid(dram_rsp_valid), .rsp(dram_rsp));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [31:0] A [MAXN], B [MAXN];
  logic [7:0]  D [MAXN];
  int pe_idle_in_tile = 0;
  logic [31:0] tiles_first;
  int hash_hits = 0, hash_misses = 0, bt_deep = 0, bt_found = 0;

  // a PE with no iteration in a tile: wait_tile still high one cycle after tile_go
  logic go_d;
  always @(posedge clk) begin
    go_d <= dut.tile_go;
    if (go_d && dut.tile_end - dut.tile_start < key_t'(NPE)) pe_idle_in_tile++;
  end

  function automatic vec_desc_t mk(input logic [31:0] base, input int es, input bit st,
                                   input int n, input int len, input logic [7:0] o1);
    vec_desc_t d;
    d = '0;
    d.valid = 1; d.is_store = st; d.base = base; d.elem_bytes = 3'(es);
    d.length = key_t'(len); d.n_offs = 4'(n); d.offs[1] = o1;
    return d;
  endfunction

  task automatic load_kernel(input int trip);
    logic [31:0] p [20];
    p[0]  = addi(7, 0, 1);
    p[1]  = addi(10, 0, trip - 1);
    p[2]  = cur(1);
    p[3]  = ld(2, 0, 1, 0);
    p[4]  = ld(3, 1, 1, 0);
    p[5]  = addi(9, 0, 0);
    p[6]  = br(OP_BEQ, 1, 10, 1);
    p[7]  = ld(9, 1, 1, 1);
    p[8]  = r3(OP_MUL, 4, 2, 3);
    p[9]  = r3(OP_ADD, 4, 4, 9);
    p[10] = ld(11, 3, 1, 0);
    p[11] = r3(OP_SLL, 11, 11, 7);
    p[12] = r3(OP_ADD, 4, 4, 11);
    p[13] = br(OP_BLT, 3, 2, 1);
    p[14] = addi(4, 4, 7);
    p[15] = st(4, 2, 1, 0);
    p[16] = bar();
    p[17] = next(5);
    p[18] = br(OP_BNE, 5, 0, -17);
    p[19] = halt();
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      ib_we = 1; ib_waddr = 8'(i); ib_wdata = p[i];
    end
    @(negedge clk);
    ib_we = 0;
  endtask

  task automatic host_read(input laddr_t a, output line_t d);
    bit done;
    done = 0;
    while (!done) begin
      @(negedge clk);
      host_req_valid = 1; host_req = '0; host_req.op = LLC_READ; host_req.laddr = a;
      @(posedge clk);
      while (!host_req_ready) @(posedge clk);
      #1 host_req_valid = 0;
      while (!host_rsp_valid) @(posedge clk);
      if (host_rsp.ack) begin done = 1; d = host_rsp.data; end
    end
  endtask

  task automatic run_loop(input int trip);
    line_t l;
    int cycles;
    load_kernel(trip);
    vec_desc = '0;
    vec_desc[0] = mk(BA, 4, 0, 1, trip, 8'd0);
    vec_desc[1] = mk(BB, 4, 0, 2, trip, 8'd1);
    vec_desc[2] = mk(BC, 4, 1, 1, trip, 8'd0);
    vec_desc[3] = mk(BD, 1, 0, 1, trip, 8'd0);
    trip_count = key_t'(trip);
    @(negedge clk);
    vec_start = 1;
    @(negedge clk);
    vec_start = 0;
    cycles = 0;
    while (!vec_done) begin @(negedge clk); cycles++; end
    $display("loop of %0d iterations: %0d cycles", trip, cycles);
    for (int ln = 0; ln < (trip * 4 + 63) / 64; ln++) begin
      host_read(laddr_t'((BC >> 6) + ln), l);
      for (int w = 0; w < 16; w++) begin
        int i;
        logic [31:0] r;
        i = ln * 16 + w;
        if (i < trip) begin
          r = A[i] * B[i] + ((i < trip - 1) ? B[i+1] : 0) + 32'(D[i]) * 2 +
              (($signed(B[i]) < $signed(A[i])) ? 0 : 7);
          chk(l[w*32 +: 32] == r, $sformatf("C[%0d] = %h, expected %h", i, l[w*32 +: 32], r));
        end
      end
    end
  endtask

  // ---------------------------------------------------------------- hash table
  logic [127:0] hkeys [$];
  logic [31:0]  hval [logic [127:0]];
  function automatic int hfn(input logic [127:0] k);
    return int'((k[31:0] ^ k[63:32] ^ k[95:64] ^ k[127:96]) & 32'd15);
  endfunction
  function automatic void build_hash();
    logic [127:0] t [16];
    for (int i = 0; i < 16; i++) t[i] = '0;
    for (int n = 0; n < 10; n++) begin
      logic [127:0] k;
      int h;
      k = {$urandom, $urandom, $urandom, $urandom};
      if (n == 9) k[31:0] = k[31:0] ^ 32'(hfn(k)) ^ 32'(hfn(hkeys[0]));  // collides with key 0
      h = hfn(k);
      while (t[h] != 0) h = (h + 1) % 16;
      t[h] = k;
      hval[k] = $urandom;
      hkeys.push_back(k);
      for (int w = 0; w < 4; w++) u_dram.poke32(HB + 32'(h * 32 + w * 4), k[w*32 +: 32]);
      u_dram.poke32(HB + 32'(h * 32 + 16), hval[k]);
    end
  endfunction

  // ---------------------------------------------------------------- BTree
  logic [31:0] bpay [logic [63:0]];
  logic [63:0] bkeys [$];
  function automatic void bt_entry(input logic [31:0] node, input int i, input logic [63:0] k,
                                   input logic [31:0] pay, input logic [31:0] child);
    u_dram.poke32(node + 32'(i * 16), k[31:0]);
    u_dram.poke32(node + 32'(i * 16 + 4), k[63:32]);
    u_dram.poke32(node + 32'(i * 16 + 8), pay);
    u_dram.poke32(node + 32'(i * 16 + 12), child);
  endfunction
  // keys 10, 20, ..., 400: root separators 80,160,240,320; middle level, leaves
  function automatic void build_btree();
    logic [31:0] nxt;
    nxt = BT + 128;
    for (int k = 10; k <= 400; k += 10) begin bkeys.push_back(64'(k)); bpay[64'(k)] = 32'(k * 3 + 1); end
    for (int i = 0; i < 5; i++) begin
      logic [31:0] mid;
      int lo;
      mid = nxt; nxt += 128;
      lo = i * 80;
      if (i < 4) bt_entry(BT, i, 64'(lo + 80), bpay[64'(lo + 80)], mid);
      else       bt_entry(BT, 4, '1, 0, mid);
      // middle node over keys lo+10 .. lo+70: separators lo+30, lo+60
      begin
        logic [31:0] l0, l1, l2;
        l0 = nxt; nxt += 128; l1 = nxt; nxt += 128; l2 = nxt; nxt += 128;
        bt_entry(mid, 0, 64'(lo + 30), bpay[64'(lo + 30)], l0);
        bt_entry(mid, 1, 64'(lo + 60), bpay[64'(lo + 60)], l1);
        bt_entry(mid, 2, '1, 0, l2); bt_entry(mid, 3, '1, 0, 0); bt_entry(mid, 4, '1, 0, 0);
        bt_entry(l0, 0, 64'(lo + 10), bpay[64'(lo + 10)], 0);
        bt_entry(l0, 1, 64'(lo + 20), bpay[64'(lo + 20)], 0);
        bt_entry(l1, 0, 64'(lo + 40), bpay[64'(lo + 40)], 0);
        bt_entry(l1, 1, 64'(lo + 50), bpay[64'(lo + 50)], 0);
        bt_entry(l2, 0, 64'(lo + 70), bpay[64'(lo + 70)], 0);
        for (int e = 2; e < 5; e++) begin
          bt_entry(l0, e, '1, 0, 0); bt_entry(l1, e, '1, 0, 0);
        end
        for (int e = 1; e < 5; e++) bt_entry(l2, e, '1, 0, 0);
      end
    end
    bpay.delete(64'd400);   // the last leaf group under the root sentinel ends at 390
  endfunction

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < MAXN; i++) begin
      A[i] = $urandom % 5000; B[i] = $urandom % 5000; D[i] = 8'($urandom);
      u_dram.poke32(BA + 32'(4 * i), A[i]);
      u_dram.poke32(BB + 32'(4 * i), B[i]);
      u_dram.poke32(BC + 32'(4 * i), 32'hdeadbeef);
      u_dram.poke8(BD + 32'(i), D[i]);
    end
    build_hash();
    build_btree();
    hash_desc = '{base: HB, log2_buckets: 5'd4};
    bt_desc.root = BT;
    ib_we = 0; ib_waddr = 0; ib_wdata = 0; vec_desc = '0; trip_count = 0; vec_start = 0;
    hq_valid = 0; hq_key = '0; hr_ready = 1; bq_valid = 0; bq_key = '0; br_ready = 1;
    host_req_valid = 0; host_req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (llc_ready);
    fork
      run_loop(MAXN);
      begin   // hash lookups
        for (int n = 0; n < 16; n++) begin
          logic [127:0] k;
          k = (n < 10) ? hkeys[n] : {$urandom, $urandom, $urandom, 32'(n)};
          @(negedge clk);
          hq_valid = 1; hq_key = k;
          @(posedge clk);
          while (!hq_ready) @(posedge clk);
          #1 hq_valid = 0;
          while (!hr_valid) @(posedge clk);
          if (hval.exists(hr_key)) begin
            chk(hr_found && hr_value == hval[hr_key], "hash key found"); hash_hits++;
          end else begin
            chk(!hr_found, "hash key absent"); hash_misses++;
          end
        end
      end
      begin   // BTree searches
        for (int n = 0; n < 60; n++) begin
          logic [63:0] k;
          k = 64'(($urandom % 45) * 10 + ((n % 3 == 0) ? 5 : 0));
          @(negedge clk);
          bq_valid = 1; bq_key = k;
          @(posedge clk);
          while (!bq_ready) @(posedge clk);
          #1 bq_valid = 0;
          while (!br_valid) @(posedge clk);
          if (bpay.exists(k)) begin
            chk(br_found && br_payload == bpay[k], $sformatf("BTree key %0d found", k)); bt_found++;
          end else chk(!br_found, $sformatf("BTree key %0d absent", k));
          if (br_levels > 1) bt_deep++;
        end
      end
    join
    tiles_first = stat_tiles;
    run_loop(5);
    chk(stat_tiles > tiles_first, "mechanism: second loop started after the first");

    for (int p = 0; p < NPE; p++) chk(stat_pe_retired[p] > 0, "every PE ran");
    chk(stat_tiles > 3,            "mechanism: several tiles");
    chk(stat_lock_retries > 0,     "mechanism: LOCK retried on a full set");
    chk(stat_llc_lock_nacks > 0,   "mechanism: LLC refused a lock");
    chk(stat_fill_retries > 0,     "mechanism: refill waited for a line in flight");
    chk(stat_pe_stall_cycles > 0,  "mechanism: PEs stalled for data");
    chk(stat_os_writebacks > 0,    "mechanism: dirty Obj-Store write-back");
    chk(stat_llc_writebacks > 0,   "mechanism: dirty LLC eviction");
    chk(stat_barriers > 0,         "mechanism: BAR barrier");
    chk(pe_idle_in_tile > 0,       "mechanism: PE without an iteration in a tile");
    chk(hash_hits > 0 && hash_misses > 0, "mechanism: hash hit and miss");
    chk(bt_deep > 0 && bt_found > 0, "mechanism: multi-level BTree search");
    chk(u_dram.max_outstanding > 1, "mechanism: overlapping DRAM misses");
    $display("tiles %0d lock-retries %0d llc-lock-nacks %0d fill-retries %0d stall %0d os-wb %0d llc-wb %0d bar %0d idle-pe-tiles %0d hash %0d/%0d bt deep %0d max-dram-inflight %0d",
             stat_tiles, stat_lock_retries, stat_llc_lock_nacks, stat_fill_retries, stat_pe_stall_cycles,
             stat_os_writebacks, stat_llc_writebacks, stat_barriers, pe_idle_in_tile, hash_hits,
             hash_misses, bt_deep, u_dram.max_outstanding);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
