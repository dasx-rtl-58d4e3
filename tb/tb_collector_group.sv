// tb_collector_group: the vector Collector group with an Obj-Store, a small
// LLC (4 sets x 8 ways, so lock pressure is real) and the behavioural DRAM.
// The testbench plays the PE array: on every tile_go it walks the tile's
// iterations and, through an Obj-Store port, computes
//   C[i] = A[i] + B[i-1] + B[i+1] + D[i] + E[i]
// with A, B, C 32-bit vectors whose lines all fall in the same LLC sets,
// D an 8-bit and E a 16-bit vector, B read with Keys/Iter offsets {-1,0,+1}.
// Checks: every object the iteration needs is in the Obj-Store with the right
// value; after loop_done C read back through the LLC matches the reference
// and A is untouched; tiles respect the 32-tag limit; and that the
// mechanisms happened: several tiles, LOCK retries (set full of locked
// lines), refill retries (line still arriving), dirty write-back.
module tb_collector_group;
  import dasx_pkg::*;
  localparam int TRIP = 200;
  localparam logic [31:0] BA = 32'h0000, BB = 32'h0400, BC = 32'h0800, BD = 32'h21C0, BE = 32'h3300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, tile_go, loop_done, pe_wait_all;
  vec_desc_t [NCOLL-1:0] desc;
  key_t trip_count, tile_start, tile_end;
  logic os_fill_valid, os_rd_valid, os_rd_dirty, os_clear;
  logic [4:0] os_fill_idx, os_rd_idx;
  coll_id_t os_fill_coll;
  key_t os_fill_kbase;
  logic [7:0] os_fill_svalid, os_rd_svalid;
  logic [31:0] os_fill_bp, os_rd_bp;
  logic [2:0] os_fill_esize, os_rd_esize;
  logic [7:0][31:0] os_fill_data, os_rd_data;
  logic pf_req_valid, pf_req_ready, pf_rsp_valid, rf_req_valid, rf_req_ready, rf_rsp_valid;
  llc_req_t pf_req, rf_req;
  llc_rsp_t pf_rsp, rf_rsp;
  logic [31:0] stat_tiles, stat_lock_retries, stat_fill_retries, stat_writebacks, stat_pe_stall_cycles;

  collector_group #(.NTAGS(32), .RUNAHEAD(2)) dut (.*);

  // Obj-Store, one PE port driven by the testbench
  logic [0:0] p_req, p_we, p_miss;
  coll_id_t [0:0] p_coll;
  key_t [0:0] p_key;
  logic [0:0][31:0] p_wdata, p_rdata;
  obj_store #(.NPORTS(1), .NTAGS(32)) u_os (
    .clk, .rst_n, .pe_req(p_req), .pe_we(p_we), .pe_coll(p_coll), .pe_key(p_key),
    .pe_wdata(p_wdata), .pe_rdata(p_rdata), .pe_miss(p_miss),
    .fill_valid(os_fill_valid), .fill_idx(os_fill_idx), .fill_coll(os_fill_coll),
    .fill_kbase(os_fill_kbase), .fill_svalid(os_fill_svalid), .fill_bp(os_fill_bp),
    .fill_esize(os_fill_esize), .fill_data(os_fill_data),
    .rd_idx(os_rd_idx), .rd_valid(os_rd_valid), .rd_dirty(os_rd_dirty), .rd_svalid(os_rd_svalid),
    .rd_bp(os_rd_bp), .rd_esize(os_rd_esize), .rd_data(os_rd_data), .clear_all(os_clear));

  // LLC behind an arbiter: 0 prefetcher, 1 refill, 2 testbench
  logic [2:0] a_valid, a_ready, a_rsp_valid;
  llc_req_t [2:0] a_req;
  llc_rsp_t a_rsp;
  logic l_valid, l_ready, l_rsp_valid;
  llc_req_t l_req, h_req;
  llc_rsp_t l_rsp;
  logic h_valid;
  assign a_valid = {h_valid, rf_req_valid, pf_req_valid};
  assign a_req   = {h_req, rf_req, pf_req};
  assign pf_req_ready = a_ready[0];
  assign rf_req_ready = a_ready[1];
  assign pf_rsp_valid = a_rsp_valid[0];
  assign rf_rsp_valid = a_rsp_valid[1];
  assign pf_rsp = a_rsp;
  assign rf_rsp = a_rsp;
  llc_arbiter #(.N(3)) u_arb (.clk, .rst_n, .in_valid(a_valid), .in_ready(a_ready), .in_req(a_req),
    .in_rsp_valid(a_rsp_valid), .in_rsp(a_rsp), .out_valid(l_valid), .out_ready(l_ready),
    .out_req(l_req), .out_rsp_valid(l_rsp_valid), .out_rsp(l_rsp));
  logic dram_req_valid, dram_req_ready, dram_rsp_valid;
  dram_req_t dram_req;
  dram_rsp_t dram_rsp;
  logic [31:0] s0, s1, s2, s3;
  logic init_done;
  llc #(.SETS(4), .WAYS(8), .LATENCY(4), .NMSHR(8)) u_llc (
    .clk, .rst_n, .req_valid(l_valid), .req_ready(l_ready), .req(l_req), .rsp_valid(l_rsp_valid),
    .rsp(l_rsp), .dram_req_valid, .dram_req_ready, .dram_req, .dram_rsp_valid, .dram_rsp,
    .stat_hits(s0), .stat_misses(s1), .stat_lock_nacks(s2), .stat_writebacks(s3), .init_done);
  dram_model #(.LATENCY(300)) u_dram (.clk, .req_valid(dram_req_valid && rst_n),
    .req_ready(dram_req_ready), .req(dram_req), .rsp_valid(dram_rsp_valid), .rsp(dram_rsp));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [31:0] A [TRIP], B [TRIP];
  logic [7:0]  D [TRIP];
  logic [15:0] E [TRIP];

  function automatic vec_desc_t mk(input logic [31:0] base, input int es, input bit st,
                                   input int n, input logic [7:0] o0, input logic [7:0] o1,
                                   input logic [7:0] o2);
    vec_desc_t d;
    d = '0;
    d.valid = 1; d.is_store = st; d.base = base; d.elem_bytes = 3'(es);
    d.length = key_t'(TRIP); d.n_offs = 4'(n);
    d.offs[0] = o0; d.offs[1] = o1; d.offs[2] = o2;
    return d;
  endfunction

  task automatic obj(input int c, input int k, output logic [31:0] v);
    p_req = 1; p_we = 0; p_coll = coll_id_t'(c); p_key = key_t'(k);
    #1;
    chk(!p_miss, $sformatf("object c%0d k%0d staged", c, k));
    v = p_rdata;
    @(negedge clk);
    p_req = 0;
  endtask

  int max_tile = 0;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tiles_seen = 0;
    for (int i = 0; i < TRIP; i++) begin
      A[i] = $urandom; B[i] = $urandom; D[i] = 8'($urandom); E[i] = 16'($urandom);
      u_dram.poke32(BA + 32'(4 * i), A[i]);
      u_dram.poke32(BB + 32'(4 * i), B[i]);
      u_dram.poke32(BC + 32'(4 * i), 32'hdeadbeef);
      u_dram.poke8(BD + 32'(i), D[i]);
      u_dram.poke8(BE + 32'(2 * i), E[i][7:0]);
      u_dram.poke8(BE + 32'(2 * i + 1), E[i][15:8]);
    end
    desc = '0;
    desc[0] = mk(BA, 4, 0, 1, 8'd0, 8'd0, 8'd0);
    desc[1] = mk(BB, 4, 0, 3, 8'hff, 8'd0, 8'd1);
    desc[2] = mk(BC, 4, 1, 1, 8'd0, 8'd0, 8'd0);
    desc[3] = mk(BD, 1, 0, 1, 8'd0, 8'd0, 8'd0);
    desc[4] = mk(BE, 2, 0, 1, 8'd0, 8'd0, 8'd0);
    trip_count = key_t'(TRIP);
    start = 0; pe_wait_all = 1; h_valid = 0; h_req = '0;
    p_req = 0; p_we = 0; p_coll = 0; p_key = 0; p_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (init_done);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!loop_done) begin
      @(posedge clk);
      if (tile_go) begin
        int s, e;
        #1 pe_wait_all = 0;
        s = int'(tile_start); e = int'(tile_end);
        tiles_seen++;
        if (e - s > max_tile) max_tile = e - s;
        @(negedge clk);
        for (int i = s; i < e; i++) begin
          logic [31:0] a, bm, bp, b0, d, ee, c;
          obj(0, i, a);       chk(a == A[i], "A object value");
          obj(1, i, b0);      chk(b0 == B[i], "B object value");
          bm = 0; bp = 0;
          if (i > 0)        begin obj(1, i - 1, bm); chk(bm == B[i-1], "B[i-1] object value"); end
          if (i < TRIP - 1) begin obj(1, i + 1, bp); chk(bp == B[i+1], "B[i+1] object value"); end
          obj(3, i, d);       chk(d == 32'(D[i]), "8-bit object value");
          obj(4, i, ee);      chk(ee == 32'(E[i]), "16-bit object value");
          c = a + bm + bp + d + ee;
          p_req = 1; p_we = 1; p_coll = 2; p_key = key_t'(i); p_wdata = c;
          #1 chk(!p_miss, "C object staged for store");
          @(negedge clk);
          p_req = 0; p_we = 0;
        end
        pe_wait_all = 1;
      end
    end
    // read C back through the LLC
    for (int l = 0; l < TRIP * 4 / 64; l++) begin
      bit done;
      done = 0;
      while (!done) begin
        @(negedge clk);
        h_valid = 1; h_req = '0; h_req.op = LLC_READ; h_req.laddr = laddr_t'((BC >> 6) + l);
        @(posedge clk);
        while (!a_ready[2]) @(posedge clk);
        #1 h_valid = 0;
        while (!a_rsp_valid[2]) @(posedge clk);
        if (a_rsp.ack) begin
          done = 1;
          for (int w = 0; w < 16; w++) begin
            int i;
            logic [31:0] ref_c;
            i = l * 16 + w;
            ref_c = A[i] + ((i > 0) ? B[i-1] : 0) + ((i < TRIP - 1) ? B[i+1] : 0) + 32'(D[i]) + 32'(E[i]);
            chk(a_rsp.data[w*32 +: 32] == ref_c, $sformatf("C[%0d] in LLC", i));
          end
        end
      end
    end
    chk(u_dram.peek32(BA + 40) == A[10], "load-only vector not written");
    chk(stat_tiles == 32'(tiles_seen) && tiles_seen >= 4, "several tiles");
    chk(max_tile <= 8 * 32 && max_tile >= 8, "tile size bounded by the Obj-Store");
    chk(stat_lock_retries > 0, "LOCK retried on a full set");
    chk(stat_fill_retries > 0, "refill waited for a line in flight");
    chk(stat_writebacks > 0, "dirty objects written back");
    $display("tiles %0d (max %0d iterations), lock retries %0d, fill retries %0d, write-backs %0d, stall cycles %0d",
             tiles_seen, max_tile, stat_lock_retries, stat_fill_retries, stat_writebacks, stat_pe_stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
