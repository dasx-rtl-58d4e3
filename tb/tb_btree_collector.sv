// tb_btree_collector: builds an order-5 BTree of 150 random 64-bit keys in
// DRAM (node = 5 entries {key, payload, sub-tree}, last entry the all-ones
// sentinel), then searches every key and 50 absent ones through a small LLC.
// Checks found/payload against the testbench's key set and that the level
// count equals the depth at which the testbench placed the key.
module tb_btree_collector;
  import dasx_pkg::*;
  localparam logic [31:0] ROOTS = 32'h0002_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  btree_desc_t desc;
  logic q_valid, q_ready, r_valid, r_ready, r_found;
  logic [63:0] q_key;
  logic [31:0] r_payload;
  logic [7:0] r_levels;
  logic req_valid, req_ready, rsp_valid;
  llc_req_t req;
  llc_rsp_t rsp;
  logic dram_req_valid, dram_req_ready, dram_rsp_valid;
  dram_req_t dram_req;
  dram_rsp_t dram_rsp;
  logic [31:0] s0, s1, s2, s3;
  logic init_done;

  btree_collector #(.ORDER(5)) dut (.*);
  llc #(.SETS(64), .WAYS(4), .LATENCY(5), .NMSHR(8)) u_llc (
    .clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp,
    .dram_req_valid, .dram_req_ready, .dram_req, .dram_rsp_valid, .dram_rsp,
    .stat_hits(s0), .stat_misses(s1), .stat_lock_nacks(s2), .stat_writebacks(s3), .init_done);
  dram_model #(.LATENCY(40)) u_dram (.clk, .req_valid(dram_req_valid && rst_n),
    .req_ready(dram_req_ready), .req(dram_req), .rsp_valid(dram_rsp_valid), .rsp(dram_rsp));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [31:0] next_node = ROOTS;
  logic [31:0] payload_of [logic [63:0]];
  int          depth_of   [logic [63:0]];
  int          max_depth = 0;

  function automatic void put_entry(input logic [31:0] node, input int i, input logic [63:0] k,
                           input logic [31:0] pay, input logic [31:0] child);
    u_dram.poke32(node + 32'(i * 16),      k[31:0]);
    u_dram.poke32(node + 32'(i * 16 + 4),  k[63:32]);
    u_dram.poke32(node + 32'(i * 16 + 8),  pay);
    u_dram.poke32(node + 32'(i * 16 + 12), child);
  endfunction

  // builds a subtree over keys[lo..hi] (sorted), returns its node address
  function automatic logic [31:0] build(ref logic [63:0] keys[$], input int lo, input int hi, input int depth);
    logic [31:0] node;
    int n;
    node = next_node;
    next_node += 128;
    n = hi - lo + 1;
    if (depth > max_depth) max_depth = depth;
    if (n <= 4) begin
      for (int i = 0; i < 5; i++) begin
        if (i < n) begin
          put_entry(node, i, keys[lo + i], payload_of[keys[lo + i]], 0);
          depth_of[keys[lo + i]] = depth;
        end else put_entry(node, i, '1, 0, 0);
      end
    end else begin
      int sep [4];
      int prev;
      for (int i = 0; i < 4; i++) sep[i] = lo + (n * (i + 1)) / 5;
      prev = lo;
      for (int i = 0; i < 4; i++) begin
        logic [31:0] c;
        c = (sep[i] > prev) ? build(keys, prev, sep[i] - 1, depth + 1) : 32'h0;
        put_entry(node, i, keys[sep[i]], payload_of[keys[sep[i]]], c);
        depth_of[keys[sep[i]]] = depth;
        prev = sep[i] + 1;
      end
      put_entry(node, 4, '1, 0, (hi >= prev) ? build(keys, prev, hi, depth + 1) : 32'h0);
    end
    return node;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] keys[$];
    logic [63:0] qs[$];
    int deep = 0;
    while (keys.size() < 150) begin
      logic [63:0] k;
      k = {$urandom, $urandom} & 64'hffff_ffff_ffff_fff0;
      if (!payload_of.exists(k)) begin payload_of[k] = $urandom; keys.push_back(k); end
    end
    keys.sort();
    desc.root = build(keys, 0, keys.size() - 1, 1);
    foreach (keys[i]) qs.push_back(keys[i]);
    for (int i = 0; i < 50; i++) qs.push_back(keys[i * 3] + 64'd3);   // between keys: absent
    qs.shuffle();
    q_valid = 0; q_key = '0; r_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (init_done);
    foreach (qs[i]) begin
      @(negedge clk);
      q_valid = 1; q_key = qs[i];
      @(posedge clk);
      while (!q_ready) @(posedge clk);
      #1 q_valid = 0;
      while (!r_valid) @(posedge clk);
      if (payload_of.exists(qs[i])) begin
        chk(r_found && r_payload == payload_of[qs[i]], "present key found with its payload");
        chk(int'(r_levels) == depth_of[qs[i]], "levels visited = depth of key");
        if (r_levels > 1) deep++;
      end else begin
        chk(!r_found, "absent key not found");
        chk(int'(r_levels) <= max_depth, "absent search stops at a leaf");
      end
      @(negedge clk);
    end
    chk(deep > 0 && max_depth >= 3, "multi-level tree exercised");
    $display("tree depth %0d", max_depth);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
