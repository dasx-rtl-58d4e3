// tb_hash_collector: builds a 64-bucket table in DRAM with the same hash and
// linear probing (keys chosen to collide so that chains form), then streams
// present and absent 128-bit keys into the HASH Collector through a small
// LLC. Every result is checked against the testbench's own table; it also
// checks that lookups overlapped (more than one DRAM read in flight) and
// that collisions needed more than one probe.
module tb_hash_collector;
  import dasx_pkg::*;
  localparam int LOG2B = 6, NB = 1 << LOG2B;
  localparam logic [31:0] BASE = 32'h0001_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  hash_desc_t desc;
  logic q_valid, q_ready, r_valid, r_ready, r_found;
  logic [127:0] q_key, r_key;
  logic [31:0] r_value, r_probes;
  logic req_valid, req_ready, rsp_valid;
  llc_req_t req;
  llc_rsp_t rsp;
  logic dram_req_valid, dram_req_ready, dram_rsp_valid;
  dram_req_t dram_req;
  dram_rsp_t dram_rsp;
  logic [31:0] s0, s1, s2, s3;
  logic init_done;

  hash_collector #(.NCTX(4)) dut (.*);
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

  logic [127:0] tkey [NB];
  logic [31:0]  tval [NB];
  logic [31:0]  expect_val [logic [127:0]];
  logic [127:0] queries [$];
  int multi_probe = 0;

  function automatic int hfn(input logic [127:0] k);
    return int'((k[31:0] ^ k[63:32] ^ k[95:64] ^ k[127:96]) & 32'(NB - 1));
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NB; i++) begin tkey[i] = '0; tval[i] = '0; end
    // 40 keys; every fourth one collides with the previous key's bucket
    for (int n = 0; n < 40; n++) begin
      logic [127:0] k;
      int h;
      k = {$urandom, $urandom, $urandom, $urandom};
      if (n % 4 == 3) k[31:0] = k[31:0] ^ 32'(hfn(k)) ^ 32'(hfn(queries[$]));
      h = hfn(k);
      while (tkey[h] != 0) h = (h + 1) % NB;
      tkey[h] = k; tval[h] = $urandom;
      expect_val[k] = tval[h];
      queries.push_back(k);
    end
    for (int n = 0; n < 20; n++) queries.push_back({$urandom, $urandom, $urandom, 32'(n + 1)});
    for (int i = 0; i < NB; i++) begin
      for (int w = 0; w < 4; w++) u_dram.poke32(BASE + 32'(i * 32 + w * 4), tkey[i][w*32 +: 32]);
      u_dram.poke32(BASE + 32'(i * 32 + 16), tval[i]);
    end
    desc = '{base: BASE, log2_buckets: 5'(LOG2B)};
    q_valid = 0; q_key = '0; r_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (init_done);
    fork
      begin
        foreach (queries[i]) begin
          @(negedge clk);
          q_valid = 1; q_key = queries[i];
          @(posedge clk);
          while (!q_ready) @(posedge clk);
          #1 q_valid = 0;
        end
      end
      begin
        for (int n = 0; n < queries.size(); n++) begin
          @(posedge clk);
          while (!r_valid) @(posedge clk);
          if (expect_val.exists(r_key)) chk(r_found && r_value == expect_val[r_key], "present key found");
          else                          chk(!r_found, "absent key not found");
          if (r_probes > 1) multi_probe++;
        end
      end
    join
    chk(multi_probe > 0, "collision chains probed");
    chk(u_dram.max_outstanding > 1, "lookups overlapped in memory");
    $display("multi-probe lookups %0d, max DRAM reads in flight %0d", multi_probe, u_dram.max_outstanding);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
