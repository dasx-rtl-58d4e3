// tb_llc: a small LLC (16 sets x 4 ways, 3-cycle latency, 2 MSHRs) in front
// of the behavioural DRAM. Checks: a READ miss is NACKed and later hits with
// the DRAM data; byte-masked WRITE merges; responses come exactly LATENCY
// cycles after acceptance; LOCK is refused once a set would have no unlocked
// way and accepted again after an UNLOCK; locked lines survive heavy
// replacement traffic in their set; a dirty victim is written back to DRAM;
// a LOCK is refused while all MSHRs are busy.
module tb_llc;
  import dasx_pkg::*;
  localparam int SETS = 16, WAYS = 4, LAT = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, rsp_valid;
  llc_req_t req;
  llc_rsp_t rsp;
  logic dram_req_valid, dram_req_ready, dram_rsp_valid;
  dram_req_t dram_req;
  dram_rsp_t dram_rsp;
  logic [31:0] stat_hits, stat_misses, stat_lock_nacks, stat_writebacks;
  logic init_done;

  llc #(.SETS(SETS), .WAYS(WAYS), .LATENCY(LAT), .NMSHR(2)) dut (.*);
  dram_model #(.LATENCY(20)) u_dram (.clk, .req_valid(dram_req_valid && rst_n), .req_ready(dram_req_ready),
    .req(dram_req), .rsp_valid(dram_rsp_valid), .rsp(dram_rsp));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  llc_rsp_t last;
  int       last_lat;
  task automatic send(input llc_op_e op, input laddr_t a, input line_t wd, input bmask_t wm);
    int t;
    @(negedge clk);
    req_valid = 1; req = '{op: op, laddr: a, wdata: wd, wmask: wm, src: 3'd5};
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    #1 req_valid = 0;
    t = 0;
    while (!rsp_valid) begin @(posedge clk); #1 t++; end
    last = rsp;
    last_lat = t + 1;
  endtask

  task automatic read_retry(input laddr_t a, output line_t d);
    int n;
    n = 0;
    do begin send(LLC_READ, a, '0, '0); n++; end while (!last.ack && n < 200);
    d = last.data;
  endtask

  function automatic line_t pattern(input laddr_t a);
    line_t l;
    for (int w = 0; w < 16; w++) l[w*32 +: 32] = {a[15:0], 16'(w)};
    return l;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    line_t d, m;
    bmask_t wm;
    req_valid = 0; req = '0;
    for (int a = 0; a < 256; a++)
      for (int w = 0; w < 16; w++) u_dram.poke32(32'(a * 64 + w * 4), {16'(a), 16'(w)});
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (init_done);

    // read miss, then hit
    send(LLC_READ, 26'd5, '0, '0);
    chk(!last.ack && last.src == 3'd5, "first READ of a line is a NACK");
    chk(last_lat == LAT, "response latency");
    read_retry(26'd5, d);
    chk(last.ack && d == pattern(26'd5), "READ returns the DRAM line");
    chk(last_lat == LAT, "hit latency");

    // byte-masked write
    m = d;
    wm = 64'h0000_0000_0000_f00f;
    for (int b = 0; b < 64; b++) if (wm[b]) m[b*8 +: 8] = 8'hA5;
    send(LLC_WRITE, 26'd5, {64{8'hA5}}, wm);
    chk(last.ack, "WRITE to resident line");
    read_retry(26'd5, d);
    chk(d == m, "WRITE merged bytes");

    // locking set 0: lines 16, 32, 48 (set 0)
    for (int k = 1; k <= WAYS - 1; k++) begin
      send(LLC_LOCK, laddr_t'(k * SETS), '0, '0);
      chk(last.ack, "LOCK accepted while the set has room");
      repeat (25) @(negedge clk);
    end
    send(LLC_LOCK, laddr_t'(4 * SETS), '0, '0);
    chk(!last.ack, "LOCK refused: last unlocked way of the set");
    chk(stat_lock_nacks == 1, "lock NACK counted");
    // other lines of the set still work through the free way
    for (int k = 5; k < 9; k++) begin
      read_retry(laddr_t'(k * SETS), d);
      chk(d == pattern(laddr_t'(k * SETS)), "unlocked way keeps serving the set");
    end
    // locked lines are still resident (hit on first try)
    for (int k = 1; k <= WAYS - 1; k++) begin
      send(LLC_READ, laddr_t'(k * SETS), '0, '0);
      chk(last.ack && last.data == pattern(laddr_t'(k * SETS)), "locked line not evicted");
    end
    send(LLC_UNLOCK, laddr_t'(1 * SETS), '0, '0);
    chk(last.ack, "UNLOCK");
    send(LLC_LOCK, laddr_t'(4 * SETS), '0, '0);
    chk(last.ack, "LOCK accepted after UNLOCK");

    // dirty eviction: line 5 (set 5) dirty; sweep set 5 with reads
    for (int k = 1; k < 10; k++) read_retry(laddr_t'(5 + k * SETS), d);
    repeat (5) @(negedge clk);
    chk(stat_writebacks >= 1, "dirty victim written back");
    chk(u_dram.peek32(32'(5 * 64)) == m[31:0] && u_dram.peek32(32'(5 * 64 + 12)) == m[127:96],
        "DRAM holds the written-back data");

    // MSHR limit: three LOCK misses in a row, 2 MSHRs
    fork
      begin
        send(LLC_LOCK, 26'd200, '0, '0); chk(last.ack, "LOCK miss 1");
        send(LLC_LOCK, 26'd201, '0, '0); chk(last.ack, "LOCK miss 2");
        send(LLC_LOCK, 26'd202, '0, '0); chk(!last.ack, "LOCK refused with MSHRs full");
      end
    join
    repeat (40) @(negedge clk);
    send(LLC_LOCK, 26'd202, '0, '0); chk(last.ack, "LOCK after MSHRs drain");
    repeat (40) @(negedge clk);
    send(LLC_READ, 26'd201, '0, '0);
    chk(last.ack && last.data == pattern(26'd201), "locked line filled");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
