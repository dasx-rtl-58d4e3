// tb_dasx_datacube: a data-cube roll-up on the accelerator at default size.
//
// A 2-D cube of ROWS rows x 7 measures is stored column by column, one vector
// per measure, with mixed element sizes (three 4-byte, two 2-byte and two
// 1-byte columns). The kernel rolls every row up into its total,
//   T[r] = sum of the 7 measures of row r,
// so the loop uses all 8 vectors of a Collector group (7 loads, 1 store).
// With 7 vectors of one block per 8 rows, a tile is 32 rows (28 of the 32
// Obj-Store tags). The testbench checks every total (read back through the
// host LLC port), that tiles of exactly 32 rows were used, and reports cycles
// per row. The cube layout and kernel are this testbench's own example of the
// integer, vector-only loop class the accelerator targets.
module tb_dasx_datacube;
  import dasx_pkg::*;
  import dasx_asm_pkg::*;
  localparam int NPE = 8;
  localparam int ROWS = 400;
  localparam int NM = 7;

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

  dasx_top dut (.*);

  dram_model #(.LATENCY(200)) u_dram (.clk, .req_valid(dram_req_valid && rst_n),
    .req_ready(dram_req_ready), .req(dram_req), .rsp_valid(dram_rsp_valid), .rsp(dram_rsp));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  localparam int ESZ [NM] = '{4, 4, 4, 2, 2, 1, 1};
  logic [31:0] cube [NM][ROWS];
  int tile_sizes [$];

  always @(posedge clk) if (dut.tile_go) tile_sizes.push_back(int'(dut.tile_end - dut.tile_start));

  function automatic logic [31:0] col_base(input int m);
    return 32'h0010_0000 + 32'(m) * 32'h1000;
  endfunction

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

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p [20];
    int n, cycles;
    line_t l;
    for (int m = 0; m < NM; m++)
      for (int r = 0; r < ROWS; r++) begin
        cube[m][r] = (ESZ[m] == 4) ? ($urandom % 100000) : (ESZ[m] == 2) ? 32'($urandom % 65536) : 32'($urandom % 256);
        for (int b = 0; b < ESZ[m]; b++)
          u_dram.poke8(col_base(m) + 32'(r * ESZ[m] + b), cube[m][r][b*8 +: 8]);
      end
    ib_we = 0; ib_waddr = 0; ib_wdata = 0; vec_desc = '0; trip_count = 0; vec_start = 0;
    hash_desc = '0; bt_desc = '0;
    hq_valid = 0; hq_key = '0; hr_ready = 1; bq_valid = 0; bq_key = '0; br_ready = 1;
    host_req_valid = 0; host_req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (llc_ready);

    // kernel: r1 = row; r2 = sum of the 7 measures; T[row] = r2
    n = 0;
    p[n++] = cur(1);
    p[n++] = ld(2, 0, 1, 0);
    for (int m = 1; m < NM; m++) begin
      p[n++] = ld(3, m, 1, 0);
      p[n++] = r3(OP_ADD, 2, 2, 3);
    end
    p[n++] = st(2, 7, 1, 0);
    p[n++] = next(5);
    p[n++] = br(OP_BNE, 5, 0, -n);
    p[n++] = halt();
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      ib_we = 1; ib_waddr = 8'(i); ib_wdata = p[i];
    end
    @(negedge clk);
    ib_we = 0;

    vec_desc = '0;
    for (int m = 0; m <= NM; m++) begin
      vec_desc[m].valid = 1;
      vec_desc[m].is_store = (m == NM);
      vec_desc[m].base = col_base(m);
      vec_desc[m].elem_bytes = (m == NM) ? 3'd4 : 3'(ESZ[m]);
      vec_desc[m].length = key_t'(ROWS);
      vec_desc[m].n_offs = 4'd1;
    end
    trip_count = key_t'(ROWS);
    @(negedge clk);
    vec_start = 1;
    @(negedge clk);
    vec_start = 0;
    cycles = 0;
    while (!vec_done) begin @(negedge clk); cycles++; end
    $display("roll-up of %0d rows: %0d cycles, %0d.%02d cycles/row, %0d tiles",
             ROWS, cycles, cycles / ROWS, (cycles * 100 / ROWS) % 100, stat_tiles);

    for (int ln = 0; ln < (ROWS * 4 + 63) / 64; ln++) begin
      host_read(laddr_t'((col_base(NM) >> 6) + ln), l);
      for (int w = 0; w < 16; w++) begin
        int r;
        logic [31:0] t;
        r = ln * 16 + w;
        if (r < ROWS) begin
          t = 0;
          for (int m = 0; m < NM; m++) t += cube[m][r];
          chk(l[w*32 +: 32] == t, $sformatf("total of row %0d: %0d, expected %0d", r, l[w*32 +: 32], t));
        end
      end
    end
    chk(tile_sizes.size() == (ROWS + 31) / 32, $sformatf("%0d tiles", tile_sizes.size()));
    foreach (tile_sizes[i])
      chk(tile_sizes[i] == ((i < ROWS / 32) ? 32 : ROWS % 32), $sformatf("tile %0d of %0d rows", i, tile_sizes[i]));
    for (int q = 0; q < NPE; q++) chk(stat_pe_retired[q] > 0, "every PE ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
