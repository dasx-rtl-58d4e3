// tb_obj_store: fills random tags (Collector id, key block, sector mask,
// data), checks key-based reads on all PE ports against a reference model,
// writes through the PE ports and checks data and dirty bits through the
// Collector read-back port, then clears and checks that nothing hits.
module tb_obj_store;
  import dasx_pkg::*;
  localparam int NP = 8, NT = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NP-1:0] pe_req, pe_we, pe_miss;
  coll_id_t [NP-1:0] pe_coll;
  key_t [NP-1:0] pe_key;
  logic [NP-1:0][31:0] pe_wdata, pe_rdata;
  logic fill_valid, clear_all;
  logic [4:0] fill_idx, rd_idx;
  coll_id_t fill_coll;
  key_t fill_kbase;
  logic [7:0] fill_svalid, rd_svalid;
  logic [31:0] fill_bp, rd_bp;
  logic [2:0] fill_esize, rd_esize;
  logic [7:0][31:0] fill_data, rd_data;
  logic rd_valid, rd_dirty;

  obj_store #(.NPORTS(NP), .NTAGS(NT)) dut (.*);

  // reference
  coll_id_t  m_coll [NT];
  key_t      m_kb   [NT];
  logic [7:0] m_sv  [NT];
  logic [7:0][31:0] m_d [NT];
  logic      m_dirty [NT];
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pe_req = '0; pe_we = '0; pe_coll = '0; pe_key = '0; pe_wdata = '0;
    fill_valid = 0; clear_all = 0; fill_idx = 0; rd_idx = 0; fill_coll = 0;
    fill_kbase = 0; fill_svalid = 0; fill_bp = 0; fill_esize = 4; fill_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      // fill all tags: tag t holds coll t%8, keys 8*(t/8 + 10*round) ...
      for (int t = 0; t < NT; t++) begin
        @(negedge clk);
        m_coll[t] = coll_id_t'(t % 8);
        m_kb[t]   = key_t'(8 * (t / 8 + 10 * round));
        m_sv[t]   = (t % 5 == 0) ? 8'h0f : 8'hff;
        for (int s = 0; s < 8; s++) m_d[t][s] = $urandom;
        m_dirty[t] = 0;
        fill_valid = 1; fill_idx = 5'(t); fill_coll = m_coll[t]; fill_kbase = m_kb[t];
        fill_svalid = m_sv[t]; fill_bp = 32'h1000 + 32'(t * 32); fill_esize = 3'd4;
        fill_data = m_d[t];
      end
      @(negedge clk);
      fill_valid = 0;
      // random reads
      for (int n = 0; n < 100; n++) begin
        for (int p = 0; p < NP; p++) begin
          int t, s;
          t = $urandom % NT;
          s = (m_sv[t] == 8'h0f) ? $urandom % 4 : $urandom % 8;
          pe_req[p] = 1; pe_we[p] = 0; pe_coll[p] = m_coll[t]; pe_key[p] = m_kb[t] + key_t'(s);
          #1;
          chk(pe_rdata[p] == m_d[t][s] && !pe_miss[p], "read hit data");
        end
        @(negedge clk);
      end
      // writes on all ports, distinct tags
      for (int p = 0; p < NP; p++) begin
        int t;
        t = p * 4 + round % 4;
        pe_req[p] = 1; pe_we[p] = 1; pe_coll[p] = m_coll[t]; pe_key[p] = m_kb[t] + 2;
        pe_wdata[p] = $urandom; m_d[t][2] = pe_wdata[p]; m_dirty[t] = 1;
      end
      @(negedge clk);
      pe_req = '0; pe_we = '0;
      for (int t = 0; t < NT; t++) begin
        rd_idx = 5'(t);
        #1;
        chk(rd_valid && rd_dirty == m_dirty[t] && rd_data == m_d[t] && rd_svalid == m_sv[t]
            && rd_bp == 32'h1000 + 32'(t * 32), "read-back");
      end
      // clear and check the valid bits drop
      @(negedge clk);
      clear_all = 1;
      @(negedge clk);
      clear_all = 0;
      for (int t = 0; t < NT; t++) begin
        rd_idx = 5'(t);
        #1;
        chk(!rd_valid, "cleared");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
