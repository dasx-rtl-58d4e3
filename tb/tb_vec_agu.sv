// tb_vec_agu: random VEC descriptors and tiles; for every block of the tile
// the key base, sector mask, byte address and line address are compared with
// a reference computed here from the key set the tile touches. Also checks
// that the blocks cover exactly the keys {start+i+off} clipped to the vector.
module tb_vec_agu;
  import dasx_pkg::*;
  vec_desc_t desc;
  key_t tile_start, tile_len, blk, nblk, kbase;
  logic [7:0] svalid;
  logic [31:0] addr;
  laddr_t laddr;
  logic [5:0] loff;
  int checks = 0, failures = 0;

  vec_agu dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      int lo, hi, omin, omax, es, len;
      bit used [int];
      desc = '0;
      desc.valid = 1;
      es = (n % 3 == 0) ? 1 : (n % 3 == 1) ? 2 : 4;
      desc.elem_bytes = 3'(es);
      desc.base = ($urandom & 32'h00ff_ffe0);
      len = 1 + $urandom % 300;
      desc.length = key_t'(len);
      desc.n_offs = 4'(1 + $urandom % 3);
      omin = 1000; omax = -1000;
      for (int i = 0; i < 8; i++) begin
        int o;
        o = int'($urandom % 7) - 3;
        desc.offs[i] = 8'(o);
        if (i < int'(desc.n_offs)) begin
          if (o < omin) omin = o;
          if (o > omax) omax = o;
        end
      end
      tile_start = key_t'($urandom % len);
      tile_len   = key_t'(1 + $urandom % 64);
      // reference key set
      lo = int'(tile_start) + omin; if (lo < 0) lo = 0;
      hi = int'(tile_start) + int'(tile_len) - 1 + omax; if (hi > len - 1) hi = len - 1;
      blk = 0;
      #1;
      if (hi < lo) begin
        chk(nblk == 0, "empty tile");
        continue;
      end
      chk(nblk == key_t'(hi / 8 - lo / 8 + 1), "block count");
      for (int b = 0; b < int'(nblk); b++) begin
        blk = key_t'(b);
        #1;
        chk(kbase == key_t'((lo / 8 + b) * 8), "key base");
        for (int s = 0; s < 8; s++) begin
          int k;
          k = int'(kbase) + s;
          chk(svalid[s] == (k >= lo && k <= hi), "sector mask");
          if (svalid[s]) used[k] = 1;
        end
        chk(addr == desc.base + 32'(int'(kbase) * es), "byte address");
        chk(laddr == addr[31:6] && loff == addr[5:0], "line address");
      end
      // every key an iteration needs is covered
      for (int i = 0; i < int'(tile_len); i++)
        for (int j = 0; j < int'(desc.n_offs); j++) begin
          int k;
          k = int'(tile_start) + i + int'($signed(desc.offs[j]));
          if (k >= 0 && k < len) chk(used.exists(k), "key covered");
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
