// tb_pe: one PE (PE_ID 3 of 8) runs a kernel with key-based loads and
// stores, back-to-back dependences (interlock and bypass), a data-dependent
// branch, %CUR, BAR and NEXT, against a behavioural Obj-Store and a
// testbench-driven tile controller. Tiles of different sizes are released one
// after the other, one of them with no iteration for this PE. Checks the
// exact set of iterations the PE runs (start+3, start+11, ... of each tile),
// every stored value, that it halts only after loop_done, and that BAR holds
// the PE until release.
module tb_pe;
  import dasx_pkg::*;
  import dasx_asm_pkg::*;
  localparam int NPE = 8, ID = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] ib_pc;
  logic [31:0] ib_instr;
  logic os_req, os_we;
  coll_id_t os_coll;
  key_t os_key;
  logic [31:0] os_wdata, os_rdata;
  logic tile_go, loop_done, wait_tile, bar_arrive, bar_release, halted;
  key_t tile_start, tile_end;
  logic [31:0] retired;

  pe #(.NPE(NPE), .PE_ID(ID)) dut (.*);

  logic [31:0] prog [256];
  logic [31:0] A [256], B [256];
  logic [31:0] C [int];
  int checks = 0, failures = 0;
  int bar_wait_cycles = 0;

  assign ib_instr = prog[ib_pc];
  assign os_rdata = (os_coll == 0) ? A[os_key[7:0]] : (os_coll == 1) ? B[os_key[7:0]] : 32'hdead;
  always @(posedge clk) if (os_req && os_we) begin
    if (os_coll != 2) begin failures++; $display("FAIL store to collector %0d", os_coll); end
    C[int'(os_key)] = os_wdata;
  end

  // barrier: release two cycles after arrival
  int arr_cnt = 0;
  always @(posedge clk) begin
    arr_cnt <= bar_arrive ? arr_cnt + 1 : 0;
    if (bar_arrive) bar_wait_cycles++;
  end
  assign bar_release = bar_arrive && arr_cnt >= 2;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [31:0] ref_c(input int i);
    logic [31:0] c;
    c = A[i] * B[i] + A[i] - 32'(i << 1);
    if (!($signed(B[i]) < $signed(A[i]))) c += 7;
    return c;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int starts [5] = '{0, 20, 27, 30, 64};
    int expected [int];
    for (int i = 0; i < 256; i++) begin
      A[i] = $urandom % 1000; B[i] = $urandom % 1000; prog[i] = '0;
    end
    prog[0]  = addi(7, 0, 1);
    prog[1]  = cur(1);
    prog[2]  = ld(2, 0, 1, 0);
    prog[3]  = ld(3, 1, 1, 0);
    prog[4]  = r3(OP_MUL, 4, 2, 3);
    prog[5]  = r3(OP_ADD, 4, 4, 2);
    prog[6]  = r3(OP_SLL, 6, 1, 7);
    prog[7]  = r3(OP_SUB, 4, 4, 6);
    prog[8]  = br(OP_BLT, 3, 2, 1);
    prog[9]  = addi(4, 4, 7);
    prog[10] = st(4, 2, 1, 0);
    prog[11] = bar();
    prog[12] = next(5);
    prog[13] = br(OP_BNE, 5, 0, -13);
    prog[14] = halt();
    tile_go = 0; tile_start = 0; tile_end = 0; loop_done = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    chk(wait_tile && !halted, "idle PE waits for its first tile");
    for (int t = 0; t < 4; t++) begin
      @(negedge clk);
      tile_start = key_t'(starts[t]); tile_end = key_t'(starts[t+1]); tile_go = 1;
      for (int i = starts[t] + ID; i < starts[t+1]; i += NPE) expected[i] = 1;
      @(negedge clk);
      tile_go = 0;
      if (starts[t] + ID >= starts[t+1]) chk(wait_tile, "no iteration: PE stays at the tile barrier");
      while (!wait_tile) @(negedge clk);
      chk(!halted, "PE does not halt before loop_done");
      repeat (5) @(negedge clk);
    end
    loop_done = 1;
    repeat (10) @(negedge clk);
    chk(halted, "PE halts after loop_done");
    foreach (expected[i]) chk(C.exists(i) && C[i] == ref_c(i), $sformatf("iteration %0d result", i));
    chk(C.size() == expected.size(), "no extra iterations");
    chk(bar_wait_cycles >= 3 * expected.size(), "BAR held the PE until release");
    $display("iterations %0d, instructions retired %0d", expected.size(), retired);
    begin
      int n_exp;
      n_exp = 2;
      foreach (expected[i]) n_exp += 12 + (($signed(B[i]) < $signed(A[i])) ? 0 : 1);
      chk(retired == 32'(n_exp), "retired instruction count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
