// tb_mshr_file: allocates misses up to capacity, checks the free count, then
// returns them in random order and checks that each response finds the way
// recorded at allocation and frees exactly one entry.
module tb_mshr_file;
  import dasx_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic alloc_valid, rsp_valid, rsp_hit;
  laddr_t alloc_laddr, rsp_laddr;
  logic [3:0] alloc_way, rsp_way;
  logic [$clog2(N+1)-1:0] free_cnt;
  int checks = 0, failures = 0;
  laddr_t a [N];
  logic [3:0] w [N];

  mshr_file #(.N(N), .WAY_W(4)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc_valid = 0; rsp_valid = 0; alloc_laddr = '0; rsp_laddr = '0; alloc_way = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        chk(free_cnt == ($clog2(N+1))'(N - i), "free count while allocating");
        a[i] = laddr_t'(round * 64 + i * 7 + 1);
        w[i] = 4'($urandom);
        alloc_valid = 1; alloc_laddr = a[i]; alloc_way = w[i];
      end
      @(negedge clk);
      alloc_valid = 0;
      @(negedge clk);
      chk(free_cnt == 0, "full");
      rsp_valid = 1; rsp_laddr = '1; #1;
      chk(!rsp_hit, "no hit for an address never allocated");
      for (int k = N - 1; k >= 0; k--) begin
        @(negedge clk);
        rsp_valid = 1; rsp_laddr = a[(k * 5 + round) % N];
        #1;
        chk(rsp_hit === 1'b1, "response finds its entry");
        chk(rsp_way === w[(k * 5 + round) % N], "way returned");
        @(negedge clk);
        rsp_valid = 0;
        #1;
        chk(free_cnt == ($clog2(N+1))'(N - k), "entry freed");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
