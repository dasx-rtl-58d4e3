// tb_pe_barrier: drives random arrive/done patterns and checks that release
// rises exactly when every PE has arrived or is done and at least one is
// waiting, and that episodes counts the releases.
module tb_pe_barrier;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] arrive, done;
  logic release_o;
  logic [31:0] episodes;
  int checks = 0, failures = 0, expect_ep = 0;

  pe_barrier #(.NPE(N)) dut (.*);

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    arrive = '0; done = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int sel;
      @(negedge clk);
      sel = $urandom % 4;
      case (sel)
        0: begin arrive = '1; done = '0; end
        1: begin done = N'($urandom); arrive = ~done; end
        2: begin arrive = N'($urandom); done = N'($urandom); end
        default: begin arrive = '0; done = '1; end
      endcase
      #1;
      checks++;
      if (release_o !== (((arrive | done) == '1) && arrive != 0)) begin
        failures++;
        $display("FAIL arrive=%b done=%b release=%b", arrive, done, release_o);
      end
      if (release_o) expect_ep++;
    end
    @(negedge clk);
    arrive = '0;
    @(negedge clk);
    checks++;
    if (episodes != 32'(expect_ep)) begin
      failures++;
      $display("FAIL episodes %0d expected %0d", episodes, expect_ep);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
