// tb_ins_buffer: fills the instruction buffer with random words, then reads
// every entry back through every port at random addresses and compares with
// a shadow copy kept by the testbench.
module tb_ins_buffer;
  import dasx_pkg::*;
  localparam int NP = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [7:0] waddr;
  logic [31:0] wdata;
  logic [NP-1:0][7:0] raddr;
  logic [NP-1:0][31:0] rdata;
  logic [31:0] shadow [256];
  int checks = 0, failures = 0;

  ins_buffer #(.ENTRIES(256), .NPORTS(NP)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 200; n++) begin
      for (int p = 0; p < NP; p++) raddr[p] = 8'($urandom);
      #1;
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (rdata[p] !== shadow[raddr[p]]) begin
          failures++;
          $display("FAIL port %0d addr %0d: %h != %h", p, raddr[p], rdata[p], shadow[raddr[p]]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
