// tb_llc_arbiter: five requesters hold random requests; the testbench plays
// the LLC with random ready and echoes each accepted request back as a
// response two cycles later. Checks that only one valid requester is granted
// per cycle, that the forwarded request is the winner's with its index as
// src, that grants rotate fairly, and that responses reach only their owner.
module tb_llc_arbiter;
  import dasx_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] in_valid, in_ready, in_rsp_valid;
  llc_req_t [N-1:0] in_req;
  llc_rsp_t in_rsp, out_rsp;
  logic out_valid, out_ready, out_rsp_valid;
  llc_req_t out_req;
  int checks = 0, failures = 0;
  int grants [N];
  int last = N - 1;

  llc_arbiter #(.N(N)) dut (.*);

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
    in_valid = '0; in_req = '0; out_ready = 0; out_rsp_valid = 0; out_rsp = '0;
    for (int i = 0; i < N; i++) grants[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int exp_win;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (!in_valid[i] || in_ready[i]) begin
          in_valid[i] = (n < 2000) ? ($urandom % 3 != 0) : 1'b1;
          in_req[i] = '0;
          in_req[i].laddr = laddr_t'($urandom);
          in_req[i].op = llc_op_e'($urandom % 4);
        end
      end
      out_ready = ($urandom % 4 != 0);
      out_rsp_valid = ($urandom % 2 == 0);
      out_rsp = '0;
      out_rsp.src = src_t'($urandom % N);
      out_rsp.data = line_t'($urandom);
      #1;
      exp_win = -1;
      for (int k = 1; k <= N; k++) if (exp_win < 0 && in_valid[(last + k) % N]) exp_win = (last + k) % N;
      chk(out_valid == (in_valid != 0), "out_valid");
      if (exp_win >= 0) begin
        chk(out_req.laddr == in_req[exp_win].laddr && out_req.op == in_req[exp_win].op &&
            out_req.src == src_t'(exp_win), "round-robin winner forwarded");
        chk(in_ready == (out_ready ? (N'(1) << exp_win) : '0), "ready to winner only");
        if (out_ready) begin last = exp_win; grants[exp_win]++; end
      end
      for (int i = 0; i < N; i++)
        chk(in_rsp_valid[i] == (out_rsp_valid && out_rsp.src == src_t'(i)), "response routing");
      chk(in_rsp.data == out_rsp.data, "response data");
    end
    for (int i = 0; i < N; i++) chk(grants[i] > 200, "every requester served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
