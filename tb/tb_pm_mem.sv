// tb_pm_mem: loads random instructions into the 8k x 24 program memory and
// reads them back in a pipelined stream, checking the two-cycle latency.
module tb_pm_mem;
  logic clk = 0, rst_n = 0, re = 0, we = 0, rvalid;
  logic [12:0] raddr = 0, waddr = 0;
  logic [23:0] rdata, wdata = 0;
  logic [23:0] shadow [8192];
  int checks = 0, failures = 0;

  pm_mem #(.AW(13), .DW(24)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] exp_q [$];
    logic        rq [$];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 8192; a++) begin
      @(negedge clk); we = 1; waddr = 13'(a); wdata = 24'($urandom); shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 4000; n++) begin
      re = 1'($urandom); raddr = 13'($urandom);
      exp_q.push_back(shadow[raddr]); rq.push_back(re);
      @(negedge clk);
      if (rq.size() == 2) begin
        logic r; logic [23:0] e;
        r = rq.pop_front(); e = exp_q.pop_front();
        checks++;
        if (rvalid !== r || (r && rdata !== e)) begin
          failures++;
          if (failures < 10) $display("FAIL rvalid=%b rdata=%h exp=%h", rvalid, rdata, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
