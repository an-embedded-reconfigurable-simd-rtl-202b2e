// tb_dm_bank: random writes and reads of a 1k x 16 block against a shadow
// array; checks the one-cycle read latency and read-old-on-collision.
module tb_dm_bank;
  logic clk = 0, rst_n = 0, re = 0, we = 0;
  logic [9:0] raddr = 0, waddr = 0;
  logic [15:0] rdata, wdata = 0;
  logic [15:0] shadow [1024];
  int checks = 0, failures = 0;

  dm_bank #(.AW(10), .DW(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_q;
    logic        chk_q;
    repeat (2) @(negedge clk); rst_n = 1;
    // fill the whole block
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); we = 1; waddr = 10'(a); wdata = 16'($urandom); shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    chk_q = 0; exp_q = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if (chk_q) begin
        checks++;
        if (rdata !== exp_q) begin
          failures++;
          if (failures < 10) $display("FAIL rdata=%h exp=%h", rdata, exp_q);
        end
      end
      re = 1'($urandom); we = 1'($urandom);
      raddr = 10'($urandom); waddr = (n % 4 == 0) ? raddr : 10'($urandom);
      wdata = 16'($urandom);
      chk_q = re; exp_q = shadow[raddr];   // old word on collision
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
