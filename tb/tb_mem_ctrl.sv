// tb_mem_ctrl: the memory controller with sixteen DM blocks and the program
// memory behind it. The external master writes random words into random DM
// blocks and PM, reads them back and compares; it also checks that the core's
// shared read addresses and per-datapath writes reach the right blocks, that
// an external access waits while the core uses the port, and the ack delays
// (write 1, DM read 2, PM read 3 cycles).
module tb_mem_ctrl;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cx_re = 0, cy_re = 0, c_fetch = 0;
  logic [9:0] cx_raddr = 0, cy_raddr = 0, cx_waddr = 0, cy_waddr = 0;
  logic [7:0] cx_we = 0, cy_we = 0;
  logic [15:0] c_wdata [8];
  logic [12:0] c_pc = 0;
  logic ext_req = 0, ext_we = 0, ext_space = 0, ext_ack;
  logic [15:0] ext_addr = 0;
  logic [23:0] ext_wdata = 0, ext_rdata;
  logic [15:0] dm_re, dm_we;
  logic [9:0] dm_raddr [16], dm_waddr [16];
  logic [15:0] dm_wdata [16], dm_rdata [16];
  logic pm_re, pm_we, pm_rvalid;
  logic [12:0] pm_raddr, pm_waddr;
  logic [23:0] pm_wdata, pm_rdata;
  int checks = 0, failures = 0;

  mem_ctrl dut (.clk, .rst_n, .cx_re, .cx_raddr, .cy_re, .cy_raddr, .cx_we, .cx_waddr,
                .cy_we, .cy_waddr, .c_wdata, .c_fetch, .c_pc, .ext_req, .ext_we, .ext_space,
                .ext_addr, .ext_wdata, .ext_ack, .ext_rdata, .dm_re, .dm_raddr, .dm_we, .dm_waddr,
                .dm_wdata, .dm_rdata, .pm_re, .pm_raddr, .pm_we, .pm_waddr, .pm_wdata, .pm_rdata);
  for (genvar b = 0; b < 16; b++) begin : g_dm
    dm_bank u (.clk, .rst_n, .re(dm_re[b]), .raddr(dm_raddr[b]), .rdata(dm_rdata[b]),
               .we(dm_we[b]), .waddr(dm_waddr[b]), .wdata(dm_wdata[b]));
  end
  pm_mem u_pm (.clk, .rst_n, .re(pm_re), .raddr(pm_raddr), .rdata(pm_rdata), .rvalid(pm_rvalid),
               .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata));
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // one external access; returns read data and the cycles from request to ack
  task automatic ext(input logic w, input logic sp, input logic [15:0] a, input logic [23:0] d,
                     output logic [23:0] q, output int cyc);
    @(negedge clk);
    ext_req = 1; ext_we = w; ext_space = sp; ext_addr = a; ext_wdata = d; cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!ext_ack && cyc < 100);
    q = ext_rdata;
    @(negedge clk); ext_req = 0;
  endtask

  initial begin
    logic [23:0] q; int cyc;
    logic [15:0] dm_ref [16][64];
    logic [23:0] pm_ref [64];
    foreach (c_wdata[i]) c_wdata[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // external writes then reads, core idle
    for (int b = 0; b < 16; b++) for (int a = 0; a < 64; a++) begin
      dm_ref[b][a] = 16'($urandom);
      ext(1, 1, {2'b00, 4'(b), 10'(a)}, {8'h00, dm_ref[b][a]}, q, cyc);
      if (a == 0) chk(cyc == 1, "dm write ack delay");
    end
    for (int a = 0; a < 64; a++) begin
      pm_ref[a] = 24'($urandom);
      ext(1, 0, 16'(a), pm_ref[a], q, cyc);
    end
    for (int n = 0; n < 300; n++) begin
      int b, a;
      b = $urandom % 16; a = $urandom % 64;
      ext(0, 1, {2'b00, 4'(b), 10'(a)}, 0, q, cyc);
      chk(q[15:0] == dm_ref[b][a] && cyc == 2, "dm read");
      ext(0, 0, 16'(a), 0, q, cyc);
      chk(q == pm_ref[a] && cyc == 3, "pm read");
    end
    // core read of DMX address 5: all eight X blocks answer, Y blocks do not read
    @(negedge clk); cx_re = 1; cx_raddr = 5;
    @(negedge clk); cx_re = 0;
    for (int d = 0; d < 8; d++) chk(dm_rdata[2*d] == dm_ref[2*d][5], "core x read");
    // core reads DMX address 9 and DMY address 6 in the same cycle
    @(negedge clk); cx_re = 1; cx_raddr = 9; cy_re = 1; cy_raddr = 6;
    @(negedge clk); cx_re = 0; cy_re = 0;
    for (int d = 0; d < 8; d++) begin
      chk(dm_rdata[2*d] == dm_ref[2*d][9], "core x read 2");
      chk(dm_rdata[2*d+1] == dm_ref[2*d+1][6], "core y read");
    end
    // core writes DMY address 7 of datapaths 2 and 5
    @(negedge clk); cy_we = 8'b0010_0100; cy_waddr = 7;
    foreach (c_wdata[i]) c_wdata[i] = 16'hA000 + 16'(i);
    @(negedge clk); cy_we = 0;
    ext(0, 1, {2'b00, 4'd5, 10'd7}, 0, q, cyc);
    chk(q[15:0] == 16'hA002, "core y write dp3");
    ext(0, 1, {2'b00, 4'd11, 10'd7}, 0, q, cyc);
    chk(q[15:0] == 16'hA005, "core y write dp6");
    ext(0, 1, {2'b00, 4'd13, 10'd7}, 0, q, cyc);
    chk(q[15:0] == dm_ref[13][7], "untouched block");
    // external DMX read waits while the core reads DMX; PM waits for fetch
    @(negedge clk); cx_re = 1; c_fetch = 1;
    fork
      begin ext(0, 1, {2'b00, 4'd2, 10'd9}, 0, q, cyc); end
      begin repeat (5) @(negedge clk); cx_re = 0; end
    join
    chk(cyc >= 6 && q[15:0] == dm_ref[2][9], "dm contention");
    fork
      begin ext(0, 0, 16'd3, 0, q, cyc); end
      begin repeat (4) @(negedge clk); c_fetch = 0; end
    join
    chk(cyc >= 5 && q == pm_ref[3], $sformatf("pm contention cyc=%0d", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
