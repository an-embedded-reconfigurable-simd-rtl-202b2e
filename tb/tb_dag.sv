// tb_dag: checks post-modify, pre-modify, circular wrap with positive and
// negative modify, and bit-reversed order (full address range and a
// 16-point FFT buffer) against a reference model of the index register.
module tb_dag;
  import dsp_pkg::*;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0;
  logic gen = 0, pre = 0, brev = 0, wr = 0;
  logic [1:0] isel = 0, msel = 0, widx = 0;
  dag_reg_e wsel = DAGW_I;
  logic [AW-1:0] wdata = 0, addr;
  int checks = 0, failures = 0;

  dag #(.AW(AW), .NSET(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wreg(input dag_reg_e s, input int idx, input int v);
    @(negedge clk); wr = 1; wsel = s; widx = 2'(idx); wdata = AW'(v);
    @(negedge clk); wr = 0;
  endtask

  task automatic step(input int exp_addr, input string what);
    gen = 1; #1;
    checks++;
    if (addr !== AW'(exp_addr)) begin
      failures++;
      if (failures < 10) $display("FAIL %s addr=%0d exp=%0d", what, addr, exp_addr);
    end
    @(negedge clk); gen = 0;
  endtask

  initial begin
    int i_ref, b, l, m;
    repeat (2) @(negedge clk); rst_n = 1;
    // linear post-modify with M = 3
    wreg(DAGW_I, 0, 100); wreg(DAGW_M, 0, 3);
    isel = 0; msel = 0;
    for (int k = 0; k < 10; k++) step(100 + 3 * k, "linear");
    // pre-modify: I + M, I unchanged
    pre = 1; step(133, "pre"); step(133, "pre again"); pre = 0;
    // circular buffer B=200, L=7, M=+3 and M=-2
    for (int dir = 0; dir < 2; dir++) begin
      b = 200; l = 7; m = dir ? -2 : 3;
      wreg(DAGW_B, 1, b); wreg(DAGW_L, 1, l); wreg(DAGW_I, 1, b + 2); wreg(DAGW_M, 2, m);
      isel = 1; msel = 2; i_ref = b + 2;
      for (int k = 0; k < 30; k++) begin
        step(i_ref, "circular");
        i_ref = i_ref + m;
        if (i_ref >= b + l) i_ref -= l;
        if (i_ref < b) i_ref += l;
      end
    end
    // bit-reversed: with M = 2^(AW-1) the reverse-carry add visits all
    // addresses in bit-reversed order; the first 16 are checked
    wreg(DAGW_L, 3, 0); wreg(DAGW_I, 3, 0); wreg(DAGW_M, 3, 1 << (AW - 1));
    isel = 3; msel = 3; brev = 1;
    for (int k = 0; k < 16; k++) begin
      logic [AW-1:0] kk, rr;
      kk = AW'(k);
      for (int j = 0; j < AW; j++) rr[j] = kk[AW-1-j];
      step(int'(rr), "bitrev");
    end
    // 16-point FFT order with M = N/2 = 8: 0, 8, 4, 12, 2, 10, 6, 14, ...
    wreg(DAGW_I, 3, 0); wreg(DAGW_M, 3, 8);
    for (int k = 0; k < 16; k++) begin
      logic [3:0] kk, rr;
      kk = 4'(k);
      for (int j = 0; j < 4; j++) rr[j] = kk[3-j];
      step(int'(rr), "brev16");
    end
    brev = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
