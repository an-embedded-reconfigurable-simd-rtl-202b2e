// tb_recfg_adapter: a group of four processing units. In 32-bit mode it
// loads random 32-bit operands as DP1 (low) / DP2 (high) halves and checks
// 32-bit add, subtract, multiply and multiply-accumulate (80-bit) and
// arithmetic/logical shifts against 32/64-bit reference arithmetic; in
// 16-bit mode it checks four independent datapaths and the enable mask; it
// also checks the vector-add write into the accumulator.
module tb_recfg_adapter;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0, w32 = 1, grp_en = 1, bank = 0, vadd_wr = 0, bus_rd = 0, mv32;
  logic [3:0] pu_en = 4'hF, bus_wr = 0, dmx_we, dmy_we;
  pu_ctrl_t c;
  logic [15:0] dmx_rdata [4], dmy_rdata [4], dm_wdata [4], bus_rd_data [4];
  reg_e bus_rd_reg = R_AR, bus_wr_reg = R_AR;
  logic [15:0] bus_wr_data = 0;
  logic [79:0] vadd_data = 0, acc80_q;
  logic [39:0] mr [4];
  astat_t astat [4];
  int checks = 0, failures = 0;

  recfg_adapter dut (.*);
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

  task automatic issue();
    @(posedge clk); #1; c = '0;
  endtask

  // 32-bit register pair {DP2.r, DP1.r}, read through the bus port
  function automatic logic [31:0] rd32(input reg_e r);
    return {dut.g_pu[1].u_pu.u_dreg.rf[bank][r], dut.g_pu[0].u_pu.u_dreg.rf[bank][r]};
  endfunction

  task automatic load32(input reg_e rx, input logic [31:0] a, input reg_e ry, input logic [31:0] b);
    c = '0; c.ldx = 1; c.ldx_reg = rx; c.ldy = 1; c.ldy_reg = ry;
    dmx_rdata[0] = a[15:0]; dmx_rdata[1] = a[31:16];
    dmy_rdata[0] = b[15:0]; dmy_rdata[1] = b[31:16];
    issue();
  endtask

  initial begin
    logic [31:0] a, b, s32;
    logic signed [79:0] acc, p;
    int amt;
    c = '0;
    foreach (dmx_rdata[i]) begin dmx_rdata[i] = 0; dmy_rdata[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    // 32-bit ALU
    for (int n = 0; n < 200; n++) begin
      a = $urandom; b = (n % 10 == 0) ? a : $urandom;
      load32(R_AX0, a, R_AY0, b);
      c.cu = CU_ALU; c.alu.op = (n % 2) ? ALU_SUB : ALU_ADD; c.alu.x = R_AX0; c.alu.y = R_AY0;
      issue();
      s32 = (n % 2) ? a - b : a + b;
      chk(rd32(R_AR) == s32, "alu32");
      chk(astat[1].az == (s32 == 0) && astat[1].an == s32[31], "alu32 flags");
    end
    // 32-bit MAC, signed integer, accumulate over 20 products
    acc = 0;
    for (int n = 0; n < 20; n++) begin
      a = $urandom; b = $urandom;
      load32(R_MX0, a, R_MY0, b);
      c.cu = CU_MAC; c.mac.op = (n == 0) ? MAC_MUL : MAC_MAC; c.mac.x = R_MX0; c.mac.y = R_MY0;
      c.mac.xs = 1; c.mac.ys = 1;
      issue();
      p = 80'($signed(a)) * 80'($signed(b));
      acc = (n == 0) ? p : acc + p;
      chk(acc80_q == acc, "mac32 signed");
    end
    // unsigned x unsigned, multiply-subtract
    a = 32'hFFFF_FFFF; b = 32'hFFFF_FFFE;
    load32(R_MX0, a, R_MY0, b);
    c.cu = CU_MAC; c.mac.op = MAC_MSU; c.mac.x = R_MX0; c.mac.y = R_MY0; issue();
    acc = acc - 80'(a) * 80'(b);
    chk(acc80_q == acc, "msu32 unsigned");
    // 32-bit shifts
    for (int n = 0; n < 200; n++) begin
      a = $urandom; amt = int'($urandom % 41) - 20;
      load32(R_SI, a, R_AY0, 0);
      c.cu = CU_SHIFT; c.sh.op = (n % 2) ? SH_LSHIFT : SH_ASHIFT; c.sh.x = R_SI;
      c.sh.use_imm = 1; c.sh.imm = 8'(amt);
      issue();
      if (amt >= 0)      s32 = a << amt;
      else if (n % 2)    s32 = a >> (-amt);
      else               s32 = $signed(a) >>> (-amt);
      chk(rd32(R_SR0) == s32, $sformatf("shift32 n=%0d amt=%0d", n, amt));
    end
    // DP3/DP4 keep their registers in 32-bit mode
    chk(dut.g_pu[2].u_pu.u_dreg.rf[0][R_AR] == 0, "dp3 idle");
    // vector-add write into the 80-bit accumulator
    vadd_wr = 1; vadd_data = 80'h1234_5678_9ABC_DEF0_1357;
    @(posedge clk); #1; vadd_wr = 0;
    chk(acc80_q == 80'h1234_5678_9ABC_DEF0_1357, "vadd write 32");
    // 16-bit mode: four independent adds, DP2 switched off
    w32 = 0; pu_en = 4'b1101;
    c = '0; c.ldx = 1; c.ldx_reg = R_AX1; c.ldy = 1; c.ldy_reg = R_AY1;
    for (int i = 0; i < 4; i++) begin dmx_rdata[i] = 16'(100 * i + 1); dmy_rdata[i] = 16'(7 * i); end
    issue();
    c.cu = CU_ALU; c.alu.op = ALU_ADD; c.alu.x = R_AX1; c.alu.y = R_AY1; issue();
    bus_rd = 1; bus_rd_reg = R_AR; #1;
    for (int i = 0; i < 4; i++) begin
      logic [15:0] v;
      v = bus_rd_data[i];
      if (i == 1) chk(v == rd32(R_AR) >> 16, "dp2 off keeps AR");
      else        chk(v == 16'(107 * i + 1), "16-bit add");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
