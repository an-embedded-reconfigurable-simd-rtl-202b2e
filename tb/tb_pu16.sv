// tb_pu16: one processing unit driven by control words. Words come in from
// DMX/DMY, go through the ALU, the MAC and the shifter, and results are read
// back through the bus port and the store path; checked against reference
// arithmetic. Also checks that a disabled unit writes nothing, the AF
// feedback register, and the separation of the two register sets.
module tb_pu16;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, bank = 0;
  pu_ctrl_t c;
  logic [15:0] dmx_rdata = 0, dmy_rdata = 0, dm_wdata, bus_rd_data, bus_wr_data = 0, opx, opy;
  logic dmx_we, dmy_we, bus_rd = 0, bus_wr = 0, alu_cout, alu_az;
  reg_e bus_rd_reg = R_AX0, bus_wr_reg = R_AX0;
  logic signed [33:0] prod;
  logic [31:0] sh_field;
  logic signed [7:0] se;
  logic [39:0] mr, wide;
  astat_t astat;
  int checks = 0, failures = 0;

  pu16 dut (.clk, .rst_n, .en, .bank, .c, .dmx_rdata, .dmy_rdata, .dm_wdata, .dmx_we, .dmy_we,
            .bus_rd, .bus_rd_reg, .bus_rd_data, .bus_wr, .bus_wr_reg, .bus_wr_data,
            .alu_chain(1'b0), .alu_cin(1'b0), .alu_az_in(1'b1), .alu_cout, .alu_az,
            .mul_ovr(1'b0), .mul_a(17'sd0), .mul_b(17'sd0), .prod, .opx, .opy, .sh_field, .se,
            .ovr_en(1'b0), .ovr_kind(WW_NONE), .ovr_reg(R_AR), .ovr_data(40'd0),
            .mr, .wide, .astat);
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

  task automatic issue();      // run control word c for one cycle, then NOP
    @(posedge clk); #1; c = '0;
  endtask

  task automatic load(input reg_e rx, input logic [15:0] vx, input reg_e ry, input logic [15:0] vy);
    c = '0; c.ldx = 1; c.ldx_reg = rx; c.ldy = 1; c.ldy_reg = ry;
    dmx_rdata = vx; dmy_rdata = vy;
    issue();
  endtask

  function automatic logic [15:0] rd(input reg_e r);
    return dut.u_dreg.rf[dut.u_dreg.bank][r];
  endfunction

  task automatic busrd(input reg_e r, output logic [15:0] v);
    bus_rd = 1; bus_rd_reg = r; #1; v = bus_rd_data; bus_rd = 0;
  endtask

  initial begin
    logic [15:0] v, x, y;
    logic [39:0] acc;
    longint p;
    c = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    // ALU: random adds and subtracts
    for (int n = 0; n < 300; n++) begin
      x = 16'($urandom); y = 16'($urandom);
      load(R_AX0, x, R_AY0, y);
      c.cu = CU_ALU; c.alu.op = (n % 2) ? ALU_SUB : ALU_ADD; c.alu.x = R_AX0; c.alu.y = R_AY0;
      issue();
      busrd(R_AR, v);
      chk(v == ((n % 2) ? x - y : x + y), "alu add/sub");
    end
    // MAC: signed fractional multiply then accumulate
    acc = 0;
    for (int n = 0; n < 50; n++) begin
      x = 16'($urandom); y = 16'($urandom);
      load(R_MX0, x, R_MY0, y);
      c.cu = CU_MAC; c.mac.op = (n == 0) ? MAC_MUL : MAC_MAC; c.mac.x = R_MX0; c.mac.y = R_MY0;
      c.mac.xs = 1; c.mac.ys = 1; c.mac.frac = 1;
      issue();
      p = longint'($signed(x)) * longint'($signed(y)) * 2;
      acc = (n == 0) ? 40'(p) : acc + 40'(p);
      chk(mr == acc, "mac accumulate");
    end
    // shifter: ASHIFT SI by +4 from the high position
    load(R_SI, 16'h9234, R_AX1, 16'h0);
    c.cu = CU_SHIFT; c.sh.op = SH_ASHIFT; c.sh.x = R_SI; c.sh.hi = 1; c.sh.use_imm = 1; c.sh.imm = 8'd4;
    issue();
    chk({rd(R_SR1), rd(R_SR0)} == 32'h2340_0000 && rd(R_SR2) == 16'h0000, "ashift hi");
    c.cu = CU_SHIFT; c.sh.op = SH_ASHIFT; c.sh.x = R_SI; c.sh.hi = 0; c.sh.use_imm = 1; c.sh.imm = -8'sd4;
    issue();
    chk({rd(R_SR2), rd(R_SR1), rd(R_SR0)} == 48'hFFFF_FFFF_F923, "ashift lo right");
    // EXP then NORM of 0x0123 (6 redundant sign bits)
    load(R_SI, 16'h0123, R_AX1, 16'h0);
    c.cu = CU_SHIFT; c.sh.op = SH_EXP; c.sh.x = R_SI; c.sh.hi = 1; issue();
    chk(se == -8'sd6, "exp");
    c.cu = CU_SHIFT; c.sh.op = SH_NORM; c.sh.x = R_SI; c.sh.hi = 1; issue();
    chk(rd(R_SR1) == 16'h48C0, "norm");
    // store AR to DMY
    c.st = 1; c.st_y = 1; c.st_reg = R_AR; #1;
    chk(dmy_we && !dmx_we && dm_wdata == rd(R_AR), "store");
    c = '0;
    // disabled unit: nothing written
    v = rd(R_AR);
    en = 0;
    load(R_AR, 16'hDEAD, R_AY0, 16'hBEEF);
    c.cu = CU_ALU; c.alu.op = ALU_INC; c.alu.x = R_AR; issue();
    c.st = 1; #1; chk(!dmx_we && !dmy_we, "disabled store"); c = '0;
    en = 1;
    chk(rd(R_AR) == v, "disabled no write");
    // AF feedback: AF = AX0 + AY0, then AR = AX0 + AF
    load(R_AX0, 16'd10, R_AY0, 16'd20);
    c.cu = CU_ALU; c.alu.op = ALU_ADD; c.alu.x = R_AX0; c.alu.y = R_AY0; c.alu.dst_af = 1; issue();
    c.cu = CU_ALU; c.alu.op = ALU_ADD; c.alu.x = R_AX0; c.alu.y_af = 1; issue();
    chk(rd(R_AR) == 16'd40, "af feedback");
    // secondary set
    bank = 1; #1;
    chk(rd(R_AR) == 0, "secondary set empty");
    load(R_AX0, 16'h1111, R_AY0, 16'h2222);
    bank = 0; #1;
    chk(rd(R_AX0) == 16'd10, "primary kept");
    // bus write into AY1
    bus_wr = 1; bus_wr_reg = R_AY1; bus_wr_data = 16'h5A5A; @(posedge clk); #1; bus_wr = 0;
    chk(rd(R_AY1) == 16'h5A5A, "bus write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
