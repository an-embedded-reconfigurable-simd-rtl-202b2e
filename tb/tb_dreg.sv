// tb_dreg: writes every register through each write port and reads it back
// through the three 16-bit ports, checks MR/SR group writes and 40-bit reads
// (with MR2 sign extension), port priority and the separation of the two
// register sets, against a shadow model kept in the testbench.
module tb_dreg;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0, bank = 0;
  reg_e ra, rb, rc, ww_reg, wa_reg, wb_reg;
  logic [15:0] rda, rdb, rdc, wa_data, wb_data;
  logic rw_sr = 0, wa_en = 0, wb_en = 0;
  logic [39:0] rdw, ww_data, mr_tap;
  wide_kind_e ww_kind = WW_NONE;
  logic [15:0] shadow [2][16];
  int checks = 0, failures = 0;

  dreg dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [39:0] got, input logic [39:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", what, got, exp_v);
    end
  endtask

  initial begin
    ra = R_AX0; rb = R_AX0; rc = R_AX0; ww_reg = R_AR; wa_reg = R_AX0; wb_reg = R_AX0;
    wa_data = 0; wb_data = 0; ww_data = 0;
    for (int b = 0; b < 2; b++) for (int r = 0; r < 16; r++) shadow[b][r] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      bank = 1'($urandom);
      wa_en = 1'($urandom); wb_en = 1'($urandom);
      wa_reg = reg_e'($urandom); wb_reg = reg_e'($urandom);
      wa_data = 16'($urandom); wb_data = 16'($urandom);
      ww_kind = wide_kind_e'($urandom); ww_reg = reg_e'($urandom);
      ww_data = {8'($urandom), 32'($urandom)};
      // shadow model of the write, in priority order wide < a < b
      case (ww_kind)
        WW_MR: begin shadow[bank][8] = {{8{ww_data[39]}}, ww_data[39:32]};
                     shadow[bank][9] = ww_data[31:16]; shadow[bank][10] = ww_data[15:0]; end
        WW_SR: begin shadow[bank][12] = {{8{ww_data[39]}}, ww_data[39:32]};
                     shadow[bank][13] = ww_data[31:16]; shadow[bank][14] = ww_data[15:0]; end
        WW_ONE: shadow[bank][ww_reg] = ww_data[15:0];
        default: ;
      endcase
      if (wa_en) shadow[bank][wa_reg] = wa_data;
      if (wb_en) shadow[bank][wb_reg] = wb_data;
      @(negedge clk);
      wa_en = 0; wb_en = 0; ww_kind = WW_NONE;
      bank = 1'($urandom);
      ra = reg_e'($urandom); rb = reg_e'($urandom); rc = reg_e'($urandom); rw_sr = 1'($urandom);
      #1;
      chk(rda, shadow[bank][ra], "rda");
      chk(rdb, shadow[bank][rb], "rdb");
      chk(rdc, shadow[bank][rc], "rdc");
      chk(rdw, rw_sr ? {shadow[bank][12][7:0], shadow[bank][13], shadow[bank][14]}
                     : {shadow[bank][8][7:0], shadow[bank][9], shadow[bank][10]}, "rdw");
      chk(mr_tap, {shadow[bank][8][7:0], shadow[bank][9], shadow[bank][10]}, "mr_tap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
