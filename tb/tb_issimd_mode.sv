// tb_issimd_mode: checks the reset mode, mask/width/scalar writes and the
// unit and group enables derived from them, the interrupt bank switch and
// the restore from the status stack.
module tb_issimd_mode;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0, we = 0, restore = 0, irq_bank = 0;
  mode_ctrl_t mc;
  mode_t restore_val, mode;
  logic [7:0] pu_en;
  logic [1:0] grp_en;
  int checks = 0, failures = 0;

  issimd_mode dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s mode=%p pu_en=%b grp_en=%b", what, mode, pu_en, grp_en); end
  endtask

  initial begin
    mc = '0; restore_val = '0;
    @(posedge clk); #1; chk(mode.mask == 8'hFF && mode.vec && !mode.w32 && pu_en == 8'hFF, "reset");
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      logic [7:0] m; logic v, w; logic [2:0] s; logic [7:0] e8; logic [1:0] e2;
      m = 8'($urandom); v = 1'($urandom); w = 1'($urandom); s = 3'($urandom);
      @(negedge clk);
      we = 1; mc = '0;
      mc.wr_mask = 1; mc.mask = m; mc.wr_vec = 1; mc.vec = v; mc.sidx = s; mc.wr_w32 = 1; mc.w32 = w;
      @(negedge clk);
      we = 0;
      for (int i = 0; i < 8; i++) e8[i] = v ? m[i] : (s == 3'(i));
      for (int g = 0; g < 2; g++) e2[g] = v ? m[g] : (s[0] == 1'(g));
      chk(pu_en == e8 && grp_en == e2 && mode.w32 == w, "enables");
      // a write with we low changes nothing
      mc.mask = ~m; @(negedge clk);
      chk(mode.mask == m, "we gate");
    end
    irq_bank = 1; @(negedge clk); irq_bank = 0;
    chk(mode.bank == 1, "irq bank");
    restore_val = '{w32: 1'b1, vec: 1'b0, sidx: 3'd1, bank: 1'b0, mask: 8'h5A};
    restore = 1; @(negedge clk); restore = 0;
    chk(mode == restore_val && grp_en == 2'b10, "restore");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
