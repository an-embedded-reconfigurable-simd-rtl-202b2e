// issimd_mode: mode registers of the instantly scalable SIMD (ISSIMD) scheme.
//
// The mode registers say whether the datapaths run as eight 16-bit or two
// 32-bit datapaths (w32), in vector or scalar mode (vec), which datapaths a
// vector operation uses (mask) and which one a scalar operation uses (sidx),
// and which DREG set is live (bank). From them this block derives the enable
// of every processing unit; a unit without enable is switched off and takes
// no part in the following instructions. In 32-bit mode mask bit 0 selects
// the 32-bit datapath of group A and mask bit 1 that of group B, and in
// scalar mode sidx[0] picks the group. The registers are written in the
// execute stage and act from the next instruction. restore reloads them from
// the status stack (interrupt return). The document describes switching by
// dedicated mode instructions; the register layout and the scalar rule are
// this design's choice. Reset: 16-bit vector mode, all eight datapaths on.
module issimd_mode
  import dsp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  mode_ctrl_t mc,
  input  logic       restore,
  input  mode_t      restore_val,
  input  logic       irq_bank,      // switch to the secondary set
  output mode_t      mode,
  output logic [7:0] pu_en,         // 16-bit mode unit enables
  output logic [1:0] grp_en         // 32-bit mode datapath enables
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= '{w32: 1'b0, vec: 1'b1, sidx: 3'd0, bank: 1'b0, mask: 8'hFF};
    end else if (restore) begin
      mode <= restore_val;
    end else begin
      if (we && mc.wr_mask) mode.mask <= mc.mask;
      if (we && mc.wr_w32)  mode.w32  <= mc.w32;
      if (we && mc.wr_vec) begin
        mode.vec  <= mc.vec;
        mode.sidx <= mc.sidx;
      end
      if (we && mc.wr_bank) mode.bank <= mc.bank;
      if (irq_bank)         mode.bank <= 1'b1;
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++)
      pu_en[i] = mode.vec ? mode.mask[i] : (mode.sidx == 3'(i));
    for (int g = 0; g < 2; g++)
      grp_en[g] = mode.vec ? mode.mask[g] : (mode.sidx[0] == 1'(g));
  end
endmodule
