// recfg_adapter: a group of four processing units and the reconfiguration
// adapter that joins them into one 32-bit datapath.
//
// 16-bit mode (w32 = 0): the four units DP1..DP4 of the group work on their
// own, each gated by its bit of pu_en.
// 32-bit mode (w32 = 1): a 32-bit word is held as low half in DP1 and high
// half in DP2 of the group (same register name), and grp_en gates the pair;
// DP3 and DP4 lend only their multipliers. The adapter then
//  - chains the ALUs: DP2's ALU takes DP1's carry and zero flag;
//  - joins the shifters: DP1 shifts its half logically from the low position,
//    DP2 shifts its half from the high position, the two 32-bit fields are
//    ORed (and with or_sr ORed into SR0 of both) and written to SR0 of DP1
//    (bits 15:0) and DP2 (bits 31:16); the amount is DP1's SE or the
//    immediate;
//  - builds the 32x32 MAC of the document's Figure 3: the four multipliers
//    form Al*Bl (DP1), Ah*Bh (DP2), Ah*Bl (DP3), Al*Bh (DP4) and acc80 adds
//    them to the 80-bit accumulator {MR of DP2, MR of DP1}.
// Which units are shaded as members of the 32-bit datapath follows Figures 1
// and 3 (DREG, ALU and shifter of the first two units, all four multipliers,
// ACC80). Mapping the halves onto DP1/DP2 register pairs, and supporting only
// ASHIFT/LSHIFT as 32-bit shifts (NORM/EXP/EXPADJ act per half) and every ALU
// operation except ABS as 32-bit operations, are this design's choices.
// vadd_wr writes vadd_data into MR of DP1 (16-bit mode) or into the 80-bit
// accumulator (32-bit mode). All operations take one cycle.
module recfg_adapter
  import dsp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         w32,
  input  logic [3:0]   pu_en,
  input  logic         grp_en,
  input  logic         bank,
  input  pu_ctrl_t     c,
  input  logic [15:0]  dmx_rdata [4],
  input  logic [15:0]  dmy_rdata [4],
  output logic [15:0]  dm_wdata [4],
  output logic [3:0]   dmx_we,
  output logic [3:0]   dmy_we,
  input  logic         bus_rd,
  input  reg_e         bus_rd_reg,
  output logic [15:0]  bus_rd_data [4],
  input  logic [3:0]   bus_wr,
  input  reg_e         bus_wr_reg,
  input  logic [15:0]  bus_wr_data,
  input  logic         vadd_wr,
  input  logic [79:0]  vadd_data,
  output logic [39:0]  mr [4],
  output logic [79:0]  acc80_q,
  output astat_t       astat [4],
  output logic         mv32
);
  pu_ctrl_t    cc [4];
  logic [3:0]  en;
  logic [3:0]  chain, cin, az_in, cout, az, mul_ovr, ovr_en;
  logic signed [16:0] mul_a [4], mul_b [4];
  logic signed [33:0] prod [4];
  logic [15:0] opx [4], opy [4];
  logic [31:0] field [4];
  logic signed [7:0] se [4];
  wide_kind_e  ovr_kind [4];
  reg_e        ovr_reg [4];
  logic [39:0] ovr_data [4];
  logic [79:0] acc_out;
  logic        sh32;
  logic [31:0] sh_res;
  logic        xs, ys;

  assign acc80_q = {mr[1], mr[0]};
  assign sh32 = w32 && c.cu == CU_SHIFT && (c.sh.op == SH_ASHIFT || c.sh.op == SH_LSHIFT);
  assign xs   = c.mac.xs;
  assign ys   = c.mac.ys;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      cc[i]      = c;
      chain[i]   = 1'b0;
      cin[i]     = 1'b0;
      az_in[i]   = 1'b1;
      mul_ovr[i] = 1'b0;
      mul_a[i]   = '0;
      mul_b[i]   = '0;
      ovr_en[i]  = 1'b0;
      ovr_kind[i] = WW_NONE;
      ovr_reg[i] = R_AR;
      ovr_data[i] = '0;
    end
    en = w32 ? {2'b00, grp_en, grp_en} : pu_en;
    if (w32) begin
      // DP3/DP4 do not compute, load or store in 32-bit mode
      for (int i = 2; i < 4; i++) begin
        cc[i].cu  = CU_NONE;
        cc[i].ldx = 1'b0;
        cc[i].ldy = 1'b0;
        cc[i].st  = 1'b0;
      end
      // ALU carry chain
      chain[1] = (c.cu == CU_ALU);
      cin[1]   = cout[0];
      az_in[1] = az[0];
      // shifter pair
      if (sh32) begin
        cc[0].sh.op      = SH_LSHIFT;
        cc[0].sh.hi      = 1'b0;
        cc[1].sh.hi      = 1'b1;
        cc[1].sh.use_imm = 1'b1;
        cc[1].sh.imm     = c.sh.use_imm ? c.sh.imm : se[0];
        cc[0].sh.or_sr   = 1'b0;
        cc[1].sh.or_sr   = 1'b0;
      end
      // 32-bit MAC from four 17x17 multipliers
      if (c.cu == CU_MAC) begin
        for (int i = 0; i < 4; i++) mul_ovr[i] = 1'b1;
        mul_a[0] = $signed({1'b0, opx[0]});            mul_b[0] = $signed({1'b0, opy[0]});
        mul_a[1] = $signed({xs & opx[1][15], opx[1]}); mul_b[1] = $signed({ys & opy[1][15], opy[1]});
        mul_a[2] = $signed({xs & opx[1][15], opx[1]}); mul_b[2] = $signed({1'b0, opy[0]});
        mul_a[3] = $signed({1'b0, opx[0]});            mul_b[3] = $signed({ys & opy[1][15], opy[1]});
        // DP3/DP4 read the same register names as DP1/DP2 but their operands
        // are not used: the adapter routes DP1/DP2 operands to them.
        ovr_en[0] = 1'b1; ovr_kind[0] = WW_MR; ovr_data[0] = acc_out[39:0];
        ovr_en[1] = 1'b1; ovr_kind[1] = WW_MR; ovr_data[1] = acc_out[79:40];
      end
      if (sh32) begin
        ovr_en[0] = 1'b1; ovr_kind[0] = WW_ONE; ovr_reg[0] = R_SR0; ovr_data[0] = {24'h0, sh_res[15:0]};
        ovr_en[1] = 1'b1; ovr_kind[1] = WW_ONE; ovr_reg[1] = R_SR0; ovr_data[1] = {24'h0, sh_res[31:16]};
      end
    end
    if (vadd_wr) begin
      ovr_en[0] = 1'b1; ovr_kind[0] = WW_MR; ovr_data[0] = vadd_data[39:0];
      if (w32) begin
        ovr_en[1] = 1'b1; ovr_kind[1] = WW_MR; ovr_data[1] = vadd_data[79:40];
      end
    end
  end

  // the OR source of a 32-bit shift is the 32-bit SR0 pair, read through the
  // wide read ports (SR group) of DP1 and DP2
  logic [39:0] wide [4];
  logic [31:0] sr0_pair;
  assign sr0_pair = {wide[1][15:0], wide[0][15:0]};
  assign sh_res = (field[0] | field[1]) | (c.sh.or_sr ? sr0_pair : 32'h0);

  acc80 u_acc80 (
    .p_ll(prod[0]), .p_hh(prod[1]), .p_hl(prod[2]), .p_lh(prod[3]),
    .op(c.mac.op), .frac(c.mac.frac), .rnd(c.mac.rnd), .sat(c.mac.sat),
    .acc_in({mr[1], mr[0]}), .acc_out, .mv(mv32)
  );

  for (genvar i = 0; i < 4; i++) begin : g_pu
    pu16 u_pu (
      .clk, .rst_n, .en(en[i]), .bank, .c(cc[i]),
      .dmx_rdata(dmx_rdata[i]), .dmy_rdata(dmy_rdata[i]), .dm_wdata(dm_wdata[i]),
      .dmx_we(dmx_we[i]), .dmy_we(dmy_we[i]),
      .bus_rd, .bus_rd_reg, .bus_rd_data(bus_rd_data[i]),
      .bus_wr(bus_wr[i]), .bus_wr_reg, .bus_wr_data,
      .alu_chain(chain[i]), .alu_cin(cin[i]), .alu_az_in(az_in[i]),
      .alu_cout(cout[i]), .alu_az(az[i]),
      .mul_ovr(mul_ovr[i]), .mul_a(mul_a[i]), .mul_b(mul_b[i]), .prod(prod[i]),
      .opx(opx[i]), .opy(opy[i]), .sh_field(field[i]), .se(se[i]),
      .ovr_en(ovr_en[i]), .ovr_kind(ovr_kind[i]), .ovr_reg(ovr_reg[i]), .ovr_data(ovr_data[i]),
      .mr(mr[i]), .wide(wide[i]), .astat(astat[i])
    );
  end
endmodule
