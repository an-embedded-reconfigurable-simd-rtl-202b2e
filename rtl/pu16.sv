// pu16: one 16-bit processing unit (datapath DP) of the SIMD array.
//
// A DREG register file feeds a MAC (40-bit result), a barrel shifter and an
// ALU; in the execute stage the unit reads its operands, performs the one
// compute operation selected by ctrl.cu and writes the result back into DREG
// at the clock edge, so every operation takes one cycle. In the same cycle it
// can take one word from its DMX block and one from its DMY block into DREG
// and store one DREG word to DMX or DMY. AF (ALU feedback), SE (shift
// exponent), SB (block exponent) and the status flags live beside DREG.
// When en is 0 the unit is switched off: no register, flag or memory write.
//
// Port use per cycle (document: three 16-bit and one 40-bit read port, two
// 16-bit and one 40-bit write port): compute operands on read ports a/b,
// MR or SR on the wide read port, the store or a bus read on port c; compute
// results on the wide write port, the DMX load on write port a, the DMY load
// or a bus write on write port b. A bus read and a store, or a bus write and
// a DMY load, in the same cycle are not allowed (asserted).
//
// Hooks for the reconfiguration adapter (32-bit mode): ALU carry/zero chain
// inputs and outputs, a multiplier override (the adapter borrows the 17x17
// multiplier) with the raw product out, the raw 32-bit shifter field out, and
// an override write that replaces the unit's own compute write-back.
module pu16
  import dsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        bank,
  input  pu_ctrl_t    c,
  // data memories
  input  logic [15:0] dmx_rdata,
  input  logic [15:0] dmy_rdata,
  output logic [15:0] dm_wdata,
  output logic        dmx_we,
  output logic        dmy_we,
  // bus controller
  input  logic        bus_rd,
  input  reg_e        bus_rd_reg,
  output logic [15:0] bus_rd_data,
  input  logic        bus_wr,
  input  reg_e        bus_wr_reg,
  input  logic [15:0] bus_wr_data,
  // 32-bit reconfiguration hooks
  input  logic        alu_chain,
  input  logic        alu_cin,
  input  logic        alu_az_in,
  output logic        alu_cout,
  output logic        alu_az,
  input  logic        mul_ovr,
  input  logic signed [16:0] mul_a,
  input  logic signed [16:0] mul_b,
  output logic signed [33:0] prod,
  output logic [15:0] opx,
  output logic [15:0] opy,
  output logic [31:0] sh_field,
  output logic signed [7:0] se,
  input  logic        ovr_en,
  input  wide_kind_e  ovr_kind,
  input  reg_e        ovr_reg,
  input  logic [39:0] ovr_data,
  // observation
  output logic [39:0] mr,
  output logic [39:0] wide,       // wide read port (SR group during shifts)
  output astat_t      astat
);
  reg_e        ra, rb, rc;
  logic [15:0] rda, rdb, rdc;
  logic [39:0] rdw;
  wide_kind_e  ww_kind;
  reg_e        ww_reg;
  logic [39:0] ww_data;

  logic [15:0] af;
  logic signed [7:0] sb;
  astat_t      st_q;

  // compute results
  logic [15:0] alu_res;
  logic        a_az, a_an, a_av, a_ac;
  logic [39:0] mac_res;
  logic        mac_mv;
  logic [39:0] sh_sr;
  logic        sh_wr_sr, sh_wr_se, sh_wr_sb;
  logic signed [7:0] sh_se, sh_sb;
  logic signed [16:0] ma, mb;

  // operand selection
  always_comb begin
    unique case (c.cu)
      CU_ALU:   begin ra = c.alu.x; rb = c.alu.y; end
      CU_MAC:   begin ra = c.mac.x; rb = c.mac.y; end
      default:  begin ra = c.sh.x;  rb = c.sh.x;  end
    endcase
    rc = bus_rd ? bus_rd_reg : c.st_reg;
  end

  assign opx = rda;
  assign opy = (c.cu == CU_ALU && c.alu.y_af) ? af : rdb;

  dreg u_dreg (
    .clk, .rst_n, .bank,
    .ra, .rb, .rc, .rda, .rdb, .rdc,
    .rw_sr(c.cu == CU_SHIFT), .rdw,
    .ww_kind, .ww_reg, .ww_data,
    .wa_en(en && c.ldx), .wa_reg(c.ldx_reg), .wa_data(dmx_rdata),
    .wb_en(en && (c.ldy || bus_wr)), .wb_reg(bus_wr ? bus_wr_reg : c.ldy_reg),
    .wb_data(bus_wr ? bus_wr_data : dmy_rdata),
    .mr_tap(mr)
  );

  alu16 u_alu (
    .op(c.alu.op), .x(rda), .y(opy), .ac_in(st_q.ac),
    .chain(alu_chain), .cin(alu_cin), .az_in(alu_az_in),
    .res(alu_res), .cout(alu_cout), .az(a_az), .an(a_an), .av(a_av), .ac(a_ac)
  );
  assign alu_az = a_az;

  assign ma = mul_ovr ? mul_a : $signed({c.mac.xs & rda[15], rda});
  assign mb = mul_ovr ? mul_b : $signed({c.mac.ys & rdb[15], rdb});

  mac16 u_mac (
    .ma, .mb, .op(c.mac.op), .frac(c.mac.frac), .rnd(c.mac.rnd), .sat(c.mac.sat),
    .mr_in(rdw), .mr_out(mac_res), .mv(mac_mv), .prod
  );

  shifter16 u_sh (
    .op(c.sh.op), .x(rda), .hi(c.sh.hi),
    .amt(c.sh.use_imm ? $signed(c.sh.imm) : se),
    .or_sr(c.sh.or_sr), .sr_in(rdw), .se_in(se), .sb_in(sb), .imm(c.sh.imm),
    .sr_out(sh_sr), .field(sh_field), .wr_sr(sh_wr_sr),
    .se_out(sh_se), .wr_se(sh_wr_se), .sb_out(sh_sb), .wr_sb(sh_wr_sb)
  );

  // wide write port: the compute result, or the adapter's override
  always_comb begin
    ww_kind = WW_NONE;
    ww_reg  = R_AR;
    ww_data = '0;
    if (en) begin
      if (ovr_en) begin
        ww_kind = ovr_kind;
        ww_reg  = ovr_reg;
        ww_data = ovr_data;
      end else begin
        unique case (c.cu)
          CU_ALU: if (!c.alu.dst_af) begin
            ww_kind = WW_ONE; ww_reg = R_AR; ww_data = {24'h0, alu_res};
          end
          CU_MAC:   begin ww_kind = WW_MR; ww_data = mac_res; end
          CU_SHIFT: if (sh_wr_sr) begin ww_kind = WW_SR; ww_data = sh_sr; end
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      af   <= '0;
      se   <= '0;
      sb   <= -8'sd16;
      st_q <= '0;
    end else if (en) begin
      if (c.cu == CU_ALU) begin
        if (c.alu.dst_af) af <= alu_res;
        st_q.az <= a_az; st_q.an <= a_an; st_q.av <= a_av; st_q.ac <= a_ac;
      end
      if (c.cu == CU_MAC && !ovr_en) st_q.mv <= mac_mv;
      if (c.cu == CU_SHIFT) begin
        if (sh_wr_se) se <= sh_se;
        if (sh_wr_sb) sb <= sh_sb;
      end
    end
  end

  assign astat       = st_q;
  assign wide        = rdw;
  assign dm_wdata    = rdc;
  assign dmx_we      = en && c.st && !c.st_y;
  assign dmy_we      = en && c.st && c.st_y;
  assign bus_rd_data = rdc;

  a_port_c: assert property (@(posedge clk) disable iff (!rst_n) !(bus_rd && c.st && en));
  a_port_b: assert property (@(posedge clk) disable iff (!rst_n) !(bus_wr && c.ldy && en));
endmodule
