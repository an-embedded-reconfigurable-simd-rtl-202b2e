// issimd_dsp_top: embedded SIMD DSP core with instantly scalable datapaths.
//
// Eight 16-bit processing units (DP1..DP8), grouped by two reconfiguration
// adapters into DP1-4 (group A) and DP5-8 (group B), execute one decoded
// control word together (SIMD). Mode registers choose per instruction which
// units take part (vector mask or a single scalar unit) and whether the
// groups act as eight 16-bit or two 32-bit datapaths. Every unit has its own
// DMX and DMY block; all DMX blocks share the address from DAG1 and all DMY
// blocks the address from DAG2. A vector adder sums the accumulators of the
// selected units into DP1 in one cycle. A bus controller moves words between
// DREGs and the transfer register, a memory controller shares PM and DM with
// the external bus, and a program sequencer issues the fetch addresses.
//
// Pipeline as built: fetch address (sequencer) -> PM address register ->
// PM data register -> instr/instr_pc out to the instruction decoder (outside
// this core: the instruction set is not published). The decoder hands back a
// decoded control word ctrl with ctrl_valid; in that cycle (data-address
// stage) the DAGs form the addresses and the DM reads are issued; one cycle
// later (execute stage) the processing units read operands, compute, take the
// loaded words and write back, stores are written and the bus, mode and
// vector-add operations act. Flow control (seq) goes straight to the
// sequencer. A word stored by one instruction can be loaded by the next but
// one; the next one reads the old word (no forwarding).
module issimd_dsp_top
  import dsp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  // instruction fetch, to the instruction decoder
  output logic [IW-1:0]     instr,
  output logic [PM_AW-1:0]  instr_pc,
  output logic              instr_valid,
  // decoded instruction, from the instruction decoder
  input  dec_ctrl_t         ctrl,
  input  logic              ctrl_valid,
  input  seq_ctrl_t         seq,
  input  logic              irq,
  output logic              irq_taken,
  // external memory bus
  input  logic              ext_req,
  input  logic              ext_we,
  input  logic              ext_space,
  input  logic [15:0]       ext_addr,
  input  logic [23:0]       ext_wdata,
  output logic              ext_ack,
  output logic [23:0]       ext_rdata,
  // control register side of the data bus
  input  logic              xfer_ld,
  input  logic [15:0]       xfer_in,
  output logic [15:0]       xfer,
  // status
  output logic [PM_AW-1:0]  pc,
  output mode_t             mode,
  output logic [7:0]        dp_en,
  output logic [39:0]       mr [NPU],
  output astat_t            astat [NPU],
  output logic              vadd_ovf,
  output logic [1:0]        mv32,
  output logic [2:0]        stack_err,
  output logic [3:0]        loop_depth
);
  // ---------------- sequencer and fetch ----------------
  logic            fetch, status_pop;
  mode_t           status_out;
  logic [PM_AW-1:0] pc_q1, pc_q2;
  logic            f_q1, f_q2;
  logic            pm_re, pm_we, pm_rvalid;
  logic [PM_AW-1:0] pm_raddr, pm_waddr;
  logic [23:0]     pm_wdata, pm_rdata;

  program_sequencer u_seq (
    .clk, .rst_n, .run, .op(seq.op), .cond(seq.cond), .addr(seq.addr), .count(seq.count),
    .irq, .status_in(mode), .pc, .fetch, .irq_taken, .status_pop, .status_out,
    .stack_err, .loop_depth
  );

  pm_mem u_pm (
    .clk, .rst_n, .re(pm_re), .raddr(pm_raddr), .rdata(pm_rdata), .rvalid(pm_rvalid),
    .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q1 <= '0; pc_q2 <= '0; f_q1 <= 1'b0; f_q2 <= 1'b0;
    end else begin
      pc_q1 <= pc;    f_q1 <= fetch;
      pc_q2 <= pc_q1; f_q2 <= f_q1;
    end
  end
  assign instr       = pm_rdata;
  assign instr_pc    = pc_q2;
  assign instr_valid = pm_rvalid && f_q2;

  // ---------------- mode registers ----------------
  logic [7:0] pu_en;
  logic [1:0] grp_en;
  dec_ctrl_t  ce;        // execute-stage control word
  logic       ve;

  issimd_mode u_mode (
    .clk, .rst_n, .we(ve), .mc(ce.mode), .restore(status_pop), .restore_val(status_out),
    .irq_bank(irq_taken), .mode, .pu_en, .grp_en
  );
  assign dp_en = mode.w32 ? {2'b00, {2{grp_en[1]}}, 2'b00, {2{grp_en[0]}}} : pu_en;

  // ---------------- data-address stage ----------------
  logic [DM_AW-1:0] ax, ay, ax_e, ay_e;
  dag_ctrl_t        d1, d2;

  always_comb begin
    d1 = ctrl.dag1;
    d2 = ctrl.dag2;
    if (!ctrl_valid) begin
      d1.gen = 1'b0; d1.wr = 1'b0;
      d2.gen = 1'b0; d2.wr = 1'b0;
    end
  end

  dag #(.AW(DM_AW), .NSET(NDAGR)) u_dag1 (
    .clk, .rst_n, .gen(d1.gen), .isel(d1.isel), .msel(d1.msel), .pre(d1.pre), .brev(d1.brev),
    .wr(d1.wr), .wsel(d1.wsel), .widx(d1.widx), .wdata(d1.wdata), .addr(ax)
  );
  dag #(.AW(DM_AW), .NSET(NDAGR)) u_dag2 (
    .clk, .rst_n, .gen(d2.gen), .isel(d2.isel), .msel(d2.msel), .pre(d2.pre), .brev(d2.brev),
    .wr(d2.wr), .wsel(d2.wsel), .widx(d2.widx), .wdata(d2.wdata), .addr(ay)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ce <= '0; ve <= 1'b0; ax_e <= '0; ay_e <= '0;
    end else begin
      ce   <= ctrl;
      ve   <= ctrl_valid;
      ax_e <= ax;
      ay_e <= ay;
    end
  end

  // ---------------- execute stage ----------------
  pu_ctrl_t    pc_e;
  logic [15:0] dm_rdata [16];
  logic [15:0] dmx_rd [NPU], dmy_rd [NPU], dm_wd [NPU], bus_rd_data [NPU];
  logic [7:0]  dmx_we, dmy_we, bus_wr;
  logic        bus_rd, vadd_wr;
  reg_e        bus_rd_reg, bus_wr_reg;
  logic [15:0] bus_wr_data;
  logic [79:0] acc80 [2], vsum;
  bus_ctrl_t   bc;

  always_comb begin
    pc_e = ce.pu;
    bc   = ce.bus;
    if (!ve) begin
      pc_e.cu = CU_NONE; pc_e.ldx = 1'b0; pc_e.ldy = 1'b0; pc_e.st = 1'b0;
      bc.op   = BUS_NONE;
    end
    for (int i = 0; i < int'(NPU); i++) begin
      dmx_rd[i] = dm_rdata[2*i];
      dmy_rd[i] = dm_rdata[2*i+1];
    end
  end
  assign vadd_wr = ve && ce.vadd;

  for (genvar g = 0; g < 2; g++) begin : g_grp
    recfg_adapter u_adp (
      .clk, .rst_n, .w32(mode.w32), .pu_en(pu_en[4*g +: 4]), .grp_en(grp_en[g]), .bank(mode.bank),
      .c(pc_e),
      .dmx_rdata(dmx_rd[4*g +: 4]), .dmy_rdata(dmy_rd[4*g +: 4]), .dm_wdata(dm_wd[4*g +: 4]),
      .dmx_we(dmx_we[4*g +: 4]), .dmy_we(dmy_we[4*g +: 4]),
      .bus_rd, .bus_rd_reg, .bus_rd_data(bus_rd_data[4*g +: 4]),
      .bus_wr(bus_wr[4*g +: 4]), .bus_wr_reg, .bus_wr_data,
      .vadd_wr(vadd_wr && g == 0), .vadd_data(vsum),
      .mr(mr[4*g +: 4]), .acc80_q(acc80[g]), .astat(astat[4*g +: 4]), .mv32(mv32[g])
    );
  end

  vector_adder #(.N(NPU)) u_vadd (
    .w32(mode.w32), .sel(dp_en), .mr, .acc(acc80), .sum(vsum), .ovf(vadd_ovf)
  );

  bus_ctrl #(.N(NPU)) u_bus (
    .clk, .rst_n, .b(bc), .en(dp_en), .rd_data(bus_rd_data),
    .rd(bus_rd), .rd_reg(bus_rd_reg), .wr(bus_wr), .wr_reg(bus_wr_reg), .wr_data(bus_wr_data),
    .xfer_ld, .xfer_in, .xfer
  );

  // ---------------- memories ----------------
  logic [15:0]      dm_re, dm_we;
  logic [DM_AW-1:0] dm_raddr [16], dm_waddr [16];
  logic [15:0]      dm_wdata [16];

  mem_ctrl u_memc (
    .clk, .rst_n,
    .cx_re(ctrl_valid && ctrl.pu.ldx), .cx_raddr(ax),
    .cy_re(ctrl_valid && ctrl.pu.ldy), .cy_raddr(ay),
    .cx_we(dmx_we), .cx_waddr(ax_e), .cy_we(dmy_we), .cy_waddr(ay_e),
    .c_wdata(dm_wd), .c_fetch(fetch), .c_pc(pc),
    .ext_req, .ext_we, .ext_space, .ext_addr, .ext_wdata, .ext_ack, .ext_rdata,
    .dm_re, .dm_raddr, .dm_we, .dm_waddr, .dm_wdata, .dm_rdata,
    .pm_re, .pm_raddr, .pm_we, .pm_waddr, .pm_wdata, .pm_rdata
  );

  for (genvar b = 0; b < 16; b++) begin : g_dm
    dm_bank #(.AW(DM_AW), .DW(16)) u_dm (
      .clk, .rst_n, .re(dm_re[b]), .raddr(dm_raddr[b]), .rdata(dm_rdata[b]),
      .we(dm_we[b]), .waddr(dm_waddr[b]), .wdata(dm_wdata[b])
    );
  end
endmodule
