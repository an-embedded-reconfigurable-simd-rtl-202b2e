// mem_ctrl: memory controller between the core, the on-chip memories and the
// external data/address/control bus.
//
// The core's accesses pass straight through with priority: the shared DMX
// and DMY read addresses go to all eight blocks of their kind, each block's
// write comes from its own datapath, and the instruction fetch address goes
// to PM. The external bus gets a memory when the core leaves it free:
// ext_space 1 addresses DM, with ext_addr[13:10] the block (even = DMnX,
// odd = DMnY, n = 1 + block/2, the order of Figure 1) and ext_addr[9:0] the
// word; ext_space 0 addresses PM with ext_addr[12:0]. PM is only granted
// while the core does not fetch. Handshake: the master holds ext_req (with
// ext_we, ext_space, ext_addr, ext_wdata) until ext_ack, a one-cycle pulse;
// read data is valid with ext_ack. A write is acked the cycle after it is
// granted, a DM read two cycles after and a PM read three cycles after.
// Page mode and multiprocessor arbitration, which the document mentions as
// possible, are not built.
module mem_ctrl
  import dsp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // core side
  input  logic              cx_re,
  input  logic [DM_AW-1:0]  cx_raddr,
  input  logic              cy_re,
  input  logic [DM_AW-1:0]  cy_raddr,
  input  logic [7:0]        cx_we,
  input  logic [DM_AW-1:0]  cx_waddr,
  input  logic [7:0]        cy_we,
  input  logic [DM_AW-1:0]  cy_waddr,
  input  logic [15:0]       c_wdata [8],
  input  logic              c_fetch,
  input  logic [PM_AW-1:0]  c_pc,
  // external side
  input  logic              ext_req,
  input  logic              ext_we,
  input  logic              ext_space,
  input  logic [15:0]       ext_addr,
  input  logic [23:0]       ext_wdata,
  output logic              ext_ack,
  output logic [23:0]       ext_rdata,
  // DM blocks, index 2*n for DM(n+1)X and 2*n+1 for DM(n+1)Y
  output logic [15:0]       dm_re,
  output logic [DM_AW-1:0]  dm_raddr [16],
  output logic [15:0]       dm_we,
  output logic [DM_AW-1:0]  dm_waddr [16],
  output logic [15:0]       dm_wdata [16],
  input  logic [15:0]       dm_rdata [16],
  // PM
  output logic              pm_re,
  output logic [PM_AW-1:0]  pm_raddr,
  output logic              pm_we,
  output logic [PM_AW-1:0]  pm_waddr,
  output logic [23:0]       pm_wdata,
  input  logic [23:0]       pm_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_DMRD, S_PMRD1, S_PMRD2, S_ACK} state_e;
  state_e     st;
  logic [3:0] blk, blk_q;
  logic       grant, x_side;

  assign blk    = ext_addr[13:10];
  assign x_side = !blk[0];

  always_comb begin
    // core traffic
    for (int b = 0; b < 16; b++) begin
      dm_re[b]    = b[0] ? cy_re : cx_re;
      dm_raddr[b] = b[0] ? cy_raddr : cx_raddr;
      dm_we[b]    = b[0] ? cy_we[b/2] : cx_we[b/2];
      dm_waddr[b] = b[0] ? cy_waddr : cx_waddr;
      dm_wdata[b] = c_wdata[b/2];
    end
    pm_re    = c_fetch;
    pm_raddr = c_pc;
    pm_we    = 1'b0;
    pm_waddr = ext_addr[PM_AW-1:0];
    pm_wdata = ext_wdata;
    // external access where the core leaves the port free
    grant = 1'b0;
    if (st == S_IDLE && ext_req) begin
      if (ext_space) begin
        if (ext_we) grant = !dm_we[blk];
        else        grant = x_side ? !cx_re : !cy_re;
      end else begin
        grant = !c_fetch;
      end
    end
    if (grant) begin
      if (ext_space) begin
        if (ext_we) begin
          dm_we[blk] = 1'b1; dm_waddr[blk] = ext_addr[DM_AW-1:0]; dm_wdata[blk] = ext_wdata[15:0];
        end else begin
          dm_re[blk] = 1'b1; dm_raddr[blk] = ext_addr[DM_AW-1:0];
        end
      end else begin
        if (ext_we) pm_we = 1'b1;
        else begin pm_re = 1'b1; pm_raddr = ext_addr[PM_AW-1:0]; end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ext_ack <= 1'b0; ext_rdata <= '0; blk_q <= '0;
    end else begin
      ext_ack <= 1'b0;
      unique case (st)
        S_IDLE: if (grant) begin
          blk_q <= blk;
          st    <= ext_we ? S_ACK : (ext_space ? S_DMRD : S_PMRD1);
          if (ext_we) ext_ack <= 1'b1;
        end
        S_DMRD: begin
          ext_rdata <= {8'h00, dm_rdata[blk_q]};
          ext_ack   <= 1'b1;
          st        <= S_ACK;
        end
        S_PMRD1: st <= S_PMRD2;
        S_PMRD2: begin
          ext_rdata <= pm_rdata;
          ext_ack   <= 1'b1;
          st        <= S_ACK;
        end
        default: st <= S_IDLE;   // S_ACK: master drops ext_req
      endcase
    end
  end
endmodule
