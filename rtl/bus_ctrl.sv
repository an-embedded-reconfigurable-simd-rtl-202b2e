// bus_ctrl: bus controller for register transfers between the datapaths'
// DREGs and the control register side.
// Operations (execute stage, one cycle): IMM2REG writes an immediate into
// dst_reg of every enabled datapath; BCAST reads src_reg of datapath src_pu
// and writes it into dst_reg of every enabled datapath (data exchange between
// DREGs); REG2XFER copies src_reg of datapath src_pu into the transfer
// register XFER; XFER2REG writes XFER into dst_reg of every enabled datapath.
// XFER is the control-register-side end of the bus and can also be loaded
// from outside (xfer_ld). Reads use port c of the source DREG and writes use
// write port b, the same cycle (combinational read, write at the edge).
// The document says only that a bus controller centrally controls all data
// exchanges between DREGs, memory blocks and control registers; this
// operation set is this design's choice (memory traffic runs directly
// between each DREG and its DM blocks).
module bus_ctrl
  import dsp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  bus_ctrl_t    b,
  input  logic [N-1:0] en,
  input  logic [15:0]  rd_data [N],
  output logic         rd,
  output reg_e         rd_reg,
  output logic [N-1:0] wr,
  output reg_e         wr_reg,
  output logic [15:0]  wr_data,
  input  logic         xfer_ld,
  input  logic [15:0]  xfer_in,
  output logic [15:0]  xfer
);
  always_comb begin
    rd      = (b.op == BUS_REG2XFER) || (b.op == BUS_BCAST);
    rd_reg  = b.src_reg;
    wr_reg  = b.dst_reg;
    unique case (b.op)
      BUS_IMM2REG:  wr_data = b.imm;
      BUS_XFER2REG: wr_data = xfer;
      default:      wr_data = rd_data[b.src_pu];
    endcase
    wr = (b.op == BUS_IMM2REG || b.op == BUS_XFER2REG || b.op == BUS_BCAST) ? en : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    xfer <= '0;
    else if (b.op == BUS_REG2XFER) xfer <= rd_data[b.src_pu];
    else if (xfer_ld)              xfer <= xfer_in;
  end
endmodule
