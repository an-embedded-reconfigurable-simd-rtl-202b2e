// tb_bus_ctrl: drives every transfer operation with random enables and
// checks the read request, the per-datapath write strobes and data, and the
// transfer register.
module tb_bus_ctrl;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_ctrl_t b;
  logic [7:0] en, wr;
  logic [15:0] rd_data [8], wr_data, xfer, xfer_in;
  logic rd, xfer_ld;
  reg_e rd_reg, wr_reg;
  int checks = 0, failures = 0;

  bus_ctrl #(.N(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s op=%0d", what, b.op); end
  endtask

  initial begin
    logic [15:0] xref;
    b = '0; en = 0; xfer_ld = 0; xfer_in = 0;
    foreach (rd_data[i]) rd_data[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    xref = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      b.op = bus_op_e'($urandom % 5); b.src_pu = 3'($urandom);
      b.src_reg = reg_e'($urandom); b.dst_reg = reg_e'($urandom); b.imm = 16'($urandom);
      en = 8'($urandom); xfer_ld = ($urandom % 5 == 0); xfer_in = 16'($urandom);
      foreach (rd_data[i]) rd_data[i] = 16'($urandom);
      #1;
      chk(rd == (b.op inside {BUS_REG2XFER, BUS_BCAST}) && rd_reg == b.src_reg, "rd");
      case (b.op)
        BUS_IMM2REG:  chk(wr == en && wr_data == b.imm && wr_reg == b.dst_reg, "imm2reg");
        BUS_XFER2REG: chk(wr == en && wr_data == xref, "xfer2reg");
        BUS_BCAST:    chk(wr == en && wr_data == rd_data[b.src_pu], "bcast");
        default:      chk(wr == 0, "no write");
      endcase
      if (b.op == BUS_REG2XFER) xref = rd_data[b.src_pu];
      else if (xfer_ld)         xref = xfer_in;
      @(posedge clk); #1;
      chk(xfer == xref, "xfer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
