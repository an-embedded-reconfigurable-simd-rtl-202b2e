// pm_mem: program memory, 8k x 24 by default as in the prototype.
// The document pipelines memory access over two cycles; here the address is
// registered in the first cycle (pre-fetch) and the word in the second
// (fetch): raddr presented with re in cycle t gives rdata after edge t+2.
// The write port is used by the memory controller to load programs.
// Contents are not reset; the pipeline registers are.
module pm_mem #(
  parameter int unsigned AW = 13,
  parameter int unsigned DW = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  output logic          rvalid,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);
  logic [DW-1:0] mem [2**AW];
  logic [AW-1:0] a_q;
  logic          v_q;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; v_q <= 1'b0; rdata <= '0; rvalid <= 1'b0;
    end else begin
      a_q    <= raddr;
      v_q    <= re;
      rvalid <= v_q;
      if (v_q) rdata <= mem[a_q];
    end
  end
endmodule
