// dm_bank: one data memory block (DMX or DMY of one datapath), 1k x 16 by
// default as in the prototype (sixteen such blocks, 16k words in all).
// One read port and one write port: a read address presented in a cycle gives
// its word after the next clock edge (registered output), so the read issued
// in the data-address stage is ready in the execute stage; a write takes
// effect at the clock edge. Reading and writing the same address in one cycle
// returns the old word. The document uses a RAM macro; this is a plain
// array, with the two ports as this design's choice so that a load of one
// instruction and a store of the one before can overlap. Contents are not
// reset; the read register is.
module dm_bank #(
  parameter int unsigned AW = 10,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end
endmodule
