// dag: data address generator.
//
// Holds NSET sets of index (I), modify (M), length (L) and base (B)
// registers. On gen it outputs an address from the chosen I and M:
// post-modify (address = I, then I += M) or pre-modify (address = I + M,
// I unchanged). With L != 0 the update wraps in the circular buffer
// [B, B+L); with brev the update is a reverse-carry add (the carry runs from
// the top bit down), which walks bit-reversed order when M = N/2 for an
// N-point buffer. Register writes (wr) and the update take effect at the
// clock edge; the address is combinational. The document lists bit-reversed,
// circular and pre-/post-modify addressing; the register set, its size and
// the reverse-carry method are this design's choice. Two of these (DAG1 for
// DMX, DAG2 for DMY) address all eight DM blocks of a kind at once.
module dag
  import dsp_pkg::*;
#(
  parameter int unsigned AW   = 10,
  parameter int unsigned NSET = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          gen,
  input  logic [$clog2(NSET)-1:0] isel,
  input  logic [$clog2(NSET)-1:0] msel,
  input  logic          pre,
  input  logic          brev,
  input  logic          wr,
  input  dag_reg_e      wsel,
  input  logic [$clog2(NSET)-1:0] widx,
  input  logic [AW-1:0] wdata,
  output logic [AW-1:0] addr
);
  logic [AW-1:0] ir [NSET], mr [NSET], lr [NSET], br [NSET];
  logic [AW-1:0] i_cur, m_cur, l_cur, b_cur, nxt;
  logic signed [AW+1:0] sum, lo, hi;   // two bits wider than an address

  function automatic logic [AW-1:0] rev(input logic [AW-1:0] v);
    for (int k = 0; k < int'(AW); k++) rev[k] = v[AW-1-k];
  endfunction

  // index after modification, circular wrap applied; M is signed
  always_comb begin
    i_cur = ir[isel];
    m_cur = mr[msel];
    l_cur = lr[isel];
    b_cur = br[isel];
    sum   = $signed({2'b00, i_cur}) + (AW+2)'($signed(m_cur));
    lo    = $signed({2'b00, b_cur});
    hi    = $signed({2'b00, b_cur}) + $signed({2'b00, l_cur});
    if (brev)                              nxt = rev(rev(i_cur) + rev(m_cur));
    else if (l_cur != '0 && sum >= hi)     nxt = AW'(sum - $signed({2'b00, l_cur}));
    else if (l_cur != '0 && sum < lo)      nxt = AW'(sum + $signed({2'b00, l_cur}));
    else                                   nxt = AW'(sum);
    addr = pre ? nxt : i_cur;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NSET); k++) begin
        ir[k] <= '0; mr[k] <= '0; lr[k] <= '0; br[k] <= '0;
      end
    end else begin
      if (gen && !pre) ir[isel] <= nxt;
      if (wr) begin
        unique case (wsel)
          DAGW_I: ir[widx] <= wdata;
          DAGW_M: mr[widx] <= wdata;
          DAGW_L: lr[widx] <= wdata;
          default: br[widx] <= wdata;
        endcase
      end
    end
  end
endmodule
