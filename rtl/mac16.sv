// mac16: multiply/accumulate unit of one 16-bit processing unit.
//
// Multiplies two 16-bit factors, each read as signed or unsigned, in integer
// or fractional (1.15, product doubled) mode, and adds the product to or
// subtracts it from the 40-bit accumulator MR, with optional rounding and
// saturation, all in one cycle (combinational; MR lives in the DREG).
// Operations: MUL (MR = P), MAC (MR += P), MSU (MR -= P), CLR (MR = 0),
// RND and SAT (round or saturate MR alone).
// The 17x17 Booth multiplier and the 40-bit accumulator follow the document.
// Own choices: rounding adds 2^15 and clears MR0 (result in MR1); saturation
// clamps to the signed 32-bit range MR1:MR0; mv flags a result outside that
// range before saturation. The multiplier operands come in already widened to
// 17 bits so the reconfiguration adapter can borrow the multiplier; prod is
// the raw product for that purpose.
module mac16
  import dsp_pkg::*;
(
  input  logic signed [16:0] ma,     // widened X
  input  logic signed [16:0] mb,     // widened Y
  input  mac_op_e            op,
  input  logic               frac,
  input  logic               rnd,
  input  logic               sat,
  input  logic [39:0]        mr_in,
  output logic [39:0]        mr_out,
  output logic               mv,
  output logic signed [33:0] prod
);
  logic signed [39:0] p40, r;

  booth_mul17 u_mul (.a(ma), .b(mb), .p(prod));

  always_comb begin
    p40 = 40'(prod);
    if (frac) p40 = p40 <<< 1;
    unique case (op)
      MAC_MUL: r = p40;
      MAC_MAC: r = $signed(mr_in) + p40;
      MAC_MSU: r = $signed(mr_in) - p40;
      MAC_CLR: r = '0;
      default: r = $signed(mr_in);   // RND, SAT
    endcase
    if (rnd || op == MAC_RND) begin
      r = r + 40'sh8000;
      r[15:0] = '0;
    end
    mv = (r[39:31] != {9{r[31]}});
    if ((sat || op == MAC_SAT) && mv)
      r = r[39] ? 40'shFF_8000_0000 : 40'sh00_7FFF_FFFF;
    mr_out = r;
  end
endmodule
