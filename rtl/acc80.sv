// acc80: product combiner and 80-bit accumulator of the 32-bit MAC.
//
// A 32x32 product is built from four 17x17 products of the 16-bit halves,
//   A*B = 2^32*(Ah*Bh) + 2^16*(Ah*Bl + Al*Bh) + Al*Bl,
// where the high halves are widened as signed or unsigned and the low halves
// always as unsigned. This block aligns the four products, adds them and the
// 80-bit accumulator (the document combines a 4-2 compressor and an 80-bit
// adder with the accumulate and rounding logic into one unit; here it is
// written as a sum), and applies MUL/MAC/MSU/CLR/RND/SAT like mac16.
// Own choices: fractional mode doubles the 64-bit product; rounding adds 2^31
// and clears the low 32 bits; saturation clamps to the signed 64-bit range.
// Combinational; the 80-bit accumulator is held in the MR registers of two
// processing units.
module acc80
  import dsp_pkg::*;
(
  input  logic signed [33:0] p_ll,   // Al*Bl
  input  logic signed [33:0] p_hl,   // Ah*Bl
  input  logic signed [33:0] p_lh,   // Al*Bh
  input  logic signed [33:0] p_hh,   // Ah*Bh
  input  mac_op_e            op,
  input  logic               frac,
  input  logic               rnd,
  input  logic               sat,
  input  logic [79:0]        acc_in,
  output logic [79:0]        acc_out,
  output logic               mv
);
  logic signed [79:0] p, r;

  always_comb begin
    p = (80'(p_hh) <<< 32) + ((80'(p_hl) + 80'(p_lh)) <<< 16) + 80'(p_ll);
    if (frac) p = p <<< 1;
    unique case (op)
      MAC_MUL: r = p;
      MAC_MAC: r = $signed(acc_in) + p;
      MAC_MSU: r = $signed(acc_in) - p;
      MAC_CLR: r = '0;
      default: r = $signed(acc_in);
    endcase
    if (rnd || op == MAC_RND) begin
      r = r + (80'sd1 <<< 31);
      r[31:0] = '0;
    end
    mv = (r[79:63] != {17{r[63]}});
    if ((sat || op == MAC_SAT) && mv)
      r = r[79] ? {{17{1'b1}}, 63'd0} : {17'd0, {63{1'b1}}};
    acc_out = r;
  end
endmodule
