// booth_mul17: 17 x 17 two's-complement multiplier, combinational.
//
// The 16-bit factors of a processing unit are widened to 17 bits (a zero or a
// copy of bit 15 in front) so that one signed multiplier serves signed and
// unsigned operands; the same multiplier is reused for the 16-bit halves of
// 32-bit factors. The multiplier b is radix-4 Booth recoded into nine digits
// in {-2,-1,0,1,2}; each digit selects a partial product of a, and the nine
// partial products are summed. The radix-4 Booth recoding follows the
// document; the summation of the partial products is written as a plain sum
// here, where the document uses a hand-built Wallace tree and a fast
// carry-lookahead adder; synthesis chooses the adder structure.
// Interface: a, b signed 17-bit; p = a*b, signed 34-bit. No clock, no latency.
module booth_mul17 (
  input  logic signed [16:0] a,
  input  logic signed [16:0] b,
  output logic signed [33:0] p
);
  logic [18:0] bx;              // b, sign-extended by one bit, with b[-1] = 0
  logic signed [33:0] pp [9];
  logic signed [33:0] a34;

  assign bx  = {b[16], b, 1'b0};
  assign a34 = 34'(a);

  always_comb begin
    for (int i = 0; i < 9; i++) begin
      unique case (bx[2*i +: 3])
        3'b000, 3'b111: pp[i] = '0;
        3'b001, 3'b010: pp[i] = a34;
        3'b011:         pp[i] = a34 <<< 1;
        3'b100:         pp[i] = -(a34 <<< 1);
        3'b101, 3'b110: pp[i] = -a34;
        default:        pp[i] = '0;
      endcase
    end
  end

  always_comb begin
    p = '0;
    for (int i = 0; i < 9; i++) p = p + (pp[i] <<< (2*i));
  end
endmodule
