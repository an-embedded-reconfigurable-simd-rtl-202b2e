// alu16: 16-bit ALU of one processing unit, combinational.
//
// Every arithmetic operation is one add of two selected operands and a carry
// (a + b + c): ADD, ADDC (carry = AC flag), SUB (X-Y), SUBR (Y-X), NEG, INC,
// DEC, PASSX, PASSY; ABS and the logic operations AND, OR, XOR, NOT are
// formed directly. With chain = 1 the carry comes from cin (the carry out of
// the lower half's ALU) and az_in (the lower half's zero flag) is folded into
// AZ, so two of these ALUs form one 32-bit ALU, as the reconfiguration adapter
// does. The document only calls the ALU a typical, small, low-power one; the
// operation set and flags (AZ zero, AN negative, AV overflow, AC carry) are
// this design's choice. ABS does not chain.
module alu16
  import dsp_pkg::*;
(
  input  alu_op_e     op,
  input  logic [15:0] x,
  input  logic [15:0] y,
  input  logic        ac_in,
  input  logic        chain,
  input  logic        cin,
  input  logic        az_in,
  output logic [15:0] res,
  output logic        cout,
  output logic        az, an, av, ac
);
  logic [15:0] a, b;
  logic        c, arith;
  logic [16:0] sum;

  always_comb begin
    a = x; b = '0; c = 1'b0; arith = 1'b1;
    unique case (op)
      ALU_PASSX: begin a = x;  b = '0; c = 1'b0; end
      ALU_PASSY: begin a = y;  b = '0; c = 1'b0; end
      ALU_ADD:   begin a = x;  b = y;  c = 1'b0; end
      ALU_ADDC:  begin a = x;  b = y;  c = ac_in; end
      ALU_SUB:   begin a = x;  b = ~y; c = 1'b1; end
      ALU_SUBR:  begin a = y;  b = ~x; c = 1'b1; end
      ALU_NEG:   begin a = ~x; b = '0; c = 1'b1; end
      ALU_INC:   begin a = x;  b = '0; c = 1'b1; end
      ALU_DEC:   begin a = x;  b = '1; c = 1'b0; end
      ALU_ABS:   begin a = x[15] ? ~x : x; b = '0; c = x[15]; end
      default:   arith = 1'b0;
    endcase
    if (chain) c = cin;
    sum = {1'b0, a} + {1'b0, b} + 17'(c);
    if (arith) begin
      res  = sum[15:0];
      cout = sum[16];
      av   = (a[15] == b[15]) && (sum[15] != a[15]);
    end else begin
      unique case (op)
        ALU_AND: res = x & y;
        ALU_OR:  res = x | y;
        ALU_XOR: res = x ^ y;
        default: res = ~x;
      endcase
      cout = 1'b0;
      av   = 1'b0;
    end
    ac = cout;
    an = res[15];
    az = (res == '0) && (!chain || az_in);
  end
endmodule
