// shifter16: barrel shifter of one 16-bit processing unit, combinational.
//
// The 16-bit input is placed in a 32-bit field, in the low half (hi = 0,
// sign- or zero-extended) or in the high half (hi = 1, zeros below), and
// shifted by a signed amount (positive = left, negative = right, arithmetic
// for ASHIFT, logical for LSHIFT). The 32-bit field, extended to 40 bits, is
// the new SR (SR2:SR1:SR0), optionally ORed into the old SR; two shifts with
// hi = 1 and hi = 0 ORed together therefore shift a 32-bit value.
// EXP writes SE = -(redundant sign bits of x); NORM shifts left by -SE;
// EXPADJ keeps in SB the largest exponent seen over a block of numbers
// (block floating point). SETSE / SETSB load SE / SB from the immediate.
// The document lists arithmetic shift, logical shift, normalisation, exponent
// and block exponent; the field layout, the SE/SB conventions and the 8-bit
// width of SE and SB are this design's choice.
module shifter16
  import dsp_pkg::*;
(
  input  sh_op_e      op,
  input  logic [15:0] x,
  input  logic        hi,
  input  logic signed [7:0] amt,   // shift amount (SE or immediate)
  input  logic        or_sr,
  input  logic [39:0] sr_in,
  input  logic signed [7:0] se_in,
  input  logic signed [7:0] sb_in,
  input  logic [7:0]  imm,
  output logic [39:0] sr_out,
  output logic [31:0] field,       // 32-bit shift result before OR
  output logic        wr_sr,
  output logic signed [7:0] se_out,
  output logic        wr_se,
  output logic signed [7:0] sb_out,
  output logic        wr_sb
);
  logic signed [31:0] f;
  logic signed [7:0]  n, e;
  logic [4:0]         rsb;
  logic               arith;

  // redundant sign bits of x: leading bits equal to x[15], minus one
  always_comb begin
    rsb = 5'd15;
    for (int i = 14; i >= 0; i--)
      if (x[i] != x[15] && rsb == 5'd15) rsb = 5'(14 - i);
  end

  always_comb begin
    e     = -$signed({3'b000, rsb});
    arith = (op != SH_LSHIFT);
    n     = (op == SH_NORM) ? -se_in : amt;
    if (hi)          f = {x, 16'h0000};
    else if (arith)  f = {{16{x[15]}}, x};
    else             f = {16'h0000, x};
    if (n >= 8'sd32)       f = '0;
    else if (n >= 0)       f = f <<< n;
    else if (n <= -8'sd32) f = arith ? {32{f[31]}} : '0;
    else if (arith)        f = f >>> (-n);
    else                   f = f >> (-n);
    field  = f;
    sr_out = {arith ? {8{f[31]}} : 8'h00, f};
    if (or_sr) sr_out = sr_out | sr_in;
    wr_sr  = (op == SH_ASHIFT) || (op == SH_LSHIFT) || (op == SH_NORM);
    se_out = (op == SH_SETSE) ? $signed(imm) : e;
    wr_se  = (op == SH_EXP) || (op == SH_SETSE);
    sb_out = (op == SH_SETSB) ? $signed(imm) : e;
    wr_sb  = (op == SH_SETSB) || (op == SH_EXPADJ && e > sb_in);
  end
endmodule
