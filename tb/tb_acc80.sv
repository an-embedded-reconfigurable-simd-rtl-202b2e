// tb_acc80: forms the four 17x17 half-word products the way the 32-bit MAC
// does and checks acc80 against a 32x32 product computed directly, for signed
// and unsigned factors, MUL/MAC/MSU, fractional mode, rounding and saturation.
module tb_acc80;
  import dsp_pkg::*;
  logic [31:0] a, b;
  logic xs, ys, frac, rnd, sat;
  mac_op_e op;
  logic signed [33:0] p_ll, p_hl, p_lh, p_hh;
  logic [79:0] acc_in, acc_out;
  logic mv;
  int checks = 0, failures = 0;

  logic signed [16:0] al, ah, bl, bh;
  assign al = $signed({1'b0, a[15:0]});
  assign bl = $signed({1'b0, b[15:0]});
  assign ah = $signed({xs & a[31], a[31:16]});
  assign bh = $signed({ys & b[31], b[31:16]});
  booth_mul17 m0 (.a(al), .b(bl), .p(p_ll));
  booth_mul17 m1 (.a(ah), .b(bh), .p(p_hh));
  booth_mul17 m2 (.a(ah), .b(bl), .p(p_hl));
  booth_mul17 m3 (.a(al), .b(bh), .p(p_lh));

  acc80 dut (.p_ll, .p_hl, .p_lh, .p_hh, .op, .frac, .rnd, .sat, .acc_in, .acc_out, .mv);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [79:0] pa, pb, p, r;
    for (int n = 0; n < 20000; n++) begin
      a = $urandom; b = $urandom;
      xs = 1'($urandom); ys = 1'($urandom); frac = 1'($urandom);
      rnd = ($urandom % 4 == 0); sat = ($urandom % 3 == 0);
      op = mac_op_e'($urandom % 3);
      acc_in = {16'($urandom), 32'($urandom), 32'($urandom)};
      if (n % 2 == 0) acc_in = 80'($signed({32'($urandom), 32'($urandom)}) >>> (n % 40));
      #1;
      pa = xs ? 80'($signed(a)) : 80'(a);
      pb = ys ? 80'($signed(b)) : 80'(b);
      p  = pa * pb;
      if (frac) p = p * 2;
      case (op)
        MAC_MUL: r = p;
        MAC_MAC: r = $signed(acc_in) + p;
        default: r = $signed(acc_in) - p;
      endcase
      if (rnd) begin r = r + 80'sh8000_0000; r[31:0] = 0; end
      if (sat && (r > 80'sh7FFF_FFFF_FFFF_FFFF || r < -80'sh8000_0000_0000_0000))
        r = (r < 0) ? -80'sh8000_0000_0000_0000 : 80'sh7FFF_FFFF_FFFF_FFFF;
      checks++;
      if (acc_out !== r) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h op=%0d out=%h exp=%h", a, b, op, acc_out, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
