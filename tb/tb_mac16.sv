// tb_mac16: checks the 16-bit MAC against a reference written with plain
// integer arithmetic: signed/unsigned factors, integer and fractional mode,
// MUL/MAC/MSU/CLR, rounding, saturation and the overflow flag.
module tb_mac16;
  import dsp_pkg::*;
  logic [15:0] x, y;
  logic xs, ys, frac, rnd, sat;
  mac_op_e op;
  logic [39:0] mr_in, mr_out;
  logic mv;
  logic signed [33:0] prod;
  int checks = 0, failures = 0;

  mac16 dut (.ma($signed({xs & x[15], x})), .mb($signed({ys & y[15], y})),
             .op, .frac, .rnd, .sat, .mr_in, .mr_out, .mv, .prod);

  function automatic longint ref_mac();
    longint vx, vy, p, r;
    vx = xs ? longint'($signed(x)) : longint'(x);
    vy = ys ? longint'($signed(y)) : longint'(y);
    p  = vx * vy;
    if (frac) p = p * 2;
    case (op)
      MAC_MUL: r = p;
      MAC_MAC: r = longint'($signed(mr_in)) + p;
      MAC_MSU: r = longint'($signed(mr_in)) - p;
      MAC_CLR: r = 0;
      default: r = longint'($signed(mr_in));
    endcase
    r = longint'($signed(r[39:0]));          // 40-bit accumulator wraps
    if (rnd || op == MAC_RND) begin
      r = r + 32768;
      r = longint'($signed(r[39:0]));
      r = r - (r & 65535);
    end
    if ((sat || op == MAC_SAT) && (r > 64'sd2147483647 || r < -64'sd2147483648))
      r = (r < 0) ? -64'sd2147483648 : 64'sd2147483647;
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int n = 0; n < 20000; n++) begin
      x = 16'($urandom); y = 16'($urandom);
      xs = 1'($urandom); ys = 1'($urandom); frac = 1'($urandom);
      rnd = ($urandom % 4 == 0); sat = ($urandom % 3 == 0);
      op = mac_op_e'($urandom % 6);
      mr_in = {8'($urandom), 32'($urandom)};
      if (n % 5 == 0) mr_in = 40'($signed(32'($urandom)));
      if (n < 4) begin          // fixed cases: -1 x -1 fractional, 0x8000^2
        x = 16'h8000; y = 16'h8000; xs = 1; ys = 1; frac = 1; op = MAC_MUL; rnd = 0; sat = 0;
      end
      #1;
      e = ref_mac();
      checks++;
      if (mr_out !== e[39:0]) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d x=%h y=%h mr_in=%h out=%h exp=%h", op, x, y, mr_in, mr_out, e[39:0]);
      end
    end
    // overflow flag: 0x7FFF_FFFF + 1 leaves the 32-bit range
    x = 16'd1; y = 16'd1; xs = 1; ys = 1; frac = 0; rnd = 0; sat = 0; op = MAC_MAC;
    mr_in = 40'h00_7FFF_FFFF; #1;
    checks++; if (!mv || mr_out !== 40'h00_8000_0000) failures++;
    sat = 1; #1;
    checks++; if (mr_out !== 40'h00_7FFF_FFFF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
