// tb_shifter16: checks arithmetic and logical shifts from both field
// positions with positive and negative amounts, the OR into SR, and EXP,
// NORM, EXPADJ, SETSE and SETSB against an independent reference.
module tb_shifter16;
  import dsp_pkg::*;
  sh_op_e op;
  logic [15:0] x;
  logic hi, or_sr;
  logic signed [7:0] amt, se_in, sb_in, se_out, sb_out;
  logic [7:0] imm;
  logic [39:0] sr_in, sr_out;
  logic [31:0] field;
  logic wr_sr, wr_se, wr_sb;
  int checks = 0, failures = 0;

  shifter16 dut (.op, .x, .hi, .amt, .or_sr, .sr_in, .se_in, .sb_in, .imm,
                 .sr_out, .field, .wr_sr, .se_out, .wr_se, .sb_out, .wr_sb);

  function automatic int rsb(input logic [15:0] v);
    int k = 0;
    for (int i = 14; i >= 0; i--) begin
      if (v[i] != v[15]) break;
      k++;
    end
    return k;
  endfunction

  task automatic fail(input string what);
    failures++;
    if (failures < 10) $display("FAIL %s op=%0d x=%h hi=%b amt=%0d out=%h", what, op, x, hi, amt, sr_out);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v, e;
    logic [39:0] e40;
    for (int n = 0; n < 20000; n++) begin
      op = (n % 2) ? SH_ASHIFT : SH_LSHIFT;
      x = 16'($urandom); hi = 1'($urandom); or_sr = ($urandom % 4 == 0);
      amt = 8'(int'($urandom % 81) - 40); sr_in = {8'($urandom), 32'($urandom)};
      se_in = 0; sb_in = 0; imm = 0;
      #1;
      // reference on a 64-bit value: field value, then multiply/divide by 2^n
      if (op == SH_ASHIFT) v = hi ? longint'($signed(x)) * 65536 : longint'($signed(x));
      else                 v = hi ? longint'(x) * 65536 : longint'(x);
      if (amt >= 0) e = (amt >= 32) ? 0 : (v << amt);
      else if (op == SH_ASHIFT) e = (amt <= -32) ? (v < 0 ? -1 : 0) : (v >>> (-amt));
      else e = (amt <= -32) ? 0 : (v >> (-amt));
      e40 = {(op == SH_ASHIFT) ? {8{e[31]}} : 8'h00, e[31:0]};
      if (or_sr) e40 = e40 | sr_in;
      checks++;
      if (sr_out !== e40 || !wr_sr || wr_se || wr_sb) fail("shift");
    end
    // EXP, NORM, EXPADJ
    for (int n = 0; n < 5000; n++) begin
      x = 16'($urandom) >> ($urandom % 16);
      if (n % 2) x = ~x;
      hi = 1; or_sr = 0; amt = 0; imm = 0; sr_in = 0;
      op = SH_EXP; se_in = 0; sb_in = 0; #1;
      checks++;
      if (!wr_se || se_out !== 8'(-rsb(x))) fail("exp");
      op = SH_NORM; se_in = 8'(-rsb(x)); #1;
      checks++;
      // normalised: two top bits of the field differ (unless x is 0 or -1)
      e40 = {{8{x[15]}}, x, 16'h0} << rsb(x);
      if (sr_out[31:0] !== e40[31:0] || (x != 0 && x != 16'hFFFF && sr_out[31] == sr_out[30])) fail("norm");
      op = SH_EXPADJ; sb_in = 8'(-(int'($urandom % 17))); #1;
      checks++;
      if (wr_sb !== (8'(-rsb(x)) > sb_in) || (wr_sb && sb_out !== 8'(-rsb(x)))) fail("expadj");
    end
    op = SH_SETSE; imm = 8'hF9; #1;
    checks++; if (!wr_se || se_out !== -8'sd7 || wr_sr) fail("setse");
    op = SH_SETSB; imm = 8'hF0; #1;
    checks++; if (!wr_sb || sb_out !== -8'sd16) fail("setsb");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
