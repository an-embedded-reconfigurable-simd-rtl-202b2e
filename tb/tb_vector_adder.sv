// tb_vector_adder: random accumulators and selections in 16- and 32-bit
// mode against a reference sum with saturation; includes forced overflow.
module tb_vector_adder;
  logic w32;
  logic [7:0] sel;
  logic [39:0] mr [8];
  logic [79:0] acc [2], sum;
  logic ovf;
  int checks = 0, failures = 0;

  vector_adder #(.N(8)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [100:0] s, mx, mn;
    logic [79:0] e;
    logic eo;
    for (int n = 0; n < 10000; n++) begin
      w32 = 1'($urandom); sel = 8'($urandom);
      for (int i = 0; i < 8; i++) begin
        mr[i] = {8'($urandom), 32'($urandom)};
        if (n % 3 != 0) mr[i] = 40'($signed(mr[i][31:0]));
        if (n % 50 == 1) mr[i] = 40'h7F_FFFF_FFFF;
      end
      for (int g = 0; g < 2; g++) begin
        acc[g] = {16'($urandom), 32'($urandom), 32'($urandom)};
        if (n % 50 == 2) acc[g] = {1'b1, 79'd0};
      end
      #1;
      s = 0;
      if (w32) begin
        if (sel[0]) s += 101'($signed(acc[0]));
        if (sel[4]) s += 101'($signed(acc[1]));
        mx = (101'sd1 <<< 79) - 1; mn = -(101'sd1 <<< 79);
      end else begin
        for (int i = 0; i < 8; i++) if (sel[i]) s += 101'($signed(mr[i]));
        mx = (101'sd1 <<< 39) - 1; mn = -(101'sd1 <<< 39);
      end
      eo = (s > mx) || (s < mn);
      if (s > mx) s = mx;
      if (s < mn) s = mn;
      e = s[79:0];
      checks++;
      if (sum !== e || ovf !== eo) begin
        failures++;
        if (failures < 10) $display("FAIL w32=%b sel=%h sum=%h exp=%h", w32, sel, sum, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
