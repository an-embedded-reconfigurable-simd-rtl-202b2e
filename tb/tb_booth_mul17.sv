// tb_booth_mul17: checks the 17x17 Booth multiplier against the built-in
// signed product for the corner values and 20000 random pairs.
module tb_booth_mul17;
  logic signed [16:0] a, b;
  logic signed [33:0] p;
  int checks = 0, failures = 0;

  booth_mul17 dut (.a, .b, .p);

  task automatic check(input logic signed [16:0] x, input logic signed [16:0] y);
    logic signed [33:0] exp_p;
    a = x; b = y; #1;
    exp_p = 34'(x) * 34'(y);
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d p=%0d exp=%0d", x, y, p, exp_p);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [16:0] c [6];
    c = '{17'sd0, 17'sd1, -17'sd1, 17'sh0FFFF, -17'sh10000, 17'sh0AAAA};
    foreach (c[i]) foreach (c[j]) check(c[i], c[j]);
    repeat (20000) check(17'($urandom), 17'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
