// tb_alu16: checks every ALU operation and flag against a reference, then two
// chained ALUs as a 32-bit adder/subtracter against 32-bit arithmetic.
module tb_alu16;
  import dsp_pkg::*;
  alu_op_e op;
  logic [15:0] x, y, res, res_h;
  logic ac_in, cout, az, an, av, ac, cout_h, az_h, an_h, av_h, ac_h;
  int checks = 0, failures = 0;

  alu16 dut (.op, .x, .y, .ac_in, .chain(1'b0), .cin(1'b0), .az_in(1'b1),
             .res, .cout, .az, .an, .av, .ac);
  logic [15:0] xh, yh;
  alu16 dut_h (.op, .x(xh), .y(yh), .ac_in(1'b0), .chain(1'b1), .cin(cout), .az_in(az),
               .res(res_h), .cout(cout_h), .az(az_h), .an(an_h), .av(av_h), .ac(ac_h));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] e;
    logic        ev;
    logic [31:0] a32, b32, e32;
    for (int n = 0; n < 20000; n++) begin
      op = alu_op_e'($urandom % 14);
      x = 16'($urandom); y = 16'($urandom); ac_in = 1'($urandom);
      if (n % 7 == 0) y = x;
      xh = 0; yh = 0;
      #1;
      ev = 0;
      case (op)
        ALU_PASSX: e = {1'b0, x};
        ALU_PASSY: e = {1'b0, y};
        ALU_ADD:   begin e = x + y;         ev = (x[15] == y[15]) && (e[15] != x[15]); end
        ALU_ADDC:  begin e = x + y + ac_in; ev = (x[15] == y[15]) && (e[15] != x[15]); end
        ALU_SUB:   begin e = {1'b0, x} + {1'b0, ~y} + 1; ev = (x[15] != y[15]) && (e[15] != x[15]); end
        ALU_SUBR:  begin e = {1'b0, y} + {1'b0, ~x} + 1; ev = (x[15] != y[15]) && (e[15] != y[15]); end
        ALU_NEG:   begin e = {1'b0, ~x} + 1; ev = (x == 16'h8000); end
        ALU_INC:   begin e = x + 1; ev = (x == 16'h7FFF); end
        ALU_DEC:   begin e = x + 17'h0FFFF; ev = (x == 16'h8000); end
        ALU_AND:   e = {1'b0, x & y};
        ALU_OR:    e = {1'b0, x | y};
        ALU_XOR:   e = {1'b0, x ^ y};
        ALU_NOT:   e = {1'b0, ~x};
        default:   begin e = x[15] ? ({1'b0, ~x} + 1) : {1'b0, x}; ev = (x == 16'h8000); end
      endcase
      checks++;
      if (res !== e[15:0] || az !== (e[15:0] == 0) || an !== e[15] || av !== ev ||
          (op inside {ALU_ADD, ALU_ADDC, ALU_SUB, ALU_SUBR, ALU_INC, ALU_DEC} && ac !== e[16])) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d x=%h y=%h res=%h e=%h av=%b ac=%b", op, x, y, res, e, av, ac);
      end
    end
    // 32-bit chained operation
    for (int n = 0; n < 5000; n++) begin
      a32 = $urandom; b32 = $urandom;
      if (n % 9 == 0) b32 = a32;
      case (n % 5)
        0: begin op = ALU_ADD; e32 = a32 + b32; end
        1: begin op = ALU_SUB; e32 = a32 - b32; end
        2: begin op = ALU_NEG; e32 = -a32; end
        3: begin op = ALU_INC; e32 = a32 + 1; end
        default: begin op = ALU_DEC; e32 = a32 - 1; end
      endcase
      x = a32[15:0]; xh = a32[31:16]; y = b32[15:0]; yh = b32[31:16]; ac_in = 0;
      #1;
      checks++;
      if ({res_h, res} !== e32 || az_h !== (e32 == 0) || an_h !== e32[31]) begin
        failures++;
        if (failures < 10) $display("FAIL32 op=%0d a=%h b=%h res=%h e=%h", op, a32, b32, {res_h, res}, e32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
