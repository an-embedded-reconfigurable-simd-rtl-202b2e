// tb_program_sequencer: directed program-flow checks on the fetch address:
// straight-line, jump, call/return, a counted loop, nested loops, HOLD, a
// false condition, an interrupt with return (PC and status stacks), and the
// stack-overflow flags at the document's depths (33 PC, 8 loop levels).
module tb_program_sequencer;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, cond = 1, irq = 0;
  seq_op_e op = SEQ_NEXT;
  logic [12:0] addr = 0, pc;
  logic [15:0] count = 0;
  mode_t status_in, status_out;
  logic fetch, irq_taken, status_pop;
  logic [2:0] stack_err;
  logic [3:0] loop_depth;
  int checks = 0, failures = 0;

  program_sequencer #(.IRQ_VEC(13'd4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s pc=%0d", what, pc); end
  endtask

  // apply one operation for one cycle, then expect the given pc
  task automatic cyc(input seq_op_e o, input int a, input int n, input int exp_pc, input string what);
    op = o; addr = 13'(a); count = 16'(n);
    @(posedge clk); #1;
    op = SEQ_NEXT;
    chk(pc == 13'(exp_pc), what);
  endtask

  initial begin
    status_in = '{w32: 1'b1, vec: 1'b0, sidx: 3'd2, bank: 1'b0, mask: 8'hC3};
    repeat (2) @(negedge clk); rst_n = 1; run = 1;
    #1 chk(pc == 0 && fetch, "reset pc");
    for (int k = 1; k <= 3; k++) cyc(SEQ_NEXT, 0, 0, k, "increment");
    cyc(SEQ_JUMP, 100, 0, 100, "jump");
    cyc(SEQ_CALL, 200, 0, 200, "call");
    cyc(SEQ_NEXT, 0, 0, 201, "in sub");
    cyc(SEQ_RET, 0, 0, 101, "return");
    cond = 0; cyc(SEQ_JUMP, 300, 0, 102, "cond false"); cond = 1;
    cyc(SEQ_HOLD, 0, 0, 102, "hold");
    // DO at 102: body 103..105, 3 passes
    cyc(SEQ_DO, 105, 3, 103, "do");
    chk(loop_depth == 1, "loop pushed");
    begin
      int exp_seq [9] = '{104, 105, 103, 104, 105, 103, 104, 105, 106};
      foreach (exp_seq[i]) cyc(SEQ_NEXT, 0, 0, exp_seq[i], "loop body");
    end
    chk(loop_depth == 0, "loop popped");
    // nested: outer 106..110 x2, inner 108..109 x2 (DO at 107)
    cyc(SEQ_DO, 110, 2, 107, "outer do");
    cyc(SEQ_DO, 109, 2, 108, "inner do");
    begin
      int exp_seq [10] = '{109, 108, 109, 110, 107, 108, 109, 108, 109, 110};
      foreach (exp_seq[i]) begin
        if (exp_seq[i] == 108 && i == 5) begin
          cyc(SEQ_DO, 109, 2, 108, "inner do again");
        end else cyc(SEQ_NEXT, 0, 0, exp_seq[i], "nested");
      end
      cyc(SEQ_NEXT, 0, 0, 111, "nested exit");
    end
    chk(loop_depth == 0, "nested popped");
    // interrupt at 111
    irq = 1; @(posedge clk); #1; irq = 0;
    chk(pc == 4, "irq vector");
    cyc(SEQ_NEXT, 0, 0, 5, "handler");
    op = SEQ_RTI; #1;
    chk(status_pop && status_out == status_in, "status pop");
    @(posedge clk); #1; op = SEQ_NEXT;
    chk(pc == 112, "rti");
    // PC stack overflow after 33 calls
    for (int k = 0; k < 33; k++) cyc(SEQ_CALL, 1000 + k, 0, 1000 + k, "deep call");
    chk(stack_err == 3'b000, "33 levels fit");
    cyc(SEQ_CALL, 2000, 0, 2000, "34th call");
    chk(stack_err[0], "pc stack overflow");
    for (int k = 0; k < 8; k++) cyc(SEQ_DO, 3000, 5, 2001 + k, "deep do");
    chk(stack_err[1] == 0 && loop_depth == 8, "8 loops fit");
    cyc(SEQ_DO, 3000, 5, 2009, "9th do");
    chk(stack_err[1], "loop stack overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
