// program_sequencer: program counter calculation and program flow control.
//
// Each running cycle the sequencer issues the next fetch address pc. Normally
// pc advances by one. Flow operations (taken when cond is 1): JUMP to addr;
// CALL pushes pc+1 on the PC stack and jumps; RET pops it; DO pushes a loop
// (start pc+1, last instruction addr, count) on the loop stack; RTI pops the
// PC and the status stack; HOLD keeps pc. When pc reaches the last
// instruction of the innermost loop, the sequencer jumps back to its start
// and counts down, and pops the loop after the last pass. An interrupt (irq,
// taken when no flow operation is pending) pushes the address it preempts
// on the PC stack and the status word on the status stack, and jumps to
// IRQ_VEC. Stack depths are the document's: PC stack 33, loop stack 8,
// status stack 16. A push to a full stack or a pop of an empty one is dropped
// and sets the sticky error flag of that stack. The flow operations act on
// the fetch address; compensating for the fetch pipeline is left to the
// instruction decoder, which the document does not detail. Own choices: the
// operation set, the loop-end test on the fetch address, the vector address.
module program_sequencer
  import dsp_pkg::*;
#(
  parameter int unsigned AW        = PM_AW,
  parameter int unsigned PC_DEPTH  = 33,
  parameter int unsigned LP_DEPTH  = 8,
  parameter int unsigned ST_DEPTH  = 16,
  parameter logic [AW-1:0] IRQ_VEC = AW'(4)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  seq_op_e       op,
  input  logic          cond,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   count,
  input  logic          irq,
  input  mode_t         status_in,
  output logic [AW-1:0] pc,
  output logic          fetch,
  output logic          irq_taken,
  output logic          status_pop,
  output mode_t         status_out,
  output logic [2:0]    stack_err,     // {status, loop, pc}
  output logic [$clog2(LP_DEPTH+1)-1:0] loop_depth
);
  typedef struct packed {
    logic [AW-1:0] start;
    logic [AW-1:0] last;
    logic [15:0]   cnt;
  } loop_t;

  logic [AW-1:0] pcs [PC_DEPTH];
  loop_t         lps [LP_DEPTH];
  mode_t         sts [ST_DEPTH];
  logic [$clog2(PC_DEPTH+1)-1:0] pc_sp;
  logic [$clog2(LP_DEPTH+1)-1:0] lp_sp;
  logic [$clog2(ST_DEPTH+1)-1:0] st_sp;

  logic          taken, loop_end, loop_back;
  logic [AW-1:0] pc_inc, nxt;
  loop_t         top_lp;

  assign taken    = cond && op != SEQ_NEXT;
  assign pc_inc   = pc + 1'b1;
  assign top_lp   = lps[(lp_sp == 0) ? 0 : lp_sp - 1];
  assign loop_end = (lp_sp != 0) && (pc == top_lp.last);
  assign loop_back = loop_end && (top_lp.cnt > 16'd1);
  assign irq_taken = run && irq && !taken;
  assign status_pop = run && taken && op == SEQ_RTI && st_sp != 0;
  assign status_out = sts[(st_sp == 0) ? 0 : st_sp - 1];
  assign fetch      = run;
  assign loop_depth = lp_sp;

  always_comb begin
    nxt = loop_back ? top_lp.start : pc_inc;
    if (taken) begin
      unique case (op)
        SEQ_JUMP, SEQ_CALL: nxt = addr;
        SEQ_RET, SEQ_RTI:   nxt = (pc_sp == 0) ? pc_inc : pcs[pc_sp - 1];
        SEQ_DO:             nxt = pc_inc;
        SEQ_HOLD:           nxt = pc;
        default: ;
      endcase
    end else if (irq_taken) begin
      nxt = IRQ_VEC;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc        <= '0;
      pc_sp     <= '0;
      lp_sp     <= '0;
      st_sp     <= '0;
      stack_err <= '0;
    end else if (run) begin
      pc <= nxt;
      // loop stack
      if (taken && op == SEQ_DO) begin
        if (lp_sp == LP_DEPTH[$bits(lp_sp)-1:0]) stack_err[1] <= 1'b1;
        else begin
          lps[lp_sp] <= '{start: pc_inc, last: addr, cnt: (count == 0) ? 16'd1 : count};
          lp_sp      <= lp_sp + 1'b1;
        end
      end else if (!taken && loop_end) begin
        if (loop_back) lps[lp_sp - 1].cnt <= top_lp.cnt - 1'b1;
        else           lp_sp <= lp_sp - 1'b1;
      end
      // PC stack
      if ((taken && op == SEQ_CALL) || irq_taken) begin
        if (pc_sp == PC_DEPTH[$bits(pc_sp)-1:0]) stack_err[0] <= 1'b1;
        else begin
          pcs[pc_sp] <= irq_taken ? (loop_back ? top_lp.start : pc_inc) : pc_inc;
          pc_sp      <= pc_sp + 1'b1;
        end
      end else if (taken && (op == SEQ_RET || op == SEQ_RTI)) begin
        if (pc_sp == 0) stack_err[0] <= 1'b1;
        else            pc_sp <= pc_sp - 1'b1;
      end
      // status stack
      if (irq_taken) begin
        if (st_sp == ST_DEPTH[$bits(st_sp)-1:0]) stack_err[2] <= 1'b1;
        else begin
          sts[st_sp] <= status_in;
          st_sp      <= st_sp + 1'b1;
        end
      end else if (taken && op == SEQ_RTI) begin
        if (st_sp == 0) stack_err[2] <= 1'b1;
        else            st_sp <= st_sp - 1'b1;
      end
    end
  end
endmodule
