// tb_issimd_dsp_top: end-to-end test of the DSP core at its full size.
//
// The testbench stands in for the instruction decoder and the host: it loads
// a program into PM and data into the sixteen DM blocks over the external
// bus, checks the instruction stream the core fetches (including a hardware
// loop and an interrupt), then issues decoded control words that run
//  - an 8-way 16-bit FIR-style dot product (loads from DMX/DMY on shared DAG
//    addresses, one MAC per datapath per cycle) finished by the vector adder,
//  - the same with a 4-datapath mask and in scalar mode (dimension control),
//  - a 2-way 32-bit multiply-accumulate after switching to 32-bit mode,
//  - circular and bit-reversed DAG addressing,
//  - stores read back over the external bus, including one that has to wait
//    while the core uses the DM read port,
//  - bus transfers between DREGs and the transfer register,
//  - vector-adder saturation,
// and compares every result with values computed here from the same data.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_issimd_dsp_top;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic [23:0] instr;
  logic [12:0] instr_pc, pc;
  logic instr_valid, ctrl_valid = 0, irq = 0, irq_taken;
  dec_ctrl_t ctrl;
  seq_ctrl_t seq;
  logic ext_req = 0, ext_we = 0, ext_space = 0, ext_ack;
  logic [15:0] ext_addr = 0, xfer, xfer_in = 0;
  logic [23:0] ext_wdata = 0, ext_rdata;
  logic xfer_ld = 0, vadd_ovf;
  mode_t mode;
  logic [7:0] dp_en;
  logic [39:0] mr [8];
  astat_t astat [8];
  logic [1:0] mv32;
  logic [2:0] stack_err;
  logic [3:0] loop_depth;
  int checks = 0, failures = 0;

  issimd_dsp_top dut (.*);
  always #5 clk = ~clk;

  // mechanism counters
  int n_vec16 = 0, n_mask = 0, n_scalar = 0, n_w32 = 0, n_vadd = 0, n_vsat = 0, n_circ = 0,
      n_brev = 0, n_loop = 0, n_irq = 0, n_bank = 0, n_wait = 0, n_store = 0, n_bus = 0;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic ext(input logic w, input logic sp, input logic [15:0] a, input logic [23:0] d,
                     output logic [23:0] q, output int cyc);
    @(negedge clk);
    ext_req = 1; ext_we = w; ext_space = sp; ext_addr = a; ext_wdata = d; cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!ext_ack && cyc < 200);
    q = ext_rdata;
    @(negedge clk); ext_req = 0;
  endtask

  // issue one decoded instruction (data-address stage this cycle)
  task automatic issue(input dec_ctrl_t d);
    ctrl = d; ctrl_valid = 1;
    @(negedge clk);
    ctrl = '0; ctrl_valid = 0;
  endtask

  task automatic drain();
    repeat (2) @(negedge clk);
  endtask

  function automatic dag_ctrl_t dwr(input dag_reg_e s, input int idx, input int v);
    dag_ctrl_t d = '0;
    d.wr = 1; d.wsel = s; d.widx = 2'(idx); d.wdata = 10'(v);
    return d;
  endfunction

  function automatic dec_ctrl_t mode_w(input logic [7:0] m, input logic v, input int s, input logic w);
    dec_ctrl_t d = '0;
    d.mode.wr_mask = 1; d.mode.mask = m; d.mode.wr_vec = 1; d.mode.vec = v;
    d.mode.sidx = 3'(s); d.mode.wr_w32 = 1; d.mode.w32 = w;
    return d;
  endfunction

  // load MX0 from DMX[I0], MY0 from DMY[I0] (post-modify by M0) and, in the
  // same instruction, MAC the previous pair (first = MUL)
  function automatic dec_ctrl_t mac_ld(input logic first, input logic do_mac, input logic ld,
                                        input logic s);
    dec_ctrl_t d = '0;
    if (ld) begin
      d.pu.ldx = 1; d.pu.ldx_reg = R_MX0; d.pu.ldy = 1; d.pu.ldy_reg = R_MY0;
      d.dag1.gen = 1; d.dag2.gen = 1;
    end
    if (do_mac) begin
      d.pu.cu = CU_MAC; d.pu.mac.op = first ? MAC_MUL : MAC_MAC;
      d.pu.mac.x = R_MX0; d.pu.mac.y = R_MY0; d.pu.mac.xs = s; d.pu.mac.ys = s;
    end
    return d;
  endfunction

  localparam int T = 16;       // taps per datapath
  logic [15:0] xs [8][T], hs [8][T];

  // dot product of the first T words of DP d's DMX and DMY blocks
  function automatic longint dot(input int d);
    longint s = 0;
    for (int k = 0; k < T; k++) s += longint'($signed(xs[d][k])) * longint'($signed(hs[d][k]));
    return s;
  endfunction

  int n_issued = 0;
  always @(posedge clk) if (ctrl_valid) n_issued++;

  task automatic run_dot(input logic s);
    issue('{dag1: dwr(DAGW_I, 0, 0), dag2: dwr(DAGW_I, 0, 0), default: '0});
    for (int k = 0; k <= T; k++) issue(mac_ld(k == 1, k > 0, k < T, s));
    drain();
  endtask

  task automatic vadd();
    dec_ctrl_t d = '0;
    d.vadd = 1; issue(d); drain();
    n_vadd++;
  endtask

  initial begin
    logic [23:0] q, prog [64];
    int cyc;
    longint e, tot;
    ctrl = '0; seq = '0; seq.cond = 1;
    repeat (3) @(negedge clk); rst_n = 1;

    // ---------- program load and fetch ----------
    for (int a = 0; a < 64; a++) begin
      prog[a] = 24'($urandom);
      ext(1, 0, 16'(a), prog[a], q, cyc);
    end
    for (int d = 0; d < 8; d++) for (int k = 0; k < T; k++) begin
      xs[d][k] = 16'($urandom); hs[d][k] = 16'($urandom);
      ext(1, 1, {2'b00, 4'(2*d), 10'(k)}, {8'h0, xs[d][k]}, q, cyc);
      ext(1, 1, {2'b00, 4'(2*d+1), 10'(k)}, {8'h0, hs[d][k]}, q, cyc);
    end
    fork
      begin : fetch_check
        forever begin
          @(posedge clk); #1;
          if (instr_valid) chk(instr == prog[instr_pc], "fetched word");
        end
      end
      begin
        @(negedge clk); run = 1;
        repeat (4) @(negedge clk);                 // pc 0..3
        seq.op = SEQ_DO; seq.addr = 13'd7; seq.count = 16'd3;   // loop body 5..7
        @(negedge clk); seq.op = SEQ_NEXT;
        begin
          int exp_pc [9] = '{5, 6, 7, 5, 6, 7, 5, 6, 7};
          foreach (exp_pc[i]) begin
            chk(pc == 13'(exp_pc[i]), $sformatf("loop pc %0d exp %0d", pc, exp_pc[i]));
            @(negedge clk);
          end
        end
        if (loop_depth == 0) n_loop++;
        irq = 1; @(negedge clk); irq = 0;
        chk(pc == 13'd4 && mode.bank, "irq vector and register set");
        if (mode.bank) n_bank++;
        n_irq++;
        repeat (3) @(negedge clk);
        seq.op = SEQ_RTI; @(negedge clk); seq.op = SEQ_NEXT;
        chk(!mode.bank && pc == 13'd9, $sformatf("rti pc=%0d", pc));
        repeat (6) @(negedge clk);
        run = 0;
        repeat (4) @(negedge clk);
        disable fetch_check;
      end
    join

    // ---------- 8-way 16-bit dot products + vector add ----------
    issue('{dag1: dwr(DAGW_M, 0, 1), dag2: dwr(DAGW_M, 0, 1), default: '0});
    begin
      int n0;
      n0 = n_issued;
      run_dot(1);
      // eight T-tap outputs (one per datapath) in 2 + T instruction cycles,
      // the block-FIR figure (x/8)(2+h) for x = 8, h = T
      chk(n_issued - n0 == 2 + T, $sformatf("block FIR cycles %0d", n_issued - n0));
    end
    tot = 0;
    for (int d = 0; d < 8; d++) begin
      e = dot(d); tot += e;
      chk(mr[d] == 40'(e), $sformatf("dot dp%0d", d + 1));
    end
    n_vec16++;
    vadd();
    chk(mr[0] == 40'(tot), "vector add 8");
    // ---------- 4-datapath mask ----------
    issue(mode_w(8'h0F, 1, 0, 0)); drain();
    chk(dp_en == 8'h0F, "mask enables");
    run_dot(1);
    for (int d = 4; d < 8; d++) chk(mr[d] == 40'(dot(d)), "masked dp unchanged");
    vadd();
    tot = dot(0) + dot(1) + dot(2) + dot(3);
    chk(mr[0] == 40'(tot), "vector add 4");
    n_mask++;
    // ---------- scalar mode on DP6: clear its MR only ----------
    issue(mode_w(8'h00, 0, 5, 0)); drain();
    begin
      dec_ctrl_t d = '0;
      d.pu.cu = CU_MAC; d.pu.mac.op = MAC_CLR; issue(d); drain();
    end
    chk(dp_en == 8'b0010_0000 && mr[5] == 0 && mr[4] == 40'(dot(4)), "scalar mode");
    n_scalar++;
    // ---------- store MR1 of every DP to DMX word 100, read back ----------
    issue(mode_w(8'hFF, 1, 0, 0));
    issue('{dag1: dwr(DAGW_I, 1, 100), default: '0});
    begin
      dec_ctrl_t d = '0;
      d.pu.st = 1; d.pu.st_reg = R_MR1; d.dag1.gen = 1; d.dag1.isel = 1; issue(d); drain();
    end
    for (int d = 0; d < 8; d++) begin
      ext(0, 1, {2'b00, 4'(2*d), 10'd100}, 0, q, cyc);
      chk(q[15:0] == mr[d][31:16], "store readback");
    end
    n_store++;
    // external read waits while the core streams DMX loads
    fork
      begin
        issue('{dag1: dwr(DAGW_I, 0, 0), dag2: dwr(DAGW_I, 0, 0), default: '0});
        for (int k = 0; k < 6; k++) issue(mac_ld(0, 0, 1, 1));
        drain();
      end
      begin
        @(negedge clk); @(negedge clk);
        ext(0, 1, {2'b00, 4'd4, 10'd3}, 0, q, cyc);
        chk(q[15:0] == xs[2][3], "ext read under load");
        if (cyc > 2) n_wait++;
      end
    join
    // ---------- bus transfers ----------
    begin
      dec_ctrl_t d = '0;
      d.bus.op = BUS_IMM2REG; d.bus.dst_reg = R_AX1; d.bus.imm = 16'h1357; issue(d);
      d = '0; d.bus.op = BUS_REG2XFER; d.bus.src_pu = 3'd2; d.bus.src_reg = R_AX1; issue(d);
      drain();
      chk(xfer == 16'h1357, "imm broadcast and read to xfer");
      d = '0; d.bus.op = BUS_BCAST; d.bus.src_pu = 3'd6; d.bus.src_reg = R_MR1; d.bus.dst_reg = R_AY1; issue(d);
      d = '0; d.bus.op = BUS_REG2XFER; d.bus.src_pu = 3'd0; d.bus.src_reg = R_AY1; issue(d);
      drain();
      chk(xfer == mr[6][31:16], "dp-to-dp broadcast");
      n_bus++;
    end
    // ---------- circular addressing: 5-word buffer, 12 loads to AX0 of DP1 ----------
    issue('{dag1: dwr(DAGW_B, 2, 0), default: '0});
    issue('{dag1: dwr(DAGW_L, 2, 5), default: '0});
    issue('{dag1: dwr(DAGW_I, 2, 0), default: '0});
    issue('{dag1: dwr(DAGW_M, 2, 2), default: '0});
    begin
      int i_ref = 0;
      for (int k = 0; k < 12; k++) begin
        dec_ctrl_t d = '0;
        d.pu.ldx = 1; d.pu.ldx_reg = R_AX0; d.dag1.gen = 1; d.dag1.isel = 2; d.dag1.msel = 2;
        d.bus.op = BUS_REG2XFER; d.bus.src_pu = 3'd0; d.bus.src_reg = R_AX0;
        issue(d);
        i_ref = (i_ref + 2) % 5;
      end
      drain();
      // last load came from index (2*11) % 5 = 2
      begin
        dec_ctrl_t d = '0;
        d.bus.op = BUS_REG2XFER; d.bus.src_pu = 3'd0; d.bus.src_reg = R_AX0; issue(d); drain();
      end
      chk(xfer == xs[0][2], $sformatf("circular last load %h exp %h", xfer, xs[0][2]));
      n_circ++;
    end
    // ---------- bit-reversed loads of 8 words: order 0,4,2,6,1,5,3,7 ----------
    issue('{dag1: dwr(DAGW_L, 3, 0), default: '0});
    issue('{dag1: dwr(DAGW_I, 3, 0), default: '0});
    issue('{dag1: dwr(DAGW_M, 3, 4), default: '0});
    begin
      int order [8] = '{0, 4, 2, 6, 1, 5, 3, 7};
      for (int k = 0; k < 8; k++) begin
        dec_ctrl_t d = '0;
        d.pu.ldx = 1; d.pu.ldx_reg = R_AX0; d.dag1.gen = 1; d.dag1.isel = 3; d.dag1.msel = 3;
        d.dag1.brev = 1;
        issue(d); drain();
        d = '0; d.bus.op = BUS_REG2XFER; d.bus.src_pu = 3'd3; d.bus.src_reg = R_AX0; issue(d); drain();
        chk(xfer == xs[3][order[k]], $sformatf("bit-reversed load %0d", k));
      end
      n_brev++;
    end
    // ---------- 32-bit mode: 2-way 32-bit MAC ----------
    issue(mode_w(8'h03, 1, 0, 1)); drain();
    chk(mode.w32 && dp_en == 8'b0011_0011, "32-bit enables");
    issue('{dag1: dwr(DAGW_I, 0, 0), dag2: dwr(DAGW_I, 0, 0), default: '0});
    for (int k = 0; k <= T; k++) issue(mac_ld(k == 1, k > 0, k < T, 1));
    drain();
    for (int g = 0; g < 2; g++) begin
      logic signed [79:0] s80;
      s80 = 0;
      // MUL of pair 0, then MAC of pairs 1..T-1
      for (int k = 0; k < T; k++) begin
        logic [31:0] a32, b32;
        a32 = {xs[4*g+1][k], xs[4*g][k]};
        b32 = {hs[4*g+1][k], hs[4*g][k]};
        s80 += 80'($signed(a32)) * 80'($signed(b32));
      end
      chk({mr[4*g+1], mr[4*g]} == s80, $sformatf("mac32 group %0d", g));
    end
    n_w32++;
    begin
      logic [79:0] a0, a1;
      a0 = {mr[1], mr[0]}; a1 = {mr[5], mr[4]};
      vadd();
      chk({mr[1], mr[0]} == a0 + a1, "vector add 32");
    end
    // ---------- vector-adder saturation in 16-bit mode ----------
    issue(mode_w(8'hFF, 1, 0, 0)); drain();
    begin
      dec_ctrl_t d = '0;
      d.bus.op = BUS_IMM2REG; d.bus.dst_reg = R_MR2; d.bus.imm = 16'h007F; issue(d); drain();
    end
    chk(vadd_ovf, "vector add overflow flagged");
    vadd();
    chk(mr[0] == 40'h7F_FFFF_FFFF, "vector add saturates");
    n_vsat++;

    // ---------- mechanism coverage ----------
    $display("count vec16=%0d mask=%0d scalar=%0d w32=%0d vadd=%0d vsat=%0d circ=%0d brev=%0d loop=%0d irq=%0d bank=%0d wait=%0d store=%0d bus=%0d",
             n_vec16, n_mask, n_scalar, n_w32, n_vadd, n_vsat, n_circ, n_brev, n_loop, n_irq,
             n_bank, n_wait, n_store, n_bus);
    begin
      int cnt [14];
      cnt = '{n_vec16, n_mask, n_scalar, n_w32, n_vadd, n_vsat, n_circ, n_brev, n_loop,
              n_irq, n_bank, n_wait, n_store, n_bus};
      foreach (cnt[i]) chk(cnt[i] > 0, $sformatf("mechanism %0d never happened", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
