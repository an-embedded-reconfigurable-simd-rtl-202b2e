// tb_dsp_kernels: benchmark kernels run on the full-size DSP core.
//
// The testbench plays the host and the instruction decoder. It loads data
// into the DM blocks over the external bus, issues decoded control words
// back to back, and reads results back over the external bus. Three kernels:
//
//  - Block FIR, y[n] = sum_k h[k] * s[n+k] for n = 0..x-1. Each datapath
//    computes x/8 consecutive outputs. Its DMX block holds its stretch of
//    samples and its DMY block the taps. DAG1 walks the samples: I0 with
//    M0 = +1, and M1 = -(h-2) on the last tap so I0 starts on the next
//    output. DAG2 walks the taps as a circular buffer (L0 = h). One group of
//    eight outputs takes h load+MAC instructions, one closing MAC and one
//    store: 2+h instructions, and (x/8)(2+h) for the block, the figure
//    published for this core. The cycle count, every 40-bit accumulator and
//    every stored word are checked. The cycle count excludes the one-off DAG
//    set-up. Several (x, h) sizes are run; they are this testbench's own
//    choice, since the published figure is a formula.
//  - Complex FIR, y[n] = sum_k c[k] * s[n+k] on complex 16-bit data. All
//    eight datapaths share each output: each takes h/8 taps. A real phase
//    (2 MACs per tap, with -ci stored for the subtracted product), a vector
//    add, an imaginary phase and a second vector add give h/2+2 instructions
//    per output, the figure published for this core. One more instruction
//    starts the load pipeline and one takes the last sum out. Each sum is
//    checked in DP1's accumulator and again after it has moved to the
//    transfer register, which needs no data address. Sizes (x, h) = (8, 16)
//    and (5, 32) are this testbench's own.
//  - The reordering pass of a 256-point FFT. A bit-reversed walk of DMX
//    (DAG1, M = 128, reverse-carry) is loaded and stored in order into DMY
//    (DAG2) on all eight datapaths at once. A load and the store of the
//    previous word share one instruction, so N points take N+1 instructions.
//    The 256-point size is the published FFT benchmark's. The butterflies
//    are not run, since no instruction set exists to write them in.
module tb_dsp_kernels;
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
  int n_fir = 0, n_fft = 0, n_cfir = 0;

  issimd_dsp_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_issued = 0;
  always @(posedge clk) if (ctrl_valid) n_issued++;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic ext(input logic w, input logic [3:0] blk, input int a, input logic [15:0] d,
                     output logic [15:0] q);
    int cyc = 0;
    @(negedge clk);
    ext_req = 1; ext_we = w; ext_space = 1; ext_addr = {2'b00, blk, 10'(a)};
    ext_wdata = {8'h0, d};
    do begin @(posedge clk); #1; cyc++; end while (!ext_ack && cyc < 200);
    chk(ext_ack, "external access acknowledged");
    q = ext_rdata[15:0];
    @(negedge clk); ext_req = 0;
  endtask

  task automatic issue(input dec_ctrl_t d);
    ctrl = d; ctrl_valid = 1;
    @(negedge clk);
    ctrl = '0; ctrl_valid = 0;
  endtask

  function automatic dag_ctrl_t dwr(input dag_reg_e s, input int idx, input int v);
    dag_ctrl_t d = '0;
    d.wr = 1; d.wsel = s; d.widx = 2'(idx); d.wdata = 10'(v);
    return d;
  endfunction

  // ---------------- block FIR ----------------
  localparam int OUT_BASE = 512;   // DMX word of a datapath's first output
  logic [15:0] smp [1024], tap [64];

  task automatic block_fir(input int x, input int h);
    int xn = x / 8, n0;
    logic [15:0] q;
    dec_ctrl_t d;
    longint y;
    for (int i = 0; i < x + h - 1; i++) smp[i] = 16'($urandom);
    for (int k = 0; k < h; k++) tap[k] = 16'($urandom);
    for (int p = 0; p < 8; p++) begin
      for (int i = 0; i < xn + h - 1; i++) ext(1, 4'(2 * p), i, smp[p * xn + i], q);
      for (int k = 0; k < h; k++) ext(1, 4'(2 * p + 1), k, tap[k], q);
    end
    // DAG set-up: samples I0 = 0, M0 = 1, M1 = -(h-2), outputs I1;
    // taps I0 = B0 = 0, L0 = h, M0 = 1
    issue('{dag1: dwr(DAGW_I, 0, 0), dag2: dwr(DAGW_I, 0, 0), default: '0});
    issue('{dag1: dwr(DAGW_M, 0, 1), dag2: dwr(DAGW_M, 0, 1), default: '0});
    issue('{dag1: dwr(DAGW_M, 1, 2 - h), dag2: dwr(DAGW_L, 0, h), default: '0});
    issue('{dag1: dwr(DAGW_I, 1, OUT_BASE), dag2: dwr(DAGW_B, 0, 0), default: '0});
    n0 = n_issued;
    for (int j = 0; j < xn; j++) begin
      for (int k = 0; k <= h; k++) begin
        d = '0;
        if (k < h) begin
          d.pu.ldx = 1; d.pu.ldx_reg = R_MX0; d.pu.ldy = 1; d.pu.ldy_reg = R_MY0;
          d.dag1.gen = 1; d.dag1.msel = (k == h - 1) ? 2'd1 : 2'd0;
          d.dag2.gen = 1;
        end
        if (k > 0) begin
          d.pu.cu = CU_MAC; d.pu.mac.op = (k == 1) ? MAC_MUL : MAC_MAC;
          d.pu.mac.x = R_MX0; d.pu.mac.y = R_MY0; d.pu.mac.xs = 1; d.pu.mac.ys = 1;
        end
        issue(d);
      end
      // store MR0 to DMX[I1++]; the closing MAC has written MR by now
      d = '0;
      d.pu.st = 1; d.pu.st_y = 0; d.pu.st_reg = R_MR0;
      d.dag1.gen = 1; d.dag1.isel = 2'd1;
      issue(d);
      for (int p = 0; p < 8; p++) begin
        y = 0;
        for (int k = 0; k < h; k++)
          y += longint'($signed(smp[p * xn + j + k])) * longint'($signed(tap[k]));
        chk(mr[p] == 40'(y), $sformatf("fir x=%0d h=%0d dp%0d out %0d", x, h, p + 1, j));
      end
    end
    chk(n_issued - n0 == xn * (2 + h),
        $sformatf("block FIR x=%0d h=%0d: %0d cycles, expected (x/8)(2+h) = %0d",
                  x, h, n_issued - n0, xn * (2 + h)));
    repeat (3) @(negedge clk);
    for (int p = 0; p < 8; p++)
      for (int j = 0; j < xn; j++) begin
        y = 0;
        for (int k = 0; k < h; k++)
          y += longint'($signed(smp[p * xn + j + k])) * longint'($signed(tap[k]));
        ext(0, 4'(2 * p), OUT_BASE + j, 16'h0, q);
        chk(q == 16'(y), $sformatf("stored fir output dp%0d %0d", p + 1, j));
      end
    n_fir++;
  endtask


  // ---------------- complex FIR ----------------
  // y[n] = sum_k c[k] * s[n+k], complex. Datapath p takes taps
  // p*q .. p*q+q-1 (q = h/8). DMX holds its samples as (re, im) pairs. DMY
  // holds (cr, -ci) pairs for the real phase, then (ci, cr) pairs for the
  // imaginary phase, so both phases are plain MACs. Per output: 2q MACs, vector
  // add, 2q MACs, vector add = h/2+2 instructions. Loads run one instruction
  // ahead. Each sum is taken from DP1 through the transfer register in the
  // next instruction.
  logic [15:0] cx_s [2][64], cx_c [8][4][8];

  task automatic complex_fir(input int x, input int h);
    int q = h / 8, n0, nm, nslot, mac_of [$], kind [$];
    logic [15:0] x_exp [$];
    logic [15:0] qd;
    dec_ctrl_t d;
    longint yr, yi, e;
    for (int i = 0; i < x + h - 1; i++) begin
      cx_s[0][i] = 16'($urandom); cx_s[1][i] = 16'($urandom);
    end
    for (int p = 0; p < 8; p++) begin
      for (int i = 0; i < x + q - 1; i++) begin
        ext(1, 4'(2 * p), 2 * i, cx_s[0][p * q + i], qd);
        ext(1, 4'(2 * p), 2 * i + 1, cx_s[1][p * q + i], qd);
      end
      for (int t = 0; t < q; t++) begin
        cx_c[p][0][t] = 16'($urandom); cx_c[p][1][t] = 16'($urandom);   // cr, ci
        ext(1, 4'(2 * p + 1), 2 * t, cx_c[p][0][t], qd);
        ext(1, 4'(2 * p + 1), 2 * t + 1, -cx_c[p][1][t], qd);
        ext(1, 4'(2 * p + 1), 2 * q + 2 * t, cx_c[p][1][t], qd);
        ext(1, 4'(2 * p + 1), 2 * q + 2 * t + 1, cx_c[p][0][t], qd);
      end
    end
    // samples: I3 = 0, M3 = 1; end of real phase M2 = -(2q-1);
    // end of imaginary phase M1 = 3-2q (next sample). Taps: circular, L3 = 4q.
    issue('{dag1: dwr(DAGW_I, 3, 0), dag2: dwr(DAGW_I, 3, 0), default: '0});
    issue('{dag1: dwr(DAGW_M, 3, 1), dag2: dwr(DAGW_M, 3, 1), default: '0});
    issue('{dag1: dwr(DAGW_M, 2, 1 - 2 * q), dag2: dwr(DAGW_L, 3, 4 * q), default: '0});
    issue('{dag1: dwr(DAGW_M, 1, 3 - 2 * q), dag2: dwr(DAGW_B, 3, 0), default: '0});
    // slot list: kind 0 = MAC number mac_of, 1 = vector add
    nm = 0;
    for (int n = 0; n < x; n++)
      for (int ph = 0; ph < 2; ph++) begin
        for (int t = 0; t < 2 * q; t++) begin kind.push_back(0); mac_of.push_back(nm++); end
        kind.push_back(1); mac_of.push_back(-1);
      end
    nslot = kind.size();
    n0 = n_issued;
    // slot -1 starts the load pipeline; slot nslot takes the last sum out
    for (int sl = -1; sl <= nslot; sl++) begin
      int mk;
      d = '0;
      // load for the MAC of the next slot
      if (sl + 1 < nslot && kind[sl + 1] == 0) begin
        mk = mac_of[sl + 1] % (2 * q);
        d.pu.ldx = 1; d.pu.ldy = 1;
        d.pu.ldx_reg = (mk % 2 == 0) ? R_MX0 : R_MX1;
        d.pu.ldy_reg = (mk % 2 == 0) ? R_MY0 : R_MY1;
        d.dag1.gen = 1; d.dag1.isel = 2'd3; d.dag2.gen = 1; d.dag2.isel = 2'd3;
        if (mk != 2 * q - 1) d.dag1.msel = 2'd3;
        else d.dag1.msel = ((mac_of[sl + 1] / (2 * q)) % 2 == 0) ? 2'd2 : 2'd1;
      end
      if (sl >= 0 && sl < nslot && kind[sl] == 0) begin
        mk = mac_of[sl] % (2 * q);
        d.pu.cu = CU_MAC; d.pu.mac.op = (mk == 0) ? MAC_MUL : MAC_MAC;
        d.pu.mac.x = (mk % 2 == 0) ? R_MX0 : R_MX1;
        d.pu.mac.y = (mk % 2 == 0) ? R_MY0 : R_MY1;
        d.pu.mac.xs = 1; d.pu.mac.ys = 1;
      end
      if (sl >= 0 && sl < nslot && kind[sl] == 1) d.vadd = 1;
      if (sl >= 1 && kind[sl - 1] == 1) begin
        d.bus.op = BUS_REG2XFER; d.bus.src_pu = 3'd0; d.bus.src_reg = R_MR0;
      end
      issue(d);
      // after the slot that follows a vector add, DP1 holds that sum
      if (sl >= 1 && kind[sl - 1] == 1) begin
        int n = (sl - 1) / (2 * (2 * q + 1)), ph = ((sl - 1) / (2 * q + 1)) % 2;
        yr = 0; yi = 0;
        for (int p = 0; p < 8; p++)
          for (int t = 0; t < q; t++) begin
            longint sr = $signed(cx_s[0][n + p * q + t]), si = $signed(cx_s[1][n + p * q + t]);
            longint cr = $signed(cx_c[p][0][t]), ci = $signed(cx_c[p][1][t]);
            longint nci = $signed(16'(-cx_c[p][1][t]));
            yr += sr * cr + si * nci;
            yi += sr * ci + si * cr;
          end
        e = ph ? yi : yr;
        chk(mr[0] == 40'(e), $sformatf("complex fir x=%0d h=%0d out %0d %s: %h exp %h",
                                       x, h, n, ph ? "im" : "re", mr[0], 40'(e)));
        x_exp.push_back(16'(e));
      end
      // the transfer made in the previous slot has landed by now
      if (sl >= 2 && kind[sl - 2] == 1) begin
        chk(xfer == x_exp[0], $sformatf("complex fir sum via transfer register %h exp %h",
                                        xfer, x_exp[0]));
        void'(x_exp.pop_front());
      end
    end
    @(negedge clk);
    chk(x_exp.size() == 1 && xfer == x_exp[0], "last complex fir sum via transfer register");
    chk(n_issued - n0 == x * (h / 2 + 2) + 2,
        $sformatf("complex FIR x=%0d h=%0d: %0d cycles, expected x(h/2+2)+2 = %0d",
                  x, h, n_issued - n0, x * (h / 2 + 2) + 2));
    n_cfir++;
  endtask

  // ---------------- FFT bit-reversed reordering ----------------
  localparam int NFFT = 256;
  logic [15:0] fdat [8][NFFT];

  function automatic int brev8(input int v);
    int r = 0;
    for (int b = 0; b < 8; b++) if (v[b]) r |= 1 << (7 - b);
    return r;
  endfunction

  task automatic fft_reorder();
    logic [15:0] q;
    dec_ctrl_t d;
    int n0;
    for (int p = 0; p < 8; p++)
      for (int i = 0; i < NFFT; i++) begin
        fdat[p][i] = 16'($urandom);
        ext(1, 4'(2 * p), i, fdat[p][i], q);
      end
    issue('{dag1: dwr(DAGW_I, 2, 0), dag2: dwr(DAGW_I, 2, 0), default: '0});
    issue('{dag1: dwr(DAGW_M, 2, NFFT / 2), dag2: dwr(DAGW_M, 2, 1), default: '0});
    issue('{dag1: dwr(DAGW_L, 2, 0), dag2: dwr(DAGW_L, 2, 0), default: '0});
    n0 = n_issued;
    for (int i = 0; i <= NFFT; i++) begin
      d = '0;
      if (i < NFFT) begin   // AX0 <- DMX[bitrev(i)]
        d.pu.ldx = 1; d.pu.ldx_reg = R_AX0;
        d.dag1.gen = 1; d.dag1.isel = 2'd2; d.dag1.msel = 2'd2; d.dag1.brev = 1;
      end
      if (i > 0) begin      // DMY[i-1] <- AX0 (loaded by the previous instruction)
        d.pu.st = 1; d.pu.st_y = 1; d.pu.st_reg = R_AX0;
        d.dag2.gen = 1; d.dag2.isel = 2'd2; d.dag2.msel = 2'd2;
      end
      issue(d);
    end
    chk(n_issued - n0 == NFFT + 1, $sformatf("fft reorder cycles %0d", n_issued - n0));
    repeat (3) @(negedge clk);
    for (int p = 0; p < 8; p++)
      for (int i = 0; i < NFFT; i++) begin
        ext(0, 4'(2 * p + 1), i, 16'h0, q);
        chk(q == fdat[p][brev8(i)], $sformatf("fft reorder dp%0d word %0d", p + 1, i));
      end
    n_fft++;
  endtask

  initial begin
    ctrl = '0; seq = '0; seq.cond = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    block_fir(64, 16);
    block_fir(128, 7);
    block_fir(16, 32);
    complex_fir(8, 16);
    complex_fir(5, 32);
    fft_reorder();
    chk(n_cfir == 2, "complex FIR runs");
    chk(n_fir == 3, "block FIR runs");
    chk(n_fft == 1, "FFT reorder runs");
    $display("kernels: block FIR %0d, complex FIR %0d, FFT reorder %0d", n_fir, n_cfir, n_fft);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
