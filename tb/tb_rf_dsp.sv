// tb_rf_dsp: end-to-end test of the RF-DSP top level at its default
// parameters (96 PEs, 16-bit data, 8 fraction bits).
//
// One program, loaded through the instruction-cache port, runs three
// algorithms back to back on the same datapath, with input data loaded
// through the data-cache port:
//   1. a 32-tap FIR filter over 64 samples: a weight LOAD, then one word per
//      sample holding a shift-in LOAD and a MUL with the adder tree (immi=1);
//   2. a 32-tap LMS adaptive filter for 24 iterations, each the four-step
//      block y = w'x, e = 2mu(d - y), k = e x, w = w + k, streaming the new
//      weights after every iteration;
//   3. a 5x5 matrix product, 25 dot products as groups of the adder tree,
//      12 per instruction;
//   4. one FFT-round instruction, whose results the FFT module writes back to
//      the data cache in shuffled order.
// Expected values come from a bit-exact model in this file (per-product
// shift by FRAC, 32-bit sums, saturation to 16 bits). Each mechanism of the
// design (LOAD modes, the three PE operations, tree on/off, fused words,
// NOPs, the three write-back targets, the output stream and the FFT path) is
// counted, and one that never happened counts as a failure. The FIR's
// steady-state issue interval is checked against the decoder timing.
`timescale 1ns/1ps
module tb_rf_dsp;
  import rfdsp_pkg::*;
  localparam int NPE = 96, DW = 16, FRAC = 8;
  localparam int NF = 32, S = 64;     // FIR taps, samples
  localparam int NL = 32, IT = 24;    // LMS taps, iterations
  localparam int MN = 5;              // matrix size (the 5x5 example)

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              imem_we = 0, dmem_we = 0, start = 0;
  logic [11:0]       imem_waddr = 0, prog_len = 0;
  logic [31:0]       imem_wdata = 0, dmem_wdata = 0;
  logic [10:0]       dmem_waddr = 0;
  logic              busy, done, out_valid;
  logic signed [15:0] out_data;

  rf_dsp dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] mk(bit immi, opcode_e op, logic [2:0] sr, func_e f, bit tree, int order);
    instr_t i;
    i.immi = immi; i.op = op; i.selreg = sr; i.func = f; i.tree = tree; i.order = 6'(order);
    return 16'(i);
  endfunction
  localparam logic [15:0] NOP = 16'h0000;

  function automatic int sat(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction
  function automatic int prod(int a, int b, int c);  // ((a-b)*c) >>> FRAC, 32-bit
    longint p = (longint'(a) - b) * c;
    return int'(p >>> FRAC);
  endfunction

  // ---------------- program and data images ----------------
  logic [31:0] prog [$];
  logic [31:0] dat  [$];
  int expq [$];               // expected output stream (-99999 = don't care)

  int h [NF], xs [S];
  int xhist [NPE];            // model of the X array
  int wl [NPE];
  int mu, dd [IT], xl [IT];
  int A [MN][MN], Bm [MN][MN];

  task automatic shift_x(int v);
    for (int i = NPE-1; i > 0; i--) xhist[i] = xhist[i-1];
    xhist[0] = v;
  endtask

  initial begin
    int cyc0, cyc_first, cyc_last, nout;
    // ---- FIR ----
    foreach (h[k]) h[k] = $urandom_range(0, 128) - 64;
    foreach (xs[n]) xs[n] = $urandom_range(0, 1024) - 512;
    for (int i = 0; i < NPE; i++) xhist[i] = 0;
    prog.push_back({NOP, mk(0, OP_LOAD, 3'b000, F_MAT, 0, NF)});
    foreach (h[k]) dat.push_back({16'h0, 16'(h[k])});
    for (int n = 0; n < S; n++) begin
      longint acc;
      prog.push_back({mk(1, OP_MUL, 3'b001, F_FIR, 1, NF), mk(0, OP_LOAD, 3'b001, F_FIR, 0, 0)});
      dat.push_back({16'h0, 16'(xs[n])});
      shift_x(xs[n]);
      acc = 0;
      for (int k = 0; k < NF; k++) acc += prod(xhist[k], 0, h[k]);
      expq.push_back(sat(int'(acc)));
    end
    // ---- LMS ----
    mu = 16;                                   // 2*mu = 1/16
    prog.push_back({mk(0, OP_LOAD, 3'b000, F_MAT, 0, NL), mk(0, OP_LOAD, 3'b000, F_LMS_U, 0, 0)});
    dat.push_back({16'h0, 16'(mu)});
    for (int k = 0; k < NL; k++) dat.push_back(32'h0);
    for (int i = 0; i < NPE; i++) wl[i] = 0;
    for (int it = 0; it < IT; it++) begin
      longint acc;
      int yv, e;
      int kv [NPE];
      xl[it] = $urandom_range(0, 512) - 256;
      dd[it] = $urandom_range(0, 512) - 256;
      prog.push_back({mk(0, OP_MUL, 3'b001, F_LMS_W, 1, NL), mk(0, OP_LOAD, 3'b011, F_LMS_W, 0, 0)});
      prog.push_back({mk(0, OP_MUL, 3'b011, F_FIR, 0, NL),  mk(0, OP_SUB, 3'b110, F_LMS_U, 0, NL)});
      prog.push_back({NOP,                                   mk(1, OP_ADD, 3'b010, F_LMS_W, 0, NL)});
      dat.push_back({16'(dd[it]), 16'(xl[it])});
      shift_x(xl[it]);
      acc = 0;
      for (int k = 0; k < NL; k++) acc += prod(xhist[k], 0, wl[k]);
      yv = sat(int'(acc));
      e  = sat(longint'(prod(dd[it], yv, mu)));
      for (int k = 0; k < NL; k++) begin
        kv[k] = sat(longint'(prod(xhist[k], 0, e)));
        wl[k] = sat(longint'(kv[k]) + wl[k]);
        expq.push_back(wl[k]);
      end
    end
    // ---- 5x5 matrix product: 25 dot products of 5, 12 groups of 8 lanes per
    //      instruction, so three LOAD + MUL pairs ----
    for (int i = 0; i < MN; i++) for (int j = 0; j < MN; j++) begin
      A[i][j] = $urandom_range(0, 1024) - 512; Bm[i][j] = $urandom_range(0, 1024) - 512;
    end
    for (int g0 = 0; g0 < MN*MN; g0 += 12) begin
      int ng;
      ng = (MN*MN - g0 < 12) ? MN*MN - g0 : 12;
      prog.push_back({mk(1, OP_MUL, 3'b011, F_MAT, 1, MN), mk(0, OP_LOAD, 3'b011, F_MAT, 0, ng*MN)});
      for (int g = 0; g < ng; g++) for (int k = 0; k < MN; k++) begin
        dat.push_back({16'(Bm[k][(g0+g)%MN]), 16'(A[(g0+g)/MN][k])});
        xhist[g*MN+k] = A[(g0+g)/MN][k];
      end
      for (int g = 0; g < NPE/8; g++) begin
        if (g < ng) begin
          longint acc;
          acc = 0;
          for (int k = 0; k < MN; k++) acc += prod(A[(g0+g)/MN][k], 0, Bm[k][(g0+g)%MN]);
          expq.push_back(sat(int'(acc)));
        end else expq.push_back(-99999);
      end
    end
    // ---- one FFT round: X (real parts) through the PEs, results to the cache ----
    prog.push_back({NOP, mk(0, OP_ADD, 3'b001, F_FFT, 0, 0)});

    // ---- load images ----
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk); imem_we = 1; imem_waddr = 12'(i); imem_wdata = prog[i];
    end
    foreach (dat[i]) begin
      @(negedge clk); dmem_we = 1; dmem_waddr = 11'(i); dmem_wdata = dat[i];
    end
    @(negedge clk); imem_we = 0; dmem_we = 0;
    prog_len = 12'(prog.size());
    start = 1; @(negedge clk); start = 0;
    cyc0 = cycles;
    nout = 0; cyc_first = 0; cyc_last = 0;
    while (!done) begin
      @(posedge clk); #1;
      if (out_valid) begin
        if (nout < expq.size()) begin
          if (expq[nout] != -99999)
            chk(out_data == 16'(expq[nout]), $sformatf("out %0d: got %0d exp %0d", nout, out_data, expq[nout]));
        end else chk(0, "extra output");
        if (nout == 1) cyc_first = cycles;
        if (nout == 2) cyc_last = cycles;
        nout++;
      end
    end
    chk(nout == expq.size(), $sformatf("output count %0d exp %0d", nout, expq.size()));
    // FIR: one output per word; interval from decoder + pre-process + engine timing
    $display("FIR issue interval: %0d cycles per sample; program: %0d cycles", cyc_last - cyc_first, cycles - cyc0);
    chk(cyc_last - cyc_first == 15, "FIR interval 15 cycles per sample");
    // FFT round 0: lane l result (X element l, + Weight element l) at rotl1(l)
    // (only lanes below the LMS order have a modelled Weight value)
    for (int l = 0; l < NL; l++) begin
      int a10, ev;
      a10 = ((l << 1) | (l >> 9)) & 10'h3ff;
      ev  = sat(longint'(xhist[l]) + wl[l]);
      chk(dut.u_dcache.lo[a10] == 16'(ev), $sformatf("fft cache addr %0d", a10));
    end
    report_mech();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int cycles = 0;
  int n_shift, n_bcast, n_index, n_mu, n_mul, n_add, n_sub, n_tree, n_notree, n_fused, n_nop;
  int n_wb_y, n_wb_m, n_wb_w, n_stream, n_fft;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (dut.lo_en && dut.lo_mode == WM_SHIFT) n_shift++;
    if (dut.hi_en && dut.hi_mode == WM_BCAST) n_bcast++;
    if (dut.lo_en && dut.lo_mode == WM_INDEX) n_index++;
    if (dut.mu_we) n_mu++;
    if (dut.ce_issue) begin
      if (dut.cur.op == OP_MUL) n_mul++;
      if (dut.cur.op == OP_ADD) n_add++;
      if (dut.cur.op == OP_SUB) n_sub++;
      if (dut.cur.tree) n_tree++; else n_notree++;
      if (dut.u_dec.half && !is_nop(instr_t'(dut.u_dec.word[15:0]))) n_fused++;
    end
    if (int'(dut.u_dec.st) == int'(dut.u_dec.S_DISP) && is_nop(dut.u_dec.nxt)) n_nop++;
    if (dut.wb_we && dut.wb_dest == ARR_Y) n_wb_y++;
    if (dut.wb_we && dut.wb_dest == ARR_M) n_wb_m++;
    if (dut.wb_we && dut.wb_dest == ARR_W) n_wb_w++;
    if (out_valid) n_stream++;
    if (dut.f_we) n_fft++;
  end
  task automatic mech(string n, int v);
    $display("  mechanism %-28s %0d", n, v);
    chk(v > 0, {"mechanism never happened: ", n});
  endtask
  task automatic report_mech();
    mech("load shift-in", n_shift);     mech("load broadcast", n_bcast);
    mech("load element fill", n_index); mech("load step size", n_mu);
    mech("PE multiply", n_mul);         mech("PE add", n_add);
    mech("PE subtract", n_sub);         mech("adder tree on", n_tree);
    mech("adder tree off", n_notree);   mech("two instructions per word", n_fused);
    mech("NOP half-word", n_nop);       mech("write-back to Y", n_wb_y);
    mech("write-back to Middle", n_wb_m); mech("write-back to Weight", n_wb_w);
    mech("output stream", n_stream);    mech("FFT cache write", n_fft);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
