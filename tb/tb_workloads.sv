// tb_workloads: runs the evaluated filter workloads at full length on the
// RF-DSP top level at its default parameters.
//   FIR, 32 taps, 1024 samples  (one word per sample: shift-in LOAD + MUL/tree)
//   FIR, 6 taps (5th order), 256 samples
//   LMS, 32 taps, 1024 iterations (three words per iteration)
// Each program is loaded through the instruction-cache port, its data through
// the data-cache port, and every streamed result is compared with a
// bit-exact model (per-product shift by FRAC, 32-bit sums, 16-bit
// saturation). The FIR runs must sustain one sample per 15 cycles, the
// design's issue interval (decoder fetch and two handshakes per word).
// The LMS run also checks that the weights converge towards the unknown
// system that generated the desired signal.
// The workload sizes (32nd-order FIR and LMS, 5th-order FIR, 1024 samples)
// are the published evaluation sizes; the programs, the data and the
// reference model are this testbench's own.
`timescale 1ns/1ps
module tb_workloads;
  import rfdsp_pkg::*;
  localparam int NPE = 96, FRAC = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               imem_we = 0, dmem_we = 0, start = 0;
  logic [11:0]        imem_waddr = 0, prog_len = 0;
  logic [31:0]        imem_wdata = 0, dmem_wdata = 0;
  logic [10:0]        dmem_waddr = 0;
  logic               busy, done, out_valid;
  logic signed [15:0] out_data;

  rf_dsp dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
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
  function automatic int prod(int a, int b, int c);
    longint p;
    p = (longint'(a) - b) * c;
    return int'(p >>> FRAC);
  endfunction

  logic [31:0] prog [$];
  logic [31:0] dat  [$];
  int expq [$];
  int xhist [NPE];
  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  task automatic shift_x(int v);
    for (int i = NPE-1; i > 0; i--) xhist[i] = xhist[i-1];
    xhist[0] = v;
  endtask

  // load prog/dat, run, compare the stream with expq; returns the cycles
  // between the 2nd and the last output
  task automatic run(string name, output int span, output int nout);
    int c1;
    foreach (prog[i]) begin @(negedge clk); imem_we = 1; imem_waddr = 12'(i); imem_wdata = prog[i]; end
    foreach (dat[i])  begin @(negedge clk); dmem_we = 1; dmem_waddr = 11'(i); dmem_wdata = dat[i]; end
    @(negedge clk); imem_we = 0; dmem_we = 0;
    prog_len = 12'(prog.size());
    start = 1; @(negedge clk); start = 0;
    nout = 0; c1 = 0; span = 0;
    while (!done) begin
      @(posedge clk); #1;
      if (out_valid) begin
        if (nout < expq.size())
          chk(out_data == 16'(expq[nout]), $sformatf("%s out %0d: got %0d exp %0d", name, nout, out_data, expq[nout]));
        if (nout == 1) c1 = cycles;
        span = cycles - c1;
        nout++;
      end
    end
    chk(nout == expq.size(), $sformatf("%s: %0d outputs, expected %0d", name, nout, expq.size()));
    $display("%s: %0d outputs checked", name, nout);
    prog.delete(); dat.delete(); expq.delete();
  endtask

  task automatic fir(int nt, int ns);
    int h [];
    int span, nout;
    h = new[nt];
    foreach (h[k]) h[k] = $urandom_range(0, 128) - 64;
    prog.push_back({NOP, mk(0, OP_LOAD, 3'b000, F_MAT, 0, nt)});
    foreach (h[k]) dat.push_back({16'h0, 16'(h[k])});
    for (int n = 0; n < ns; n++) begin
      longint acc;
      int xv;
      xv = $urandom_range(0, 1024) - 512;
      prog.push_back({mk(1, OP_MUL, 3'b001, F_FIR, 1, nt), mk(0, OP_LOAD, 3'b001, F_FIR, 0, 0)});
      dat.push_back({16'h0, 16'(xv)});
      shift_x(xv);
      acc = 0;
      for (int k = 0; k < nt; k++) acc += prod(xhist[k], 0, h[k]);
      expq.push_back(sat(acc));
    end
    run($sformatf("FIR %0d taps x %0d samples", nt, ns), span, nout);
    chk(span == 15 * (nout - 2), $sformatf("FIR rate: %0d cycles for %0d samples", span, nout - 2));
    $display("  %0d cycles per sample in steady state", span / (nout - 2));
  endtask

  task automatic lms(int nt, int it);
    int wl [NPE];
    int mu, span, nout;
    mu = 32;
    prog.push_back({mk(0, OP_LOAD, 3'b000, F_MAT, 0, nt), mk(0, OP_LOAD, 3'b000, F_LMS_U, 0, 0)});
    dat.push_back({16'h0, 16'(mu)});
    for (int k = 0; k < nt; k++) dat.push_back(32'h0);
    foreach (wl[i]) wl[i] = 0;
    // desired signal: a fixed unknown 32-tap system driven by the same input
    for (int n = 0; n < it; n++) begin
      longint acc;
      int xv, dv, yv, e, kv;
      xv = $urandom_range(0, 512) - 256;
      shift_x(xv);
      acc = 0;
      for (int k = 0; k < nt; k++) acc += prod(xhist[k], 0, (k % 5) * 60 - 120);
      dv = sat(acc);
      prog.push_back({mk(0, OP_MUL, 3'b001, F_LMS_W, 1, nt), mk(0, OP_LOAD, 3'b011, F_LMS_W, 0, 0)});
      prog.push_back({mk(0, OP_MUL, 3'b011, F_FIR, 0, nt),  mk(0, OP_SUB, 3'b110, F_LMS_U, 0, nt)});
      prog.push_back({NOP,                                   mk(n == it - 1, OP_ADD, 3'b010, F_LMS_W, 0, nt)});
      dat.push_back({16'(dv), 16'(xv)});
      acc = 0;
      for (int k = 0; k < nt; k++) acc += prod(xhist[k], 0, wl[k]);
      yv = sat(acc);
      e  = sat(longint'(prod(dv, yv, mu)));
      for (int k = 0; k < nt; k++) begin
        kv = sat(longint'(prod(xhist[k], 0, e)));
        wl[k] = sat(longint'(kv) + wl[k]);
      end
    end
    begin
      // the adapted weights must also have moved close to the unknown system
      int err0, err1;
      err0 = 0; err1 = 0;
      for (int k = 0; k < nt; k++) begin
        err0 += ((k % 5) * 60 - 120) < 0 ? 120 - (k % 5) * 60 : (k % 5) * 60 - 120;
        err1  += (wl[k] - ((k % 5) * 60 - 120)) < 0 ? ((k % 5) * 60 - 120) - wl[k]
                                                   : wl[k] - ((k % 5) * 60 - 120);
      end
      $display("LMS: total weight error %0d -> %0d", err0, err1);
      chk(err1 * 2 < err0, "LMS weights converge towards the unknown system");
    end
    for (int k = 0; k < nt; k++) expq.push_back(wl[k]);
    run($sformatf("LMS %0d taps x %0d iterations", nt, it), span, nout);
  endtask

  initial begin
    foreach (xhist[i]) xhist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fir(32, 1024);
    fir(6, 256);
    lms(32, 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
