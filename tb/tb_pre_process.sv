// tb_pre_process: runs LOAD instructions against a data cache model (a
// word array with one cycle of read latency) and checks every array write
// command: target arrays, write mode, element index and the two halves, the
// mu write, the sequential read pointer, and the N+1-cycle duration.
`timescale 1ns/1ps
module tb_pre_process;
  import rfdsp_pkg::*;
  localparam int NPE = 16, DW = 16, DC_AW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rptr_clr = 0, issue = 0;
  instr_t instr;
  logic [DC_AW-1:0] dc_raddr;
  logic [2*DW-1:0] dc_rdata;
  logic lo_en, hi_en, mu_we, done;
  arr_e lo_arr, hi_arr;
  wmode_e lo_mode, hi_mode;
  logic [6:0] idx;
  logic signed [DW-1:0] lo_val, hi_val;
  logic [2*DW-1:0] mem [256];
  int checks = 0, failures = 0;
  int ptr = 0;

  pre_process #(.NPE(NPE), .DW(DW), .DC_AW(DC_AW)) dut (.*);
  always_ff @(posedge clk) dc_rdata <= mem[dc_raddr];

  function automatic instr_t mk(logic [2:0] sr, func_e f, int order);
    instr_t i;
    i = '0; i.op = OP_LOAD; i.selreg = sr; i.func = f; i.order = 6'(order);
    return i;
  endfunction
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // run one LOAD, expect n writes; lo/hi enables and arrays/modes as given
  task automatic run(instr_t i, int n, bit elo, arr_e alo, wmode_e mlo,
                     bit ehi, arr_e ahi, wmode_e mhi, bit emu);
    int got, t0;
    @(negedge clk); instr = i; issue = 1; @(negedge clk); issue = 0;
    t0 = 0; got = 0;
    while (!done && t0 < 200) begin
      @(posedge clk); #1; t0++;
      if (lo_en || hi_en || mu_we) begin
        chk(lo_en == elo && hi_en == ehi && mu_we == emu, "enables");
        if (elo) chk(lo_arr == alo && lo_mode == mlo, "lo target");
        if (ehi) chk(hi_arr == ahi && hi_mode == mhi, "hi target");
        chk(int'(idx) == got, "index");
        chk(lo_val == mem[ptr][DW-1:0] && hi_val == mem[ptr][2*DW-1:DW], $sformatf("data word %0d", ptr));
        ptr++; got++;
      end
    end
    chk(got == n, $sformatf("write count %0d exp %0d", got, n));
    chk(t0 == n + 1, $sformatf("duration %0d exp %0d", t0, n + 1));
  endtask

  initial begin
    foreach (mem[i]) mem[i] = $urandom;
    instr = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); rptr_clr = 1; @(negedge clk); rptr_clr = 0;
    run(mk(3'b001, F_FIR,   0),  1, 1, ARR_X, WM_SHIFT, 0, ARR_W, WM_INDEX, 0);
    run(mk(3'b011, F_LMS_W, 0),  1, 1, ARR_X, WM_SHIFT, 1, ARR_M, WM_BCAST, 0);
    run(mk(3'b000, F_LMS_U, 0),  1, 0, ARR_W, WM_INDEX, 0, ARR_W, WM_INDEX, 1);
    run(mk(3'b000, F_MAT,   7),  7, 1, ARR_W, WM_INDEX, 0, ARR_W, WM_INDEX, 0);
    run(mk(3'b011, F_MAT,   9),  9, 1, ARR_X, WM_INDEX, 1, ARR_M, WM_INDEX, 0);
    run(mk(3'b011, F_FFT,   0), NPE, 1, ARR_X, WM_INDEX, 1, ARR_M, WM_INDEX, 0);
    run(mk(3'b100, F_IIR,   0),  1, 1, ARR_Y, WM_SHIFT, 0, ARR_W, WM_INDEX, 0);
    // pointer clear restarts at word 0
    @(negedge clk); rptr_clr = 1; @(negedge clk); rptr_clr = 0; ptr = 0;
    run(mk(3'b001, F_FIR,   0),  1, 1, ARR_X, WM_SHIFT, 0, ARR_W, WM_INDEX, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
