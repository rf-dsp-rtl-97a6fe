// tb_decoder: runs a small program through the decoder with a model of
// the instruction cache and of the units it issues to. Checks that the
// 16-bit halves are issued in order (low half first), LOADs to the
// pre-process and compute instructions to the engine, NOPs skipped, that
// no instruction issues before the previous one completed, that done
// follows the last word, and the cycle count of the program.
`timescale 1ns/1ps
module tb_decoder;
  import rfdsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  logic [11:0] prog_len = 0, ic_raddr;
  logic [31:0] ic_rdata;
  instr_t cur;
  logic pp_issue, pp_done = 0, ce_issue, post_done = 0, busy, done;
  logic [31:0] mem [4096];
  logic [15:0] expq [$];
  int checks = 0, failures = 0;
  int lat;     // completion latency of the modelled units

  decoder #(.IC_AW(12)) dut (.*);
  always_ff @(posedge clk) ic_rdata <= mem[ic_raddr];

  function automatic logic [15:0] mk(bit immi, opcode_e op, logic [2:0] sr, func_e f, int order);
    instr_t i;
    i = '0; i.immi = immi; i.op = op; i.selreg = sr; i.func = f; i.order = 6'(order);
    return 16'(i);
  endfunction
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // unit model: complete lat cycles after an issue
  int pend = -1;
  always @(posedge clk) begin
    pp_done <= 0; post_done <= 0;
    if (!rst_n) pend = -1;
    else if (pp_issue || ce_issue) begin
      chk(pend < 0, "issue while busy");
      chk(pp_issue != ce_issue, "single issue");
      if (expq.size() > 0) begin
        chk(16'(cur) == expq[0], $sformatf("instr %h exp %h", 16'(cur), expq[0]));
        chk(pp_issue == (cur.op == OP_LOAD), "LOAD goes to pre-process");
        void'(expq.pop_front());
      end else chk(0, "extra issue");
      pend = lat;
    end else if (pend > 0) pend--;
    else if (pend == 0) begin
      if (cur.op == OP_LOAD) pp_done <= 1; else post_done <= 1;
      pend = -1;
    end
  end

  initial begin
    int t0, n;
    lat = 3;
    n = 6;
    for (int i = 0; i < n; i++) begin
      logic [15:0] lo, hi;
      lo = mk(0, OP_LOAD, 3'b001, F_FIR, 0);
      hi = (i == 3) ? 16'h0000 : mk(i == n-1, opcode_e'(i % 3), 3'b001 << (i % 3), F_FIR, i + 1);
      mem[i] = {hi, lo};
      expq.push_back(lo);
      if (i != 3) expq.push_back(hi);
    end
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); prog_len = 12'(n); start = 1; @(negedge clk); start = 0;
    t0 = 0;
    while (!done && t0 < 1000) begin @(posedge clk); #1; t0++; end
    chk(done, "done");
    chk(expq.size() == 0, "all instructions issued");
    // per word: fetch 2; per issued half: dispatch, lat+3 waiting for done, next; per NOP: dispatch, next
    $display("program of %0d words took %0d cycles", n, t0);
    chk(t0 == n * 2 + 11 * (lat + 5) + 2, $sformatf("cycle count %0d", t0));
    @(posedge clk); #1; chk(!busy, "idle after done");
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
